// tb_rev_kcnot: checks the k-CNOT gate exhaustively. The 3-control
// instance (the default, the 3-CNOT of the cipher) is checked against its
// 16-row truth table: t' = t ^ (k1 & k2 & k3), controls unchanged. A
// 4-control instance is checked against the same rule over all 32 inputs.
module tb_rev_kcnot;
  logic [2:0] c3, c3o;
  logic t3, t3o;
  logic [3:0] c4, c4o;
  logic t4, t4o;
  int checks = 0, failures = 0;

  rev_kcnot dut3 (.ctrl_i(c3), .tgt_i(t3), .ctrl_o(c3o), .tgt_o(t3o));
  rev_kcnot #(.N_CTRL(4)) dut4 (.ctrl_i(c4), .tgt_i(t4), .ctrl_o(c4o), .tgt_o(t4o));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_t;
    for (int v = 0; v < 16; v++) begin
      {c3, t3} = 4'(v);
      #1;
      // only the row with all three controls set flips the target
      exp_t = (c3 == 3'b111) ? !t3 : t3;
      checks++;
      if (c3o !== c3 || t3o !== exp_t) begin
        failures++;
        $display("FAIL 3-CNOT in=%b out=%b%b", {c3, t3}, c3o, t3o);
      end
    end
    for (int v = 0; v < 32; v++) begin
      {c4, t4} = 5'(v);
      #1;
      exp_t = (c4 == 4'b1111) ? !t4 : t4;
      checks++;
      if (c4o !== c4 || t4o !== exp_t) begin
        failures++;
        $display("FAIL 4-CNOT in=%b out=%b%b", {c4, t4}, c4o, t4o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
