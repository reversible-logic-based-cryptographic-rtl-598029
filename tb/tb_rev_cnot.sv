// tb_rev_cnot: checks the CNOT gate against its 4-row truth table
// (x, y) -> (x, y xor x), with the table written out row by row.
module tb_rev_cnot;
  logic x, y, xo, yo;
  int checks = 0, failures = 0;
  // rows: {x, y, x_out, y_out}
  logic [3:0] table_rows [4] = '{4'b00_00, 4'b01_01, 4'b10_11, 4'b11_10};

  rev_cnot dut (.ctrl_i(x), .tgt_i(y), .ctrl_o(xo), .tgt_o(yo));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (table_rows[r]) begin
      {x, y} = table_rows[r][3:2];
      #1;
      checks++;
      if ({xo, yo} !== table_rows[r][1:0]) begin
        failures++;
        $display("FAIL x=%b y=%b -> %b%b", x, y, xo, yo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
