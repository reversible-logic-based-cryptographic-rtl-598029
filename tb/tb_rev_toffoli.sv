// tb_rev_toffoli: checks the Toffoli gate against its 8-row truth table
// (a, b, c) -> (a, b, c xor ab), written out row by row, and checks that
// applying the gate twice restores the input.
module tb_rev_toffoli;
  logic a, b, c, ao, bo, co, a2, b2, c2;
  int checks = 0, failures = 0;
  // rows: {a, b, c, a', b', c'}
  logic [5:0] table_rows [8] = '{6'b000_000, 6'b001_001, 6'b010_010, 6'b011_011,
                                 6'b100_100, 6'b101_101, 6'b110_111, 6'b111_110};

  rev_toffoli dut  (.a_i(a),  .b_i(b),  .c_i(c),  .a_o(ao), .b_o(bo), .c_o(co));
  rev_toffoli dut2 (.a_i(ao), .b_i(bo), .c_i(co), .a_o(a2), .b_o(b2), .c_o(c2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (table_rows[r]) begin
      {a, b, c} = table_rows[r][5:3];
      #1;
      checks++;
      if ({ao, bo, co} !== table_rows[r][2:0]) begin
        failures++;
        $display("FAIL abc=%b -> %b%b%b", table_rows[r][5:3], ao, bo, co);
      end
      checks++;
      if ({a2, b2, c2} !== {a, b, c}) begin
        failures++;
        $display("FAIL not self-inverse for abc=%b", {a, b, c});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
