// tb_rlc_enc_pair: exhaustive check of the 2-bit encryption cell. For all
// 16 combinations of (p1, p0, k1, k0) the ciphertext must match
//   en0 = p0 ^ k0 ^ k1,  en1 = p1 ^ (k0 & k1 & p0),
// the garbage lines must carry (k1, k0), and the 4-line output must be a
// one-to-one function of the 4-line input (reversibility).
module tb_rlc_enc_pair;
  logic [1:0] p, k, en, g;
  int checks = 0, failures = 0;
  bit seen [16];

  rlc_enc_pair dut (.p_i(p), .k_i(k), .en_o(en), .garbage_o(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_en;
    for (int v = 0; v < 16; v++) begin
      {p, k} = 4'(v);
      #1;
      exp_en[0] = p[0] ^ k[0] ^ k[1];
      exp_en[1] = p[1] ^ (k[0] & k[1] & p[0]);
      checks++;
      if (en !== exp_en) begin
        failures++;
        $display("FAIL p=%b k=%b en=%b exp=%b", p, k, en, exp_en);
      end
      checks++;
      if (g !== k) begin
        failures++;
        $display("FAIL p=%b k=%b garbage=%b", p, k, g);
      end
      checks++;
      if (seen[{g, en}]) begin
        failures++;
        $display("FAIL output %b repeated: not reversible", {g, en});
      end
      seen[{g, en}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
