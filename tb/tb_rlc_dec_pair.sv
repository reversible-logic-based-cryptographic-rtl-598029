// tb_rlc_dec_pair: exhaustive check of the 2-bit decryption cell. For all
// 16 combinations of plaintext pair and key pair, the ciphertext is formed
// from the cipher equations in the testbench and the cell must return the
// plaintext; the garbage lines must carry the key. Then, for all 16
// (en, k) inputs, the output must equal the algebraic inverse
//   p0 = en0 ^ k0 ^ k1,  p1 = en1 ^ (k0 & k1 & p0).
module tb_rlc_dec_pair;
  logic [1:0] en, k, p, g;
  int checks = 0, failures = 0;

  rlc_dec_pair dut (.en_i(en), .k_i(k), .p_o(p), .garbage_o(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] pt, exp_p;
    for (int v = 0; v < 16; v++) begin
      {pt, k} = 4'(v);
      en[0] = pt[0] ^ k[0] ^ k[1];
      en[1] = pt[1] ^ (k[0] & k[1] & pt[0]);
      #1;
      checks++;
      if (p !== pt) begin
        failures++;
        $display("FAIL round trip pt=%b k=%b en=%b -> %b", pt, k, en, p);
      end
      checks++;
      if (g !== k) begin
        failures++;
        $display("FAIL garbage=%b k=%b", g, k);
      end
    end
    for (int v = 0; v < 16; v++) begin
      {en, k} = 4'(v);
      #1;
      exp_p[0] = en[0] ^ k[0] ^ k[1];
      exp_p[1] = en[1] ^ (k[0] & k[1] & exp_p[0]);
      checks++;
      if (p !== exp_p) begin
        failures++;
        $display("FAIL en=%b k=%b p=%b exp=%b", en, k, p, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
