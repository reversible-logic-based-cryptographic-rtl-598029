// tb_rlc_encrypt_char: exhaustive check of the 8-bit character encryptor
// over all 65536 (character, key) pairs against the reference cipher, plus
// the garbage lines (equal to the key) and, for a few keys, that the
// mapping from character to ciphertext is one-to-one.
module tb_rlc_encrypt_char;
  import tb_rlc_ref_pkg::*;
  logic [7:0] p, k, en, g;
  int checks = 0, failures = 0;

  rlc_encrypt_char dut (.p_i(p), .k_i(k), .en_o(en), .garbage_o(g));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [256];
    for (int kv = 0; kv < 256; kv++) begin
      foreach (seen[i]) seen[i] = 1'b0;
      for (int pv = 0; pv < 256; pv++) begin
        p = 8'(pv);
        k = 8'(kv);
        #1;
        checks++;
        if (en !== ref_encrypt(p, k) || g !== k) begin
          failures++;
          if (failures < 10)
            $display("FAIL p=%h k=%h en=%h exp=%h g=%h", p, k, en, ref_encrypt(p, k), g);
        end
        if (seen[en]) begin
          checks++;
          failures++;
          $display("FAIL key %h maps two characters to %h", k, en);
        end
        seen[en] = 1'b1;
      end
    end
    // a printable message character with a printable key character
    p = "H"; k = "K"; #1;
    checks++;
    if (en !== ref_encrypt("H", "K")) failures++;
    $display("'H' with key 'K' -> 8'h%h", en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
