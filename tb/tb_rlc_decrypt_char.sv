// tb_rlc_decrypt_char: exhaustive check of the 8-bit character decryptor.
// For all 65536 (character, key) pairs the testbench encrypts the
// character with the reference cipher and the decryptor must return it,
// with the key on its garbage lines.
module tb_rlc_decrypt_char;
  import tb_rlc_ref_pkg::*;
  logic [7:0] en, k, p, g;
  int checks = 0, failures = 0;

  rlc_decrypt_char dut (.en_i(en), .k_i(k), .p_o(p), .garbage_o(g));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kv = 0; kv < 256; kv++) begin
      for (int pv = 0; pv < 256; pv++) begin
        k  = 8'(kv);
        en = ref_encrypt(8'(pv), k);
        #1;
        checks++;
        if (p !== 8'(pv) || g !== k) begin
          failures++;
          if (failures < 10)
            $display("FAIL pt=%h k=%h en=%h -> p=%h g=%h", pv, k, en, p, g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
