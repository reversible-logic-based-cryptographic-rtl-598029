// tb_rlc_ref_pkg: reference models for the testbenches, written from the
// cipher's algebra rather than from its gate netlist.
//
// Per bit pair j, with plaintext bits p0 = p[2j], p1 = p[2j+1] and key bits
// k0 = k[2j], k1 = k[2j+1], the gate cascade reduces to
//   en0 = p0 ^ k0 ^ k1
//   en1 = p1 ^ (k0 & k1 & p0)
// and inverting these gives p0 = en0 ^ k0 ^ k1, p1 = en1 ^ (k0 & k1 & p0).
// The key stream is an 8-bit Fibonacci LFSR, x^8 + x^6 + x^5 + x^4 + 1,
// shifting left with the new bit entering bit 0.
package tb_rlc_ref_pkg;

  function automatic logic [7:0] ref_encrypt(logic [7:0] p, logic [7:0] k);
    logic [7:0] en;
    for (int j = 0; j < 4; j++) begin
      en[2*j]   = p[2*j] ^ k[2*j] ^ k[2*j+1];
      en[2*j+1] = p[2*j+1] ^ (k[2*j] & k[2*j+1] & p[2*j]);
    end
    return en;
  endfunction

  function automatic logic [7:0] ref_decrypt(logic [7:0] en, logic [7:0] k);
    logic [7:0] p;
    for (int j = 0; j < 4; j++) begin
      p[2*j]   = en[2*j] ^ k[2*j] ^ k[2*j+1];
      p[2*j+1] = en[2*j+1] ^ (k[2*j] & k[2*j+1] & p[2*j]);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_lfsr_next(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [7:0] ref_seed(logic [7:0] k);
    return (k == 8'h00) ? 8'h01 : k;
  endfunction

endpackage
