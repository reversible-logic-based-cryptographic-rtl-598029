// rlc_enc_pair: encrypts one 2-bit slice of a character with the matching
// 2-bit slice of the key, using only reversible gates.
//
// Gate cascade, as the cipher describes it:
//   1. CNOT      control k0, target p0          -> (k0, k0^p0)
//   2. Toffoli   (CNOT out 1, k1, p1)           -> (k0, k1, p1 ^ k0k1)
//   3. 3-CNOT    controls (Toffoli out 1, Toffoli out 2, CNOT out 2),
//                target Toffoli out 3           -> (k0, k1, k0^p0, p1 ^ k0k1p0)
//   4. CNOT      control 3-CNOT out 2, target 3-CNOT out 3
//                                               -> (k1, en0 = k0^k1^p0)
// en1 is the 3-CNOT target output. The two remaining lines are the garbage
// outputs; they carry the key bits k0 and k1, which is what lets the
// decryption cascade take (k0, k1, en0, en1) in that line order. Net
// function: en0 = p0 ^ k0 ^ k1, en1 = p1 ^ (k0 & k1 & p0).
//
// Which CNOT input is the control (k0 rather than p0) is this design's
// reading of the circuit drawing; the ciphertext is the same either way,
// only the garbage line differs. Purely combinational: 4 gates deep.
module rlc_enc_pair (
  input  logic [1:0] p_i,        // plaintext bits p[2j], p[2j+1]
  input  logic [1:0] k_i,        // key bits k[2j], k[2j+1]
  output logic [1:0] en_o,       // ciphertext bits en[2j], en[2j+1]
  output logic [1:0] garbage_o   // garbage lines (= k_i)
);
  logic c1_ctrl, c1_tgt;
  logic tf_a, tf_b, tf_c;
  logic [2:0] kc_ctrl;
  logic kc_tgt;

  rev_cnot u_cnot_in (
    .ctrl_i(k_i[0]), .tgt_i(p_i[0]),
    .ctrl_o(c1_ctrl), .tgt_o(c1_tgt)
  );

  rev_toffoli u_toffoli (
    .a_i(c1_ctrl), .b_i(k_i[1]), .c_i(p_i[1]),
    .a_o(tf_a), .b_o(tf_b), .c_o(tf_c)
  );

  rev_kcnot #(.N_CTRL(3)) u_kcnot (
    .ctrl_i({c1_tgt, tf_b, tf_a}), .tgt_i(tf_c),
    .ctrl_o(kc_ctrl), .tgt_o(kc_tgt)
  );

  rev_cnot u_cnot_out (
    .ctrl_i(kc_ctrl[1]), .tgt_i(kc_ctrl[2]),
    .ctrl_o(garbage_o[1]), .tgt_o(en_o[0])
  );

  assign en_o[1]      = kc_tgt;
  assign garbage_o[0] = kc_ctrl[0];
endmodule
