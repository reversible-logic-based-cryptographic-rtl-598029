// rlc_dec_pair: decrypts one 2-bit slice of a ciphertext character with the
// matching 2-bit key slice. It is the encryption cascade run backwards
// (every gate used is its own inverse):
//   1. CNOT      control k1, target en0           -> (k1, k0^p0)
//   2. 3-CNOT    controls (k0, CNOT out 1, CNOT out 2), target en1
//                                                 -> (k0, k1, k0^p0, p1 ^ k0k1)
//   3. Toffoli   (3-CNOT out 1, 3-CNOT out 2, 3-CNOT target out)
//                                                 -> (k0, k1, p1)
//   4. CNOT      control Toffoli out 1, target 3-CNOT out 3
//                                                 -> (k0, p0)
// The garbage outputs are k0 (last CNOT's control line) and k1 (Toffoli's
// second line). Purely combinational: 4 gates deep, the same depth as the
// encryption cell.
module rlc_dec_pair (
  input  logic [1:0] en_i,       // ciphertext bits en[2j], en[2j+1]
  input  logic [1:0] k_i,        // key bits k[2j], k[2j+1]
  output logic [1:0] p_o,        // recovered plaintext bits p[2j], p[2j+1]
  output logic [1:0] garbage_o   // garbage lines (= k_i)
);
  logic c1_ctrl, c1_tgt;
  logic [2:0] kc_ctrl;
  logic kc_tgt;
  logic tf_a;

  rev_cnot u_cnot_in (
    .ctrl_i(k_i[1]), .tgt_i(en_i[0]),
    .ctrl_o(c1_ctrl), .tgt_o(c1_tgt)
  );

  rev_kcnot #(.N_CTRL(3)) u_kcnot (
    .ctrl_i({c1_tgt, c1_ctrl, k_i[0]}), .tgt_i(en_i[1]),
    .ctrl_o(kc_ctrl), .tgt_o(kc_tgt)
  );

  rev_toffoli u_toffoli (
    .a_i(kc_ctrl[0]), .b_i(kc_ctrl[1]), .c_i(kc_tgt),
    .a_o(tf_a), .b_o(garbage_o[1]), .c_o(p_o[1])
  );

  rev_cnot u_cnot_out (
    .ctrl_i(tf_a), .tgt_i(kc_ctrl[2]),
    .ctrl_o(garbage_o[0]), .tgt_o(p_o[0])
  );
endmodule
