// rlc_encrypt_char: encrypts one 8-bit character with one 8-bit key
// character.
//
// The character is cut into bit pairs (p[1:0], p[3:2], p[5:4], p[7:6]) and
// each pair goes through its own reversible cell together with the key pair
// at the same positions, so one character costs 8 CNOT, 4 Toffoli and
// 4 3-CNOT gates. The cells are independent and side by side; the block is
// purely combinational with a depth of four gates. The garbage lines of all
// cells are brought out (they equal the key) so that the circuit keeps as
// many outputs as inputs.
module rlc_encrypt_char
  import rlc_pkg::*;
#(
  parameter int unsigned W = CHAR_W   // character width, even
) (
  input  logic [W-1:0] p_i,        // plaintext character (ASCII code)
  input  logic [W-1:0] k_i,        // key character
  output logic [W-1:0] en_o,       // ciphertext character
  output logic [W-1:0] garbage_o   // garbage lines
);
  for (genvar j = 0; j < W / 2; j++) begin : g_pair
    rlc_enc_pair u_cell (
      .p_i      (p_i[2*j +: 2]),
      .k_i      (k_i[2*j +: 2]),
      .en_o     (en_o[2*j +: 2]),
      .garbage_o(garbage_o[2*j +: 2])
    );
  end

  if (W % 2 != 0) begin : g_bad_width
    $error("rlc_encrypt_char: W must be even");
  end
endmodule
