// rlc_decrypt_char: recovers one 8-bit character from its ciphertext and
// the same 8-bit key character that encrypted it.
//
// Four decryption cells, one per bit pair (en[1:0], en[3:2], en[5:4],
// en[7:6]) with the key pair at the same positions. Each cell is the
// encryption cell's gate cascade in reverse order, so the gate count and
// the depth (four gates) equal those of the encryptor: encryption and
// decryption take the same time. Purely combinational.
module rlc_decrypt_char
  import rlc_pkg::*;
#(
  parameter int unsigned W = CHAR_W   // character width, even
) (
  input  logic [W-1:0] en_i,       // ciphertext character
  input  logic [W-1:0] k_i,        // key character
  output logic [W-1:0] p_o,        // recovered plaintext character
  output logic [W-1:0] garbage_o   // garbage lines
);
  for (genvar j = 0; j < W / 2; j++) begin : g_pair
    rlc_dec_pair u_cell (
      .en_i     (en_i[2*j +: 2]),
      .k_i      (k_i[2*j +: 2]),
      .p_o      (p_o[2*j +: 2]),
      .garbage_o(garbage_o[2*j +: 2])
    );
  end

  if (W % 2 != 0) begin : g_bad_width
    $error("rlc_decrypt_char: W must be even");
  end
endmodule
