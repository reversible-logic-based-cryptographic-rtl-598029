// rlc_sender: the transmit side of the text cipher.
//
// Plaintext ASCII characters arrive one per transfer on a valid/ready
// stream. Each accepted character is encrypted combinationally by the
// reversible character encryptor with the current key-stream character and
// the result is registered on the ciphertext stream; the LFSR then steps so
// the next character uses the next key. key_load_i loads the private key
// character as the LFSR seed (the first character is encrypted with the
// private key itself).
//
// Timing: one character per clock when the ciphertext side is ready; the
// ciphertext appears one cycle after the plaintext is accepted. When
// ct_ready_i is low the output is held and pt_ready_o drops (stall).
// While key_load_i is high no character is accepted. The stream handshake,
// register stage and key loading are this design's choices; the cipher's
// description covers the per-character circuit and the LFSR key stream.
// Reset is synchronous, active low.
module rlc_sender
  import rlc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // private key (seed of the key stream)
  input  logic  key_load_i,
  input  key_t  key_i,
  // plaintext in
  input  logic  pt_valid_i,
  output logic  pt_ready_o,
  input  char_t pt_data_i,
  // ciphertext out
  output logic  ct_valid_o,
  input  logic  ct_ready_i,
  output char_t ct_data_o
);
  key_t  key_cur;
  char_t en_char;
  char_t unused_garbage;
  logic  accept;

  assign pt_ready_o = !key_load_i && (!ct_valid_o || ct_ready_i);
  assign accept     = pt_valid_i && pt_ready_o;

  rlc_lfsr_keygen u_keygen (
    .clk(clk), .rst_n(rst_n),
    .load_i(key_load_i), .seed_i(key_i),
    .step_i(accept), .key_o(key_cur)
  );

  rlc_encrypt_char u_enc (
    .p_i(pt_data_i), .k_i(key_cur),
    .en_o(en_char), .garbage_o(unused_garbage)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ct_valid_o <= 1'b0;
      ct_data_o  <= '0;
    end else if (accept) begin
      ct_valid_o <= 1'b1;
      ct_data_o  <= en_char;
    end else if (ct_ready_i) begin
      ct_valid_o <= 1'b0;
    end
  end

  // A presented ciphertext character stays put until it is taken.
  a_ct_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ct_valid_o && !ct_ready_i |=> ct_valid_o && $stable(ct_data_o));
endmodule
