// rlc_receiver: the receive side of the text cipher.
//
// Ciphertext characters arrive one per transfer on a valid/ready stream.
// Each accepted character is decrypted combinationally by the reversible
// character decryptor with the current key-stream character and the
// recovered ASCII code is registered on the plaintext stream; the LFSR then
// steps. key_load_i loads the private key character received from the
// sender as the LFSR seed, so the receiver's key stream matches the
// sender's character for character.
//
// Timing: identical to the sender: one character per clock, one cycle from
// acceptance to output, output held and ct_ready_o low while pt_ready_i is
// low, nothing accepted while key_load_i is high. The stream handshake and
// register stage are this design's choices. Reset is synchronous, active
// low.
module rlc_receiver
  import rlc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // private key (seed of the key stream)
  input  logic  key_load_i,
  input  key_t  key_i,
  // ciphertext in
  input  logic  ct_valid_i,
  output logic  ct_ready_o,
  input  char_t ct_data_i,
  // plaintext out
  output logic  pt_valid_o,
  input  logic  pt_ready_i,
  output char_t pt_data_o
);
  key_t  key_cur;
  char_t p_char;
  char_t unused_garbage;
  logic  accept;

  assign ct_ready_o = !key_load_i && (!pt_valid_o || pt_ready_i);
  assign accept     = ct_valid_i && ct_ready_o;

  rlc_lfsr_keygen u_keygen (
    .clk(clk), .rst_n(rst_n),
    .load_i(key_load_i), .seed_i(key_i),
    .step_i(accept), .key_o(key_cur)
  );

  rlc_decrypt_char u_dec (
    .en_i(ct_data_i), .k_i(key_cur),
    .p_o(p_char), .garbage_o(unused_garbage)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pt_valid_o <= 1'b0;
      pt_data_o  <= '0;
    end else if (accept) begin
      pt_valid_o <= 1'b1;
      pt_data_o  <= p_char;
    end else if (pt_ready_i) begin
      pt_valid_o <= 1'b0;
    end
  end

  // A presented plaintext character stays put until it is taken.
  a_pt_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pt_valid_o && !pt_ready_i |=> pt_valid_o && $stable(pt_data_o));
endmodule
