// rlc_secure_link: sender and receiver of the reversible-logic text cipher
// joined by a ciphertext channel.
//
// A message enters as a stream of 8-bit ASCII characters at the sender,
// is encrypted character by character with an LFSR key stream seeded by the
// private key, crosses the channel as ciphertext, and is decrypted at the
// receiver, whose LFSR is seeded with the same private key. How the private
// key reaches the receiver is outside this design: the two seeds come in on
// separate ports (tx_key_i, rx_key_i), and decryption is correct only when
// they match. The channel is a direct valid/ready connection; its traffic
// is brought out on the chan_* ports for observation.
//
// Timing: one character per clock at full rate; a character accepted at
// the sender on cycle n is presented at pt_valid_o on cycle n+2 (one
// register in each side). Back-pressure from pt_ready_i stalls the
// receiver, then the channel, then the sender. Reset is synchronous, active
// low. The channel, handshake and latency are this design's choices.
module rlc_secure_link
  import rlc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // private key at each end
  input  logic  tx_key_load_i,
  input  key_t  tx_key_i,
  input  logic  rx_key_load_i,
  input  key_t  rx_key_i,
  // plaintext message in (sender)
  input  logic  pt_valid_i,
  output logic  pt_ready_o,
  input  char_t pt_data_i,
  // recovered message out (receiver)
  output logic  pt_valid_o,
  input  logic  pt_ready_i,
  output char_t pt_data_o,
  // ciphertext channel, for observation
  output logic  chan_valid_o,
  output logic  chan_ready_o,
  output char_t chan_data_o
);
  logic  ch_valid, ch_ready;
  char_t ch_data;

  rlc_sender u_sender (
    .clk(clk), .rst_n(rst_n),
    .key_load_i(tx_key_load_i), .key_i(tx_key_i),
    .pt_valid_i(pt_valid_i), .pt_ready_o(pt_ready_o), .pt_data_i(pt_data_i),
    .ct_valid_o(ch_valid), .ct_ready_i(ch_ready), .ct_data_o(ch_data)
  );

  rlc_receiver u_receiver (
    .clk(clk), .rst_n(rst_n),
    .key_load_i(rx_key_load_i), .key_i(rx_key_i),
    .ct_valid_i(ch_valid), .ct_ready_o(ch_ready), .ct_data_i(ch_data),
    .pt_valid_o(pt_valid_o), .pt_ready_i(pt_ready_i), .pt_data_o(pt_data_o)
  );

  assign chan_valid_o = ch_valid;
  assign chan_ready_o = ch_ready;
  assign chan_data_o  = ch_data;
endmodule
