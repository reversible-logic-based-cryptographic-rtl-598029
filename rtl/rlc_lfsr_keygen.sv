// rlc_lfsr_keygen: key-stream generator for the text cipher.
//
// A W-bit Fibonacci linear feedback shift register. The private key
// character is loaded as the seed and is the key for the first message
// character; every step_i shifts the register once, giving the key for the
// next character, so sender and receiver stay in step as long as both load
// the same seed and step once per character. The feedback XOR is built as a
// chain of reversible CNOT gates, one per tap, so the generator uses the
// same gate set as the cipher. The shift by one with that feedback is a
// one-to-one map of the state, i.e. itself reversible.
//
// The cipher's description asks for an LFSR key generator but gives no
// width, taps or seeding rule: the width (8 bits, one key character), the
// polynomial x^8 + x^6 + x^5 + x^4 + 1 (maximal length, period 255) and the
// replacement of a zero seed by 8'h01 are this design's choices.
//
// Timing: load_i and step_i act at the rising clock edge; key_o is the
// register itself. load_i wins over step_i. Reset (active low, synchronous
// to clk) sets the state to the zero-seed substitute.
module rlc_lfsr_keygen
  import rlc_pkg::*;
#(
  parameter int unsigned  W    = KEY_W,
  parameter logic [W-1:0] TAPS = LFSR_TAPS,            // 1 = state bit feeds back
  parameter logic [W-1:0] ZERO_SUBST = W'(LFSR_ZERO_SEED_SUBST)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,   // load seed_i
  input  logic [W-1:0] seed_i,   // private key character
  input  logic         step_i,   // advance to the next key
  output logic [W-1:0] key_o     // current key character
);
  logic [W-1:0] state_q;
  logic [W:0]   fb_chain;        // running XOR along the CNOT chain

  assign fb_chain[0] = 1'b0;     // constant-0 ancilla line
  for (genvar i = 0; i < W; i++) begin : g_tap
    if (TAPS[i]) begin : g_cnot
      logic unused_ctrl;
      rev_cnot u_cnot (
        .ctrl_i(state_q[i]), .tgt_i(fb_chain[i]),
        .ctrl_o(unused_ctrl), .tgt_o(fb_chain[i+1])
      );
    end else begin : g_wire
      assign fb_chain[i+1] = fb_chain[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      state_q <= ZERO_SUBST;
    else if (load_i) state_q <= (seed_i == '0) ? ZERO_SUBST : seed_i;
    else if (step_i) state_q <= {state_q[W-2:0], fb_chain[W]};
  end

  assign key_o = state_q;

  // The state never reaches zero: zero is a lock-up state of the LFSR.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state_q != '0);
endmodule
