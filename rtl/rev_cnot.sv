// rev_cnot: the 2-input, 2-output reversible CNOT (Feynman) gate.
//
// The control passes through unchanged and the target is inverted when the
// control is 1: (x, y) -> (x, y ^ x). This is the gate and truth table the
// cipher is built from; it is its own inverse. Purely combinational, no
// clock: outputs follow the inputs after one gate delay.
module rev_cnot (
  input  logic ctrl_i,   // control x
  input  logic tgt_i,    // target y
  output logic ctrl_o,   // x
  output logic tgt_o     // y xor x
);
  assign ctrl_o = ctrl_i;
  assign tgt_o  = tgt_i ^ ctrl_i;
endmodule
