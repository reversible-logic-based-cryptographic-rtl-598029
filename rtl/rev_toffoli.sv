// rev_toffoli: the 3-input, 3-output reversible Toffoli gate.
//
// Two controls pass through unchanged and the target is inverted only when
// both controls are 1: (a, b, c) -> (a, b, c ^ ab), following the gate's
// truth table. It is its own inverse. Purely combinational.
module rev_toffoli (
  input  logic a_i,    // control a
  input  logic b_i,    // control b
  input  logic c_i,    // target c
  output logic a_o,    // a
  output logic b_o,    // b
  output logic c_o     // c xor (a and b)
);
  assign a_o = a_i;
  assign b_o = b_i;
  assign c_o = c_i ^ (a_i & b_i);
endmodule
