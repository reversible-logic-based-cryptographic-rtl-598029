// rev_kcnot: the k-control reversible CNOT gate (k-CNOT).
//
// N_CTRL controls pass through unchanged; the target is inverted only when
// every control is 1: t' = t ^ (k1 & k2 & ... & kN). With N_CTRL = 3 it is
// the 3-CNOT gate used in the encryption and decryption cells, whose truth
// table (three controls and one target) is the default here. The gate is
// its own inverse. Purely combinational.
module rev_kcnot #(
  parameter int unsigned N_CTRL = 3
) (
  input  logic [N_CTRL-1:0] ctrl_i,  // controls k1..kN (bit 0 is k1)
  input  logic              tgt_i,   // target t
  output logic [N_CTRL-1:0] ctrl_o,  // controls, unchanged
  output logic              tgt_o    // t xor (AND of all controls)
);
  assign ctrl_o = ctrl_i;
  assign tgt_o  = tgt_i ^ (&ctrl_i);
endmodule
