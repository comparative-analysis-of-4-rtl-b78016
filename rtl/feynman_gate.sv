// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// P passes A through and Q = A xor B. With B tied to 0 it copies A onto a
// second line, which is how reversible circuits fan a signal out without
// breaking the one-to-one mapping. The equations are the published ones.
// Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
