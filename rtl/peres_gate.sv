// peres_gate: the 3x3 reversible Peres gate.
//
// P = A, Q = A xor B, R = AB xor C: a Feynman gate and a Toffoli gate merged,
// so that with C = 0 it yields both the half-sum (Q) and the carry (R) of
// A and B. The equations are the published ones. Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
