// bme_gate: the 4x4 reversible BME gate.
//
// P = X, Q = XY xor Z, R = XT xor Z, S = X'Y xor Z xor T (published
// equations). Z acts as a programmable inversion of Q, R and S. In the ALU
// slice X = A, Y = B and T = a copy of A, which turns the outputs into
// Q = (A AND B) xor Z, R = A xor Z and S = (A OR B) xor Z: the whole logic
// unit in one gate. Purely combinational.
module bme_gate (
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic t,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = x;
  assign q = (x & y) ^ z;
  assign r = (x & t) ^ z;
  assign s = (~x & y) ^ z ^ t;
endmodule
