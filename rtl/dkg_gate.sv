// dkg_gate: the 4x4 reversible DKG gate.
//
// P = Y, Q = X'Z + XT, R = (X xor Y)(Z xor T) xor ZT, S = Y xor Z xor T
// (published equations). S is a three-input parity, R is the carry (X = 0)
// or borrow (X = 1) of Y, Z, T, and Q is a 2:1 multiplexer steered by X.
// The ALU slice uses it with X = 0 and takes S = A xor B xor S1 as its
// XOR/XNOR result. Purely combinational.
module dkg_gate (
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic t,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = y;
  assign q = (~x & z) | (x & t);
  assign r = ((x ^ y) & (z ^ t)) ^ (z & t);
  assign s = y ^ z ^ t;
endmodule
