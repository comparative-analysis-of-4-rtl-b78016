// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
// A is the control and passes through on P. With A = 0, B and C go straight
// to Q and R; with A = 1 they are swapped: Q = A'B xor AC, R = A'C xor AB.
// Q is therefore a 2:1 multiplexer (A selects C over B), the role it plays
// in the ALU's result selection; R carries the unselected input as garbage.
// The equations are the published ones. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
