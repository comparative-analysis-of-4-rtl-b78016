// rev_full_addsub: one-bit reversible full adder/subtractor.
//
// Built, as published, from two Feynman gates (FG1, FG2) and two Peres
// gates (PG1, PG2) with one constant-0 ancilla:
//   FG1(Ctrl, A)          -> Ctrl (to FG2), A' = Ctrl xor A
//   PG1(A', B, 0)         -> g1 = A', A' xor B, A'B
//   PG2(Cin, A' xor B, A'B) -> g2 = Cin, Cin xor A' xor B, carry/borrow
//   FG2(Ctrl, Cin xor A' xor B) -> g3 = Ctrl, S/D = A xor B xor Cin
// Ctrl = 0: S/D and C/B are the sum and carry of A + B + Cin.
// Ctrl = 1: A is inverted before the carry logic, so C/B becomes the borrow
// of A - B - Cin (set when A < B + Cin) and S/D the difference bit.
// The pin-to-pin wiring is read from the published drawing; that Ctrl = 1
// means "A minus B minus borrow-in" is this design's reading.
// Garbage outputs g[0..2] = g1..g3 keep the circuit one-to-one.
// Purely combinational.
module rev_full_addsub (
  input  logic       ctrl,
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sd,
  output logic       cb,
  output logic [2:0] g
);
  logic ctrl_fwd, a_x;
  logic pg1_q, pg1_r;
  logic pg2_q;

  feynman_gate fg1 (.a(ctrl), .b(a), .p(ctrl_fwd), .q(a_x));
  peres_gate   pg1 (.a(a_x), .b(b), .c(1'b0), .p(g[0]), .q(pg1_q), .r(pg1_r));
  peres_gate   pg2 (.a(cin), .b(pg1_q), .c(pg1_r), .p(g[1]), .q(pg2_q), .r(cb));
  feynman_gate fg2 (.a(ctrl_fwd), .b(pg2_q), .p(g[2]), .q(sd));
endmodule
