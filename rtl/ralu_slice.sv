// ralu_slice: one bit of the reversible ALU.
//
// Three data inputs (A, B, Cin) and five select lines S0..S4 (sel[0] = S0),
// as published. Inside, every signal used twice is first copied by a Feynman
// gate with a 0 ancilla, so the network has no fan-out:
//   arithmetic unit  rev_full_addsub(Ctrl = S0, A, B, Cin) -> S/D, Cout
//   logic unit       BME(X = A, Y = B, Z = S1, T = A)
//                      Q = (A AND B) xor S1   AND / NAND
//                      R = A xor S1           transfer A / NOT A
//                      S = (A OR B) xor S1    OR / NOR
//                    DKG(X = 0, Y = B, Z = A, T = S1)
//                      S = A xor B xor S1     XOR / XNOR
//   selection        four Fredkin gates used as 2:1 multiplexers:
//                      m0 = S2 ? (A xor S1)  : S/D
//                      m1 = S2 ? OR/NOR      : AND/NAND
//                      m2 = S3 ? m1 : m0
//                      F  = S4 ? XOR/XNOR : m2
//                    S2 passes from the first to the second multiplexer on
//                    the Fredkin P output.
// The use of BME and DKG for the logic unit and of the published
// Feynman/Peres adder/subtractor for the arithmetic unit follows the
// published design; the meaning of each select line, the Fredkin result
// multiplexer and the exact gate network are this design's own choices.
// The ALU operations and their codes are in ralu_pkg.
//
// Line count: 8 inputs plus 7 constant-0 ancillas in; F, Cout and 13
// garbage outputs out. Over all 256 input combinations the 15 outputs are
// distinct, so no information is lost (checked by the testbench).
// garbage = {fr4.r, fr4.p(S4), fr3.r, fr3.p(S3), fr2.r, fr2.p(S2), fr1.r,
//            dkg.r, dkg.q, dkg.p, addsub.g[2:0]}.
// Carry in, carry out: in subtract mode these are borrow in and borrow out.
// Purely combinational.
module ralu_slice
  import ralu_pkg::*;
(
  input  logic                       a,
  input  logic                       b,
  input  logic                       cin,
  input  logic [SEL_W-1:0]           sel,
  output logic                       f,
  output logic                       cout,
  output logic [SLICE_GARBAGE_W-1:0] garbage
);
  // copies of A, B and S1
  logic a1, a2, a3, a4;
  logic b1, b2, b3, b4;
  logic s1a, s1b;
  // unit results
  logic sd;
  logic [2:0] as_g;
  logic bme_p, bme_and, bme_tra, bme_or;
  logic dkg_p, dkg_q, dkg_r, dkg_xor;
  // multiplexer tree
  logic m0, m1, m2;
  logic fr1_p, fr1_r, fr2_p, fr2_r, fr3_p, fr3_r, fr4_p, fr4_r;

  feynman_gate fg_a1 (.a(a),   .b(1'b0), .p(a1), .q(a2));
  feynman_gate fg_a2 (.a(a2),  .b(1'b0), .p(a3), .q(a4));
  feynman_gate fg_b1 (.a(b),   .b(1'b0), .p(b1), .q(b2));
  feynman_gate fg_b2 (.a(b2),  .b(1'b0), .p(b3), .q(b4));
  feynman_gate fg_s1 (.a(sel[1]), .b(1'b0), .p(s1a), .q(s1b));

  rev_full_addsub addsub (
    .ctrl(sel[0]), .a(a1), .b(b1), .cin(cin),
    .sd(sd), .cb(cout), .g(as_g)
  );

  bme_gate bme (
    .x(a3), .y(b3), .z(s1a), .t(a4),
    .p(bme_p), .q(bme_and), .r(bme_tra), .s(bme_or)
  );

  dkg_gate dkg (
    .x(1'b0), .y(b4), .z(bme_p), .t(s1b),
    .p(dkg_p), .q(dkg_q), .r(dkg_r), .s(dkg_xor)
  );

  fredkin_gate fr1 (.a(sel[2]), .b(sd),      .c(bme_tra), .p(fr1_p), .q(m0), .r(fr1_r));
  fredkin_gate fr2 (.a(fr1_p),  .b(bme_and), .c(bme_or),  .p(fr2_p), .q(m1), .r(fr2_r));
  fredkin_gate fr3 (.a(sel[3]), .b(m0),      .c(m1),      .p(fr3_p), .q(m2), .r(fr3_r));
  fredkin_gate fr4 (.a(sel[4]), .b(m2),      .c(dkg_xor), .p(fr4_p), .q(f),  .r(fr4_r));

  assign garbage = {fr4_r, fr4_p, fr3_r, fr3_p, fr2_r, fr2_p, fr1_r,
                    dkg_r, dkg_q, dkg_p, as_g};
endmodule
