// ralu: WIDTH-bit reversible arithmetic logic unit (top level).
//
// WIDTH copies of ralu_slice share the five select lines S4..S0 and are
// chained through their carry: slice i's carry out is slice i+1's carry in,
// a ripple-carry (ripple-borrow in subtract mode) adder/subtractor. The
// published design compares a 4-bit and an 8-bit version; WIDTH = 8 is the
// default and WIDTH = 4 gives the other one.
//
// Operations (codes in ralu_pkg::ralu_op_e):
//   ADD  f = A + B + cin,  cout = carry out of the top bit
//   SUB  f = A - B - cin,  cout = borrow out (1 when A < B + cin)
//   TRA  f = A             NOT  f = ~A
//   AND, NAND, OR, NOR, XOR, XNOR  bitwise on A and B
// For the logic operations cout is the (meaningless) carry chain output.
// garbage brings out every slice's 13 garbage lines, so that the network
// keeps a one-to-one mapping from its inputs to its outputs.
// The select lines are broadcast to all slices by plain wiring.
// Purely combinational: results are valid one ripple delay after the inputs.
module ralu
  import ralu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]                        a,
  input  logic [WIDTH-1:0]                        b,
  input  logic                                    cin,
  input  logic [SEL_W-1:0]                        sel,
  output logic [WIDTH-1:0]                        f,
  output logic                                    cout,
  output logic [WIDTH-1:0][SLICE_GARBAGE_W-1:0]   garbage
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    ralu_slice slice (
      .a(a[i]), .b(b[i]), .cin(carry[i]), .sel(sel),
      .f(f[i]), .cout(carry[i+1]), .garbage(garbage[i])
    );
  end

  assign cout = carry[WIDTH];
endmodule
