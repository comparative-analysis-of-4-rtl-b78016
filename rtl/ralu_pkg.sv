// ralu_pkg: constants shared by the reversible ALU and its testbenches.
//
// The ALU is steered by five select lines S4..S0, carried as a 5-bit vector
// with sel[0] = S0. The meaning of each line is this design's own choice
// (the select lines themselves, five of them, follow the published design):
//   S0       arithmetic mode of the adder/subtractor: 0 = add, 1 = subtract
//   S1       invert the logic result (AND->NAND, OR->NOR, A->NOT A, XOR->XNOR)
//   S4 S3 S2 result select: 000 arithmetic, 001 transfer A / NOT A,
//            010 AND / NAND, 011 OR / NOR, 1xx XOR / XNOR
// ralu_op_e names the ten operations with their select codes.
package ralu_pkg;

  localparam int unsigned SEL_W = 5;
  // Garbage outputs of one bit slice (see ralu_slice).
  localparam int unsigned SLICE_GARBAGE_W = 13;

  typedef enum logic [SEL_W-1:0] {
    OP_ADD  = 5'b00000,
    OP_SUB  = 5'b00001,
    OP_TRA  = 5'b00100,  // transfer A
    OP_NOT  = 5'b00110,  // NOT A
    OP_AND  = 5'b01000,
    OP_NAND = 5'b01010,
    OP_OR   = 5'b01100,
    OP_NOR  = 5'b01110,
    OP_XOR  = 5'b10000,
    OP_XNOR = 5'b10010
  } ralu_op_e;

endpackage
