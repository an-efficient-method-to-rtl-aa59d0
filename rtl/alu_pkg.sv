// alu_pkg: types and constants shared by the ALU and its testbenches.
//
// The ALU word width defaults to 8 bits, the adder width used for every gate
// count and area figure of the proposed carry select adder. The operation set
// and its 3-bit encoding are this design's own choice: the adder is meant to
// sit inside an ALU that performs arithmetic and logic operations, but no
// particular instruction set is laid down for it.
package alu_pkg;

  // Default data width of the adder and the ALU.
  parameter int unsigned ALU_WIDTH = 8;

  // ALU operation select.
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,  // a + b + cin
    OP_SUB  = 3'd1,  // a - b, computed as a + ~b + 1 on the same adder
    OP_AND  = 3'd2,
    OP_OR   = 3'd3,
    OP_XOR  = 3'd4,
    OP_XNOR = 3'd5,
    OP_NAND = 3'd6,
    OP_NOR  = 3'd7
  } alu_op_e;

endpackage
