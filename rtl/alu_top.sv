// alu_top: arithmetic and logic unit built around the proposed carry select
// adder.
//
// Addition and subtraction both go through one proposed_csla instance:
// OP_ADD computes a + b + cin, OP_SUB computes a - b as a + ~b + 1 (cout is
// then 1 when no borrow occurs). The six logic operations (AND, OR, XOR,
// XNOR, NAND, NOR) are bitwise and leave cout at 0. zero flags an all-zero
// result. Placing the adder inside an ALU follows the design; the operation
// set, its encoding (alu_pkg::alu_op_e), the subtract path and the zero flag
// are this design's own choices.
//
// Ports: a, b operands; cin carry-in used by OP_ADD; op operation select;
// result, cout, zero outputs. Purely combinational: the result is valid one
// adder delay after the inputs settle.
module alu_top
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output logic             cout,
  output logic             zero
);

  logic [WIDTH-1:0] add_b;
  logic             add_cin;
  logic [WIDTH-1:0] add_sum;
  logic             add_cout;

  // Subtraction feeds the adder the one's complement of b and a carry of 1.
  always_comb begin
    if (op == OP_SUB) begin
      add_b   = ~b;
      add_cin = 1'b1;
    end else begin
      add_b   = b;
      add_cin = cin;
    end
  end

  proposed_csla #(.WIDTH(WIDTH)) u_adder (
    .a   (a),
    .b   (add_b),
    .cin (add_cin),
    .sum (add_sum),
    .cout(add_cout)
  );

  always_comb begin
    cout = 1'b0;
    unique case (op)
      OP_ADD, OP_SUB: begin
        result = add_sum;
        cout   = add_cout;
      end
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_XNOR: result = ~(a ^ b);
      OP_NAND: result = ~(a & b);
      OP_NOR:  result = ~(a | b);
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
