// proposed_csla: WIDTH-bit area-efficient carry select adder.
//
// Computes {cout, sum} = a + b + cin. The sum and carry generator (csla_scg)
// produces, for every bit, the half sum and the carry-out for both possible
// carry-ins; the sum and carry selection unit (csla_scs) then selects each
// bit's carry with the real incoming carry and forms the final sum. Per bit
// this takes two AOI XORs for the sum and two ANDs plus two ORs for the carry.
// The 8-bit default is the width at which the design is sized and compared.
//
// Ports: a, b, cin inputs; sum, cout outputs. Combinational, no clock.
module proposed_csla #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] s0, c0, c1;

  csla_scg #(.WIDTH(WIDTH)) u_scg (
    .a (a),
    .b (b),
    .s0(s0),
    .c0(c0),
    .c1(c1)
  );

  csla_scs #(.WIDTH(WIDTH)) u_scs (
    .s0  (s0),
    .c0  (c0),
    .c1  (c1),
    .cin (cin),
    .sum (sum),
    .cout(cout)
  );

endmodule
