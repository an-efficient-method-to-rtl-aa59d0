// csla_scg: sum and carry generator (SCG) unit of the area-efficient carry
// select adder.
//
// For every bit position i it forms, independently of any carry:
//   s0[i] = a[i] ^ b[i]        half sum (AOI XOR)
//   c0[i] = a[i] & b[i]        carry-out of the bit if its carry-in is 0
//   c1[i] = s0[i] | c0[i]      carry-out of the bit if its carry-in is 1
// c1 reuses the half sum and the half carry with a single OR gate instead of
// a second ripple adder, which is where the area saving over a conventional
// carry select adder comes from. These three functions and their gates follow
// the adder cell of the design; splitting the cell into a WIDTH-bit SCG
// vector and a separate selection unit (csla_scs) follows its two-unit
// description.
//
// Ports: a, b operands; s0, c0, c1 per-bit results. Combinational.
module csla_scg #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s0,
  output logic [WIDTH-1:0] c0,
  output logic [WIDTH-1:0] c1
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    aoi_xor u_hs (.a(a[i]), .b(b[i]), .y(s0[i]));
    assign c0[i] = a[i] & b[i];
    assign c1[i] = s0[i] | c0[i];
  end

endmodule
