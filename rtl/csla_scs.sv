// csla_scs: sum and carry selection (SCS) unit of the area-efficient carry
// select adder.
//
// The carry into bit i, c[i], picks between the two precomputed carry-outs of
// that bit: c[i+1] = c0[i] | (c[i] & c1[i]). Because c0 implies c1, this
// AND-OR pair is a 2:1 selection of c1 (carry-in 1) or c0 (carry-in 0), with
// no multiplexer and no inverter. Only WIDTH selection stages are needed, one
// per bit. Once the carry is selected the final sum is s0[i] ^ c[i], formed
// with the second AOI XOR of the cell. The selection and final-sum gates
// follow the adder cell of the design; cascading the cells bit by bit, with
// c[0] = cin, is how the WIDTH-bit adder is assembled here.
//
// Ports: s0, c0, c1 from csla_scg; cin carry-in of bit 0; sum; cout carry-out
// of the top bit. Combinational: the carry ripples through WIDTH AND-OR pairs.
module csla_scs #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] s0,
  input  logic [WIDTH-1:0] c0,
  input  logic [WIDTH-1:0] c1,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;   // c[i] is the selected carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic sel_c1;      // c1 gated by the incoming carry
    assign sel_c1 = c[i] & c1[i];
    assign c[i+1] = c0[i] | sel_c1;
    aoi_xor u_fs (.a(s0[i]), .b(c[i]), .y(sum[i]));
  end

  assign cout = c[WIDTH];

endmodule
