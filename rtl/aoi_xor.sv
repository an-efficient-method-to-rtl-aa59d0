// aoi_xor: two-input exclusive OR in AND-OR-INVERT form.
//
// y = (~a & b) | (a & ~b): each input is inverted, each inverted input is
// ANDed with the other true input, and the two product terms are ORed. This is
// the XOR structure the adder cell is drawn with; the proposed carry select
// adder uses two of them per bit, one for the half sum and one for the final
// sum. Purely combinational, no clock.
//
// Ports: a, b (inputs), y (output).
module aoi_xor (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n, b_n;     // inverter outputs
  logic p_ab_n;       // ~a & b
  logic p_a_bn;       // a & ~b

  assign a_n    = ~a;
  assign b_n    = ~b;
  assign p_ab_n = a_n & b;
  assign p_a_bn = a & b_n;
  assign y      = p_ab_n | p_a_bn;

endmodule
