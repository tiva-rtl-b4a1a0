// exchanger: conditional swap of two W-bit signal sets.
//
// With the configuration bit x = 0 each set passes straight through
// (s0_o = s0_i, s1_o = s1_i); with x = 1 the two sets trade places. Being a
// swap, it is a bijection for either setting, so it can be placed between
// reversible LUT stages without losing the permutation property. It is pure
// combinational logic: one 2-to-1 multiplexer per output bit.
module exchanger #(
  parameter int unsigned W = 5
) (
  input  logic         x,
  input  logic [W-1:0] s0_i,
  input  logic [W-1:0] s1_i,
  output logic [W-1:0] s0_o,
  output logic [W-1:0] s1_o
);

  assign s0_o = x ? s1_i : s0_i;
  assign s1_o = x ? s0_i : s1_i;

endmodule
