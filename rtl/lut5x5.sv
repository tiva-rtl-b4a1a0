// lut5x5: reconfigurable 5-input, 5-output look-up table.
//
// The table keeps ROWS configuration rows. Each row is the truth table of one
// 5-bit function, held as five 32-bit columns; the row in use is chosen by
// `sel` (the configuration selection), and each output bit b[j] is picked out
// of column j by a 32-to-1 multiplexer addressed by the input a. This is the
// organisation of a direct-mapped store with 64 sets of 20-byte lines feeding
// five 32-to-1 multiplexers. With ROWS = 1 the block keeps only one chosen
// configuration and `sel` is ignored.
//
// Interface: rows are written one per clock through cfg_we/cfg_row/cfg_data.
// The lookup a -> b is purely combinational, as the selection is expected to
// be loaded before lookups start. How rows are written is this design's own
// choice (a plain synchronous write port); the rows are not reset, so they
// must be written before use.
module lut5x5
  import tiva_pkg::*;
#(
  parameter int unsigned ROWS = CFG_ROWS,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic             cfg_we,
  input  logic [RW-1:0]    cfg_row,
  input  lut_row_t         cfg_data,
  input  logic [RW-1:0]    sel,
  input  logic [LUT_W-1:0] a,
  output logic [LUT_W-1:0] b
);

  lut_row_t mem [ROWS];
  lut_row_t row_q;

  always_ff @(posedge clk) begin
    if (cfg_we) mem[(ROWS > 1) ? cfg_row : '0] <= cfg_data;
  end

  always_comb begin
    row_q = mem[(ROWS > 1) ? sel : '0];
    for (int unsigned j = 0; j < LUT_W; j++) b[j] = row_q[j][a];
  end

endmodule
