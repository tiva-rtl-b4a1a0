// toffoli_table_loader: fills the configuration stores of a generic RPU.
//
// After reset it walks the 64 row addresses, one per clock, and writes row r
// of all six LUTs at once with the truth table of Toffoli function
// (r mod 55) as numbered in tiva_pkg. So every LUT holds the 55 reversible
// functions with 5 inputs and control sets of 2 to 4 lines, the first nine
// repeated to fill 64 rows. `ready` rises after the last write (64 clocks
// after reset is released) and stays high.
//
// Filling the stores from a generator after reset, instead of from a file or
// a ROM, is this design's choice.
module toffoli_table_loader
  import tiva_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_LUT-1:0]  row_we,
  output logic [SEL_W-1:0]  row_addr,
  output lut_row_t          row_data,
  output logic              ready
);

  logic [SEL_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      ready <= 1'b0;
    end else if (!ready) begin
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == SEL_W'(CFG_ROWS - 1)) ready <= 1'b1;
    end
  end

  assign row_we   = ready ? '0 : '1;
  assign row_addr = cnt_q;
  // the 64 rows are constants, computed at elaboration
  lut_row_t table_rows [CFG_ROWS];
  for (genvar r = 0; r < CFG_ROWS; r++) begin : g_row
    localparam lut_row_t ROW = toffoli_row(r);
    assign table_rows[r] = ROW;
  end

  assign row_data = table_rows[cnt_q];

endmodule
