// rpu: Reconfigurable Permutation Unit, a configurable bijection on 10-bit
// word indices.
//
// Three columns of two Toffoli(5,5) LUTs are separated by exchangers:
//
//   a[0..4] -> LUT0 --+-- Exchanger(3,3) --> LUT2 --+                 +-> LUT4 -> p[0..4]
//                     X                              Exchanger(5,5) --+
//   a[5..9] -> LUT1 --+-- Exchanger(2,2) --> LUT3 --+                 +-> LUT5 -> p[5..9]
//
// Address bit n travels on line n of the drawing, counted from the top, and
// the same numbering gives p. The upper three output lines of LUT0 and of
// LUT1 meet in Exchanger(3,3), the lower two of each in Exchanger(2,2). LUT2
// takes the three lines of the first Exchanger(3,3) output set and the upper
// two of the second; LUT3 takes the remaining line plus the four Exchanger(2,2)
// lines. Exchanger(5,5) swaps the whole outputs of LUT2 and LUT3 before the
// last column. Inside the code each 5-bit group is indexed [4:0] with its top
// line at [4]. The block and line structure follows the published block
// diagram; the bit numbering and the split of lines between LUT2 and LUT3 are
// this design's reading of it, since the diagram prints no bit numbers.
//
// Because every LUT row holds a reversible Toffoli function and each
// exchanger is a swap, p is a permutation of a for every configuration.
// The critical path is three LUT multiplexers and two exchanger multiplexers.
//
// Interface: the 39-bit configuration selection (six row selectors, three
// exchanger bits) is captured into a register by cfg_load and reset to zero.
// LUT rows are written through row_we (one enable per LUT), row_addr and
// row_data. a -> p is combinational. ROWS = 64 gives the generic unit that
// stores all configurations; ROWS = 1 gives a unit that keeps one chosen
// configuration per LUT, for which the row selectors are unused.
module rpu
  import tiva_pkg::*;
#(
  parameter int unsigned ROWS = CFG_ROWS,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration selection register
  input  logic              cfg_load,
  input  rpu_cfg_t          cfg_i,
  // LUT configuration store write port
  input  logic [N_LUT-1:0]  row_we,
  input  logic [RW-1:0]     row_addr,
  input  lut_row_t          row_data,
  // permutation
  input  logic [ADDR_W-1:0] a,
  output logic [ADDR_W-1:0] p
);

  rpu_cfg_t cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_q <= '0;
    else if (cfg_load) cfg_q <= cfg_i;
  end

  logic [N_LUT-1:0][LUT_W-1:0] lut_in, lut_out;
  logic [2:0] x3_o0, x3_o1;
  logic [1:0] x2_o0, x2_o1;
  logic [LUT_W-1:0] x5_o0, x5_o1;

  for (genvar k = 0; k < N_LUT; k++) begin : g_lut
    lut5x5 #(.ROWS(ROWS)) u_lut (
      .clk      (clk),
      .cfg_we   (row_we[k]),
      .cfg_row  (row_addr),
      .cfg_data (row_data),
      .sel      (cfg_q.sel[k][RW-1:0]),
      .a        (lut_in[k]),
      .b        (lut_out[k])
    );
  end

  // a_l / p_l hold the lines top to bottom from bit 9 down, so that line n
  // (from the top) carries address bit n.
  logic [ADDR_W-1:0] a_l, p_l;
  always_comb
    for (int unsigned n = 0; n < ADDR_W; n++) begin
      a_l[ADDR_W-1-n] = a[n];
      p[n]            = p_l[ADDR_W-1-n];
    end

  // first column
  assign lut_in[0] = a_l[9:5];
  assign lut_in[1] = a_l[4:0];

  exchanger #(.W(3)) u_x33 (
    .x(cfg_q.xchg[0]), .s0_i(lut_out[0][4:2]), .s1_i(lut_out[1][4:2]),
    .s0_o(x3_o0), .s1_o(x3_o1)
  );
  exchanger #(.W(2)) u_x22 (
    .x(cfg_q.xchg[1]), .s0_i(lut_out[0][1:0]), .s1_i(lut_out[1][1:0]),
    .s0_o(x2_o0), .s1_o(x2_o1)
  );

  // second column
  assign lut_in[2] = {x3_o0, x3_o1[2:1]};
  assign lut_in[3] = {x3_o1[0], x2_o0, x2_o1};

  exchanger #(.W(5)) u_x55 (
    .x(cfg_q.xchg[2]), .s0_i(lut_out[2]), .s1_i(lut_out[3]),
    .s0_o(x5_o0), .s1_o(x5_o1)
  );

  // third column
  assign lut_in[4] = x5_o0;
  assign lut_in[5] = x5_o1;
  assign p_l = {lut_out[4], lut_out[5]};

endmodule
