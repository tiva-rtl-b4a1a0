// tiva_pkg: constants, types and the Toffoli table generator shared by the
// TIVA integrity-verification hardware.
//
// The address permutation works on 10-bit word indices (a 4 KB image of 1024
// 32-bit words) and is built from six 5-input/5-output look-up tables and
// three exchangers. Each generic LUT keeps 64 configuration rows; a row holds
// the full truth table of one reversible Toffoli(5,5) function, stored as five
// 32-bit columns (column j, bit x = output bit j for input x). The 39-bit
// configuration selection is six 6-bit row selectors plus three exchanger
// bits. These sizes are the ones the design is specified with.
//
// The order in which the 55 Toffoli functions are numbered is this design's
// own choice: control sets of size 2, then 3, then 4; within a size, control
// masks in increasing numeric order; within a mask, targets from bit 0 up.
// Rows 55..63 repeat functions 0..8 so that every selector value is a
// bijection.
package tiva_pkg;

  localparam int unsigned ADDR_W     = 10;   // permuted index width
  localparam int unsigned IMAGE_WORDS = 1 << ADDR_W;
  localparam int unsigned LUT_W      = 5;    // Toffoli(5,5)
  localparam int unsigned LUT_DEPTH  = 1 << LUT_W;
  localparam int unsigned N_LUT      = 6;
  localparam int unsigned N_XCHG     = 3;
  localparam int unsigned CFG_ROWS   = 64;
  localparam int unsigned SEL_W      = 6;
  localparam int unsigned N_TOFFOLI  = 55;
  localparam int unsigned CFG_BITS   = N_LUT * SEL_W + N_XCHG;  // 39
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned HASH_W     = 64;

  // One configuration row of a 5x5 LUT: 5 output columns of 32 bits (20 bytes).
  typedef logic [LUT_W-1:0][LUT_DEPTH-1:0] lut_row_t;

  // Configuration selection of one RPU (39 bits).
  // sel[k] chooses the row of LUT k; xchg[e] is the bit of exchanger e.
  // LUT numbering: 0/1 first column (upper/lower), 2/3 second, 4/5 third.
  // Exchanger numbering: 0 = Exchanger(3,3), 1 = Exchanger(2,2), 2 = Exchanger(5,5).
  typedef struct packed {
    logic [N_XCHG-1:0]           xchg;
    logic [N_LUT-1:0][SEL_W-1:0] sel;
  } rpu_cfg_t;

  // Truth table stored in configuration row `row` (0..63) of a generic LUT:
  // Toffoli function number (row mod 55), with control mask `ctrl` and
  // target bit `tgt` found by counting through the numbering described above.
  function automatic lut_row_t toffoli_row(input int unsigned row);
    lut_row_t         r;
    logic [LUT_W-1:0] ctrl;
    logic [LUT_W-1:0] y;
    logic [2:0]       tgt;
    int unsigned      idx;
    int unsigned      n;
    idx  = (row < N_TOFFOLI) ? row : row - N_TOFFOLI;
    n    = 0;
    ctrl = '0;
    tgt  = '0;
    for (int unsigned k = 2; k <= 4; k++) begin
      for (int unsigned m = 0; m < LUT_DEPTH; m++) begin
        if ($countones(m[LUT_W-1:0]) == k) begin
          for (int unsigned t = 0; t < LUT_W; t++) begin
            if (!m[t]) begin
              if (n == idx) begin
                ctrl = m[LUT_W-1:0];
                tgt  = t[2:0];
              end
              n++;
            end
          end
        end
      end
    end
    for (int unsigned x = 0; x < LUT_DEPTH; x++) begin
      y = x[LUT_W-1:0];
      if ((y & ctrl) == ctrl) y[tgt] = ~y[tgt];
      for (int unsigned j = 0; j < LUT_W; j++) r[j][x] = y[j];
    end
    return r;
  endfunction

endpackage
