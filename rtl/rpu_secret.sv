// rpu_secret: the device's secret permutation pi_d.
//
// An RPU that stores only the one configuration chosen by the software
// vendor: one 160-bit truth table per LUT (120 bytes in all) and the three
// exchanger bits. The vendor writes them through the embed port; asserting
// embed_lock then freezes them, and later embed writes are ignored. There is
// no port that reads the tables back, and the permuted index p is meant to be
// wired only into the XRPU, so pi_d is never observable from outside.
//
// Timing: embed writes take effect on the next clock edge; a -> p is
// combinational. The lock and the exchanger bits are cleared by reset, the
// tables are not. Keeping pi_d in ordinary registers, and clearing the lock
// on reset, are this design's choices: a product would put the secret in
// protected non-volatile storage.
module rpu_secret
  import tiva_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              embed_we,     // write one LUT table
  input  logic [2:0]        embed_lut,    // which LUT (0..5)
  input  lut_row_t          embed_table,
  input  logic              embed_xchg_we,
  input  logic [N_XCHG-1:0] embed_xchg,
  input  logic              embed_lock,   // freeze pi_d
  output logic              locked,
  input  logic [ADDR_W-1:0] a,
  output logic [ADDR_W-1:0] p
);

  logic [N_LUT-1:0] row_we;
  rpu_cfg_t         cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          locked <= 1'b0;
    else if (embed_lock) locked <= 1'b1;
  end

  always_comb begin
    row_we = '0;
    if (embed_we && !locked && embed_lut < 3'(N_LUT)) row_we[embed_lut] = 1'b1;
    cfg      = '0;
    cfg.xchg = embed_xchg;
  end

  rpu #(.ROWS(1)) u_rpu (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_load (embed_xchg_we && !locked),
    .cfg_i    (cfg),
    .row_we   (row_we),
    .row_addr (1'b0),
    .row_data (embed_table),
    .a        (a),
    .p        (p)
  );

endmodule
