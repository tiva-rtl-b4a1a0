// tiva_top: a verifier and an embedded device joined by the TIVA
// challenge-response link.
//
// The device side is the XRPU (secret pi_d in series with the challenge
// permutation pi_v, plus the checksum sequencer) reading the device's image
// memory. The verifier side computes the expected hash from the obfuscated
// image, sends the random challenge pi_v and the start address, times the
// answer and compares. The two image memories and the vendor who embeds pi_d
// are outside this block: their ports are brought out.
//
// Typical use: after reset wait 64 clocks for the permutation tables to fill;
// embed pi_d through embed_* and set embed_lock; then for each verification
// pulse ver_start with a fresh challenge while ver_ready is high, and read
// pass/hash_ok/time_ok when ver_done pulses. One verification takes about
// 2 x 1024 clocks: the verifier's own pass over M_obf, then the device's.
module tiva_top
  import tiva_pkg::*;
#(
  parameter int unsigned MEM_AW = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  // vendor: embed pi_d into the device
  input  logic              embed_we,
  input  logic [2:0]        embed_lut,
  input  lut_row_t          embed_table,
  input  logic              embed_xchg_we,
  input  logic [N_XCHG-1:0] embed_xchg,
  input  logic              embed_lock,
  output logic              dev_locked,
  // device image memory (image I), read one clock after request
  output logic              dev_mem_req,
  output logic [MEM_AW-1:0] dev_mem_addr,
  input  logic [WORD_W-1:0] dev_mem_rdata,
  // verifier's obfuscated image memory, read one clock after request
  output logic              obf_req,
  output logic [ADDR_W-1:0] obf_addr,
  input  logic [WORD_W-1:0] obf_rdata,
  // verification request
  output logic              ver_ready,
  input  logic              ver_start,
  input  rpu_cfg_t          ver_challenge,
  input  logic [MEM_AW-1:0] ver_start_addr,
  input  logic [31:0]       ver_t_max,
  // verdict
  output logic              ver_done,
  output logic              ver_pass,
  output logic              ver_hash_ok,
  output logic              ver_time_ok,
  output logic [31:0]       ver_resp_cycles,
  output logic [HASH_W-1:0] ver_ref_hash,
  output logic [HASH_W-1:0] dev_hash
);

  logic              dev_ready, chal_valid, dev_done;
  rpu_cfg_t          chal_cfg;
  logic [MEM_AW-1:0] chal_addr;

  verifier #(.MEM_AW(MEM_AW)) u_verifier (
    .clk(clk), .rst_n(rst_n),
    .ready(ver_ready), .start(ver_start), .challenge(ver_challenge),
    .start_addr(ver_start_addr), .t_max(ver_t_max),
    .obf_req(obf_req), .obf_addr(obf_addr), .obf_rdata(obf_rdata),
    .dev_ready(dev_ready), .chal_valid(chal_valid), .chal_cfg(chal_cfg),
    .chal_addr(chal_addr), .resp_valid(dev_done), .resp_hash(dev_hash),
    .done(ver_done), .pass(ver_pass), .hash_ok(ver_hash_ok), .time_ok(ver_time_ok),
    .resp_cycles(ver_resp_cycles), .ref_hash(ver_ref_hash)
  );

  xrpu #(.MEM_AW(MEM_AW)) u_device (
    .clk(clk), .rst_n(rst_n),
    .embed_we(embed_we), .embed_lut(embed_lut), .embed_table(embed_table),
    .embed_xchg_we(embed_xchg_we), .embed_xchg(embed_xchg),
    .embed_lock(embed_lock), .locked(dev_locked),
    .ready(dev_ready), .start(chal_valid), .start_addr(chal_addr), .challenge(chal_cfg),
    .done(dev_done), .hash(dev_hash),
    .mem_req(dev_mem_req), .mem_addr(dev_mem_addr), .mem_rdata(dev_mem_rdata)
  );

endmodule
