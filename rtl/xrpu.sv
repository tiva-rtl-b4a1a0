// xrpu: eXtended RPU, the device-side checksum engine.
//
// It holds two permutation units in series: the secret pi_d (rpu_secret),
// embedded by the software vendor, and a generic RPU for the verifier's
// challenge pi_v. Given a start address and the 39-bit challenge it walks the
// 1024 words of the image, i = 0..1023, and accumulates
//
//     hash += sext64( MEM[start + i] ^ zext32( pi_v(pi_d(i)) ) )
//
// The 32-bit term is sign-extended into the 64-bit sum, as in the published
// PowerPC loop (srawi / addc / adde). Only the final hash leaves the block:
// neither the permuted indices nor the per-word terms are visible, so pi_d
// cannot be recovered from the outputs.
//
// Order of composition: pi_d is applied first and pi_v second. This is the
// order for which the hash equals the verifier's sum over the obfuscated
// image, M_obf[pi_d(i)] = M[i], and it matches the worked example; one
// formula in the specification writes the two in the other order.
//
// Pipeline, one word per clock: stage 0 issues the memory read and computes
// pi_d(i); stage 1 computes pi_v and registers the memory data (the memory
// returns data one clock after mem_req); stage 2 accumulates. The XRPU itself
// therefore takes two clocks (one per RPU), and a full walk takes
// IMAGE_WORDS + 3 clocks from the start handshake to the done pulse.
// Hardware sequencing rather than processor microcode is this design's
// choice; both are allowed by the specification.
//
// Interface: after reset the generic RPU's tables are filled (64 clocks);
// `ready` is high when that is finished and no walk is running. start is
// accepted only while ready. done pulses for one clock with hash valid; hash
// holds its value until the next start. mem_addr is a word address.
module xrpu
  import tiva_pkg::*;
#(
  parameter int unsigned MEM_AW = 30       // word address of a 32-bit byte space
) (
  input  logic              clk,
  input  logic              rst_n,
  // pi_d embedding (vendor only)
  input  logic              embed_we,
  input  logic [2:0]        embed_lut,
  input  lut_row_t          embed_table,
  input  logic              embed_xchg_we,
  input  logic [N_XCHG-1:0] embed_xchg,
  input  logic              embed_lock,
  output logic              locked,
  // challenge / response
  output logic              ready,
  input  logic              start,
  input  logic [MEM_AW-1:0] start_addr,
  input  rpu_cfg_t          challenge,
  output logic              done,
  output logic [HASH_W-1:0] hash,
  // image memory read port
  output logic              mem_req,
  output logic [MEM_AW-1:0] mem_addr,
  input  logic [WORD_W-1:0] mem_rdata
);

  // ---------------- generic RPU table fill ----------------
  logic [N_LUT-1:0] ld_we;
  logic [SEL_W-1:0] ld_addr;
  lut_row_t         ld_data;
  logic             tables_ready;

  toffoli_table_loader u_loader (
    .clk(clk), .rst_n(rst_n),
    .row_we(ld_we), .row_addr(ld_addr), .row_data(ld_data), .ready(tables_ready)
  );

  // ---------------- sequencer ----------------
  logic              run_q;
  logic [ADDR_W-1:0] cnt_q;
  logic [MEM_AW-1:0] base_q;
  logic              accept;

  assign ready  = tables_ready && !run_q;
  assign accept = start && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      cnt_q  <= '0;
      base_q <= '0;
    end else if (accept) begin
      run_q  <= 1'b1;
      cnt_q  <= '0;
      base_q <= start_addr;
    end else if (run_q) begin
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == ADDR_W'(IMAGE_WORDS - 1)) run_q <= 1'b0;
    end
  end

  assign mem_req  = run_q;
  assign mem_addr = base_q + MEM_AW'(cnt_q);

  // ---------------- stage 0: pi_d ----------------
  logic [ADDR_W-1:0] pd;

  rpu_secret u_pi_d (
    .clk(clk), .rst_n(rst_n),
    .embed_we(embed_we), .embed_lut(embed_lut), .embed_table(embed_table),
    .embed_xchg_we(embed_xchg_we), .embed_xchg(embed_xchg),
    .embed_lock(embed_lock), .locked(locked),
    .a(cnt_q), .p(pd)
  );

  logic              v1_q, last1_q;
  logic [ADDR_W-1:0] pd_q;

  // ---------------- stage 1: pi_v ----------------
  logic [ADDR_W-1:0] pv;

  rpu #(.ROWS(CFG_ROWS)) u_pi_v (
    .clk(clk), .rst_n(rst_n),
    .cfg_load(accept), .cfg_i(challenge),
    .row_we(ld_we), .row_addr(ld_addr), .row_data(ld_data),
    .a(pd_q), .p(pv)
  );

  logic              v2_q, last2_q;
  logic [ADDR_W-1:0] pv_q;
  logic [WORD_W-1:0] mdata_q;
  logic [WORD_W-1:0] term;

  assign term = mdata_q ^ WORD_W'(pv_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q    <= 1'b0;
      last1_q <= 1'b0;
      pd_q    <= '0;
      v2_q    <= 1'b0;
      last2_q <= 1'b0;
      pv_q    <= '0;
      mdata_q <= '0;
      hash    <= '0;
      done    <= 1'b0;
    end else begin
      v1_q    <= run_q;
      last1_q <= run_q && (cnt_q == ADDR_W'(IMAGE_WORDS - 1));
      pd_q    <= pd;
      v2_q    <= v1_q;
      last2_q <= last1_q;
      pv_q    <= pv;
      mdata_q <= mem_rdata;
      done    <= v2_q && last2_q;
      // stage 2: accumulate
      if (accept)    hash <= '0;
      else if (v2_q) hash <= hash + {{(HASH_W-WORD_W){term[WORD_W-1]}}, term};
    end
  end

  // a start request is only legal while the engine is ready
  a_start_ready : assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);

endmodule
