// verifier: hardware verifier for TIVA challenge-response checks.
//
// The verifier holds only the obfuscated image M_obf (the image with its
// words permuted by the device's secret pi_d) and an expected response time.
// For one verification it
//   1. loads the challenge pi_v (39 configuration bits) into its own generic
//      RPU and computes ref_hash = sum over j of sext64(M_obf[j] ^ pi_v(j)),
//      one word per clock, reading M_obf through the obf_* port;
//   2. sends the challenge (configuration and start address) to the device
//      with a one-clock chal_valid pulse, once the device reports dev_ready;
//   3. counts clocks from that pulse until the device's resp_valid, and
//   4. reports hash_ok (response equals ref_hash), time_ok (response came
//      within t_max clocks) and pass = both.
// If no response has come once the count passes t_max the verifier stops
// waiting and reports a failure with time_ok = 0.
//
// Timing: the hash pass takes IMAGE_WORDS + 2 clocks; obf_rdata must follow
// obf_req by one clock. resp_cycles is measured so that a device answering
// with done k clocks after seeing the challenge gives resp_cycles = k. done
// pulses for one clock with the verdict; the verdict outputs hold until the
// next start. start is accepted only while ready.
//
// The specification leaves the verifier's form open (software model or a
// dedicated hardware unit); the state machine, the timing interface and the
// give-up rule are this design's own.
module verifier
  import tiva_pkg::*;
#(
  parameter int unsigned MEM_AW = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  // request
  output logic              ready,
  input  logic              start,
  input  rpu_cfg_t          challenge,
  input  logic [MEM_AW-1:0] start_addr,
  input  logic [31:0]       t_max,
  // obfuscated image read port
  output logic              obf_req,
  output logic [ADDR_W-1:0] obf_addr,
  input  logic [WORD_W-1:0] obf_rdata,
  // link to the device
  input  logic              dev_ready,
  output logic              chal_valid,
  output rpu_cfg_t          chal_cfg,
  output logic [MEM_AW-1:0] chal_addr,
  input  logic              resp_valid,
  input  logic [HASH_W-1:0] resp_hash,
  // verdict
  output logic              done,
  output logic              pass,
  output logic              hash_ok,
  output logic              time_ok,
  output logic [31:0]       resp_cycles,
  output logic [HASH_W-1:0] ref_hash
);

  typedef enum logic [2:0] {S_IDLE, S_HASH, S_DRAIN, S_CHAL, S_WAIT} state_e;
  state_e state_q;

  // generic RPU for pi_v
  logic [N_LUT-1:0]  ld_we;
  logic [SEL_W-1:0]  ld_addr;
  lut_row_t          ld_data;
  logic              tables_ready;
  logic [ADDR_W-1:0] cnt_q;
  logic [ADDR_W-1:0] pv;

  toffoli_table_loader u_loader (
    .clk(clk), .rst_n(rst_n),
    .row_we(ld_we), .row_addr(ld_addr), .row_data(ld_data), .ready(tables_ready)
  );

  logic accept;
  assign ready  = tables_ready && (state_q == S_IDLE);
  assign accept = start && ready;

  rpu #(.ROWS(CFG_ROWS)) u_pi_v (
    .clk(clk), .rst_n(rst_n),
    .cfg_load(accept), .cfg_i(challenge),
    .row_we(ld_we), .row_addr(ld_addr), .row_data(ld_data),
    .a(cnt_q), .p(pv)
  );

  logic              v1_q;
  logic [ADDR_W-1:0] pv_q;
  logic [WORD_W-1:0] term;
  logic [31:0]       timer_q;

  assign obf_req    = (state_q == S_HASH);
  assign obf_addr   = cnt_q;
  assign chal_valid = (state_q == S_CHAL) && dev_ready;
  assign term       = obf_rdata ^ WORD_W'(pv_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      cnt_q       <= '0;
      v1_q        <= 1'b0;
      pv_q        <= '0;
      timer_q     <= '0;
      chal_cfg    <= '0;
      chal_addr   <= '0;
      ref_hash    <= '0;
      resp_cycles <= '0;
      done        <= 1'b0;
      pass        <= 1'b0;
      hash_ok     <= 1'b0;
      time_ok     <= 1'b0;
    end else begin
      done <= 1'b0;
      v1_q <= (state_q == S_HASH);
      pv_q <= pv;
      if (v1_q) ref_hash <= ref_hash + {{(HASH_W-WORD_W){term[WORD_W-1]}}, term};
      unique case (state_q)
        S_IDLE: if (accept) begin
          state_q   <= S_HASH;
          cnt_q     <= '0;
          ref_hash  <= '0;
          chal_cfg  <= challenge;
          chal_addr <= start_addr;
          pass      <= 1'b0;
          hash_ok   <= 1'b0;
          time_ok   <= 1'b0;
        end
        S_HASH: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == ADDR_W'(IMAGE_WORDS - 1)) state_q <= S_DRAIN;
        end
        S_DRAIN: state_q <= S_CHAL;   // last term is added this clock
        S_CHAL: if (dev_ready) begin
          timer_q <= '0;
          state_q <= S_WAIT;
        end
        S_WAIT: begin
          if (resp_valid) begin
            resp_cycles <= timer_q + 1;
            hash_ok     <= (resp_hash == ref_hash);
            time_ok     <= (timer_q + 1 <= t_max);
            pass        <= (resp_hash == ref_hash) && (timer_q + 1 <= t_max);
            done        <= 1'b1;
            state_q     <= S_IDLE;
          end else if (timer_q + 1 > t_max) begin
            // too late: stop waiting
            resp_cycles <= timer_q + 1;
            hash_ok     <= 1'b0;
            time_ok     <= 1'b0;
            pass        <= 1'b0;
            done        <= 1'b1;
            state_q     <= S_IDLE;
          end else begin
            timer_q <= timer_q + 1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_start_ready : assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);

endmodule
