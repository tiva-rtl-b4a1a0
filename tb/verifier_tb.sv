// verifier_tb: drives the verifier with an obfuscated-image memory model and a
// scripted device that answers each challenge after a chosen number of
// clocks with a chosen hash. It checks the verifier's own hash against the
// reference, that the challenge (configuration and start address) is passed
// on unchanged, that it waits for dev_ready, the pass-phase timing
// (challenge IMAGE_WORDS + 2 clocks after start), the measured response time,
// and the verdicts for a correct answer, a wrong hash and a late answer.
module verifier_tb;
  import tiva_pkg::*;
  import tiva_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ready, start, obf_req, dev_ready, chal_valid, resp_valid;
  logic        done, pass, hash_ok, time_ok;
  rpu_cfg_t    chal, chal_cfg;
  logic [29:0] start_addr, chal_addr;
  logic [31:0] t_max, resp_cycles, obf_rdata;
  logic [9:0]  obf_addr;
  logic [63:0] resp_hash, ref_hash;
  logic [31:0] obf [1024];

  verifier dut (.clk(clk), .rst_n(rst_n), .ready(ready), .start(start), .challenge(chal),
                .start_addr(start_addr), .t_max(t_max), .obf_req(obf_req),
                .obf_addr(obf_addr), .obf_rdata(obf_rdata), .dev_ready(dev_ready),
                .chal_valid(chal_valid), .chal_cfg(chal_cfg), .chal_addr(chal_addr),
                .resp_valid(resp_valid), .resp_hash(resp_hash), .done(done), .pass(pass),
                .hash_ok(hash_ok), .time_ok(time_ok), .resp_cycles(resp_cycles),
                .ref_hash(ref_hash));

  always_ff @(posedge clk) if (obf_req) obf_rdata <= obf[obf_addr];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one verification; the device answers `delay` clocks after the challenge
  // with expected hash xor `corrupt`; dev_ready is held low for `busy` clocks
  task automatic verify(input int delay, input logic [63:0] corrupt, input int tlim,
                        input int busy, input string name);
    rpu_cfg_t    c;
    logic [29:0] base;
    logic [63:0] exp_h;
    int          rows[6], t_chal, t, t_done;
    c = {$urandom, $urandom};
    base = 30'($urandom);
    for (int k = 0; k < 6; k++) rows[k] = int'(c.sel[k]);
    exp_h = '0;
    for (int j = 0; j < 1024; j++) exp_h += term_ref(obf[j], rpu_ref(rows, c.xchg, 10'(j)));
    while (!ready) @(negedge clk);
    dev_ready = (busy == 0);
    start = 1; chal = c; start_addr = base; t_max = 32'(tlim);
    t = 0;
    @(negedge clk) start = 0; chal = '0; start_addr = '0;
    t_chal = -1;
    while (t_chal < 0) begin
      t++;
      if (t == 1026 + busy) dev_ready = 1;
      #1;
      if (chal_valid) t_chal = t;
      @(negedge clk);
    end
    check(t_chal == 1026 + busy, $sformatf("%s: challenge at %0d, expected %0d", name, t_chal, 1026 + busy));
    check(chal_cfg == c && chal_addr == base, {name, ": challenge passed on"});
    check(ref_hash == exp_h, $sformatf("%s: ref hash %h expected %h", name, ref_hash, exp_h));
    dev_ready = 0;
    t = 0; t_done = -1;
    while (t_done < 0 && t < 5000) begin
      t++;
      resp_valid = (t == delay);
      resp_hash  = exp_h ^ corrupt;
      @(negedge clk);
      if (done) t_done = t;
    end
    resp_valid = 0;
    dev_ready = 1;
    if (delay <= tlim) begin
      check(t_done == delay, $sformatf("%s: verdict after %0d", name, t_done));
      check(resp_cycles == 32'(delay), $sformatf("%s: resp_cycles %0d expected %0d", name, resp_cycles, delay));
      check(time_ok, {name, ": in time"});
      check(hash_ok == (corrupt == 0), {name, ": hash verdict"});
      check(pass == (corrupt == 0), {name, ": pass verdict"});
    end else begin
      check(t_done == tlim + 1, $sformatf("%s: gave up after %0d", name, t_done));
      check(!time_ok && !pass, {name, ": late answer rejected"});
    end
  endtask

  initial begin
    start = 0; chal = '0; start_addr = '0; t_max = 0; dev_ready = 1; resp_valid = 0;
    resp_hash = '0;
    foreach (obf[i]) obf[i] = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    verify(1027, 64'd0, 1100, 0, "correct");
    verify(1027, 64'h1 << $urandom_range(0, 63), 1100, 0, "wrong hash");
    verify(1200, 64'd0, 1100, 0, "late");
    verify(1027, 64'd0, 1027, 17, "device busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
