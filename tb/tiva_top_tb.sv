// tiva_top_tb: end-to-end TIVA verification at full size (1024-word image,
// 39-bit challenges), with the vendor, the device image memory and the
// verifier's obfuscated image played by the testbench.
//
// The vendor picks a random pi_d, embeds and locks it in the device and hands
// the verifier M_obf with M_obf[pi_d(i)] = M[start + i]. Then:
//   honest   - random challenges, including all-zero and all-one exchanger
//              bits, must pass with a response time of IMAGE_WORDS + 3 clocks;
//   locked   - a rewrite of pi_d after the lock must have no effect;
//   tampered - one altered image word must fail the hash check;
//   late     - a time limit below the device's response time must fail;
//   impostor - after a reset, a device holding a different pi_d must fail.
// Each of these is counted and must happen at least once.
module tiva_top_tb;
  import tiva_pkg::*;
  import tiva_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int MEMW = 4096;

  logic        embed_we, embed_xchg_we, embed_lock, dev_locked;
  logic [2:0]  embed_lut, embed_xchg;
  lut_row_t    embed_table;
  logic        dev_mem_req, obf_req;
  logic [29:0] dev_mem_addr;
  logic [9:0]  obf_addr;
  logic [31:0] dev_mem_rdata, obf_rdata;
  logic        ver_ready, ver_start, ver_done, ver_pass, ver_hash_ok, ver_time_ok;
  rpu_cfg_t    ver_challenge;
  logic [29:0] ver_start_addr;
  logic [31:0] ver_t_max, ver_resp_cycles;
  logic [63:0] ver_ref_hash, dev_hash;

  tiva_top dut (.*);

  logic [31:0] mem [MEMW];
  logic [31:0] obf [1024];
  always_ff @(posedge clk) if (dev_mem_req) dev_mem_rdata <= mem[dev_mem_addr[11:0]];
  always_ff @(posedge clk) if (obf_req) obf_rdata <= obf[obf_addr];

  int n_fill = 0, n_pass = 0, n_lock = 0, n_tamper = 0, n_late = 0, n_impostor = 0;
  int n_xchg0 = 0, n_xchg1 = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int         rows_d[6];
  logic [2:0] xd;
  logic [29:0] base;

  task automatic embed(input int rows[6], input logic [2:0] bits, input logic lock);
    for (int k = 0; k < 6; k++) begin
      @(negedge clk) embed_we = 1; embed_lut = 3'(k); embed_table = table_ref(rows[k]);
    end
    @(negedge clk) embed_we = 0; embed_xchg_we = 1; embed_xchg = bits;
    @(negedge clk) embed_xchg_we = 0; embed_lock = lock;
    @(negedge clk) embed_lock = 0;
  endtask

  // vendor: obfuscated image of the walked region for the verifier
  task automatic make_obf();
    for (int i = 0; i < 1024; i++) obf[rpu_ref(rows_d, xd, 10'(i))] = mem[base + 30'(i)];
  endtask

  task automatic verify(input rpu_cfg_t c, input int tlim, output logic ok,
                        output logic h_ok, output logic t_ok, output int rc);
    int rows_v[6];
    logic [63:0] e;
    for (int k = 0; k < 6; k++) rows_v[k] = int'(c.sel[k]);
    e = '0;
    for (int j = 0; j < 1024; j++) e += term_ref(obf[j], rpu_ref(rows_v, c.xchg, 10'(j)));
    while (!ver_ready) @(negedge clk);
    ver_start = 1; ver_challenge = c; ver_start_addr = base; ver_t_max = 32'(tlim);
    @(negedge clk) ver_start = 0;
    while (!ver_done) @(negedge clk);
    check(ver_ref_hash == e, "verifier hash matches the reference");
    if (c.xchg == 3'b000) n_xchg0++;
    if (c.xchg == 3'b111) n_xchg1++;
    ok = ver_pass; h_ok = ver_hash_ok; t_ok = ver_time_ok; rc = int'(ver_resp_cycles);
  endtask

  initial begin
    logic ok, h_ok, t_ok;
    int   rc, w, rows_x[6];
    rpu_cfg_t c;
    embed_we = 0; embed_xchg_we = 0; embed_lock = 0; embed_lut = 0; embed_xchg = 0;
    embed_table = '0; ver_start = 0; ver_challenge = '0; ver_start_addr = '0; ver_t_max = 0;
    foreach (mem[i]) mem[i] = $urandom;
    base = 30'($urandom_range(0, MEMW - 1024));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    w = 0;
    while (!ver_ready) begin @(negedge clk); w++; end
    check(w == 64, $sformatf("permutation tables filled after %0d clocks", w));
    if (w == 64) n_fill++;

    foreach (rows_d[k]) rows_d[k] = int'($urandom_range(0, 54));
    xd = 3'($urandom);
    embed(rows_d, xd, 1'b1);
    check(dev_locked, "pi_d locked");
    make_obf();

    // honest device
    for (int n = 0; n < 4; n++) begin
      c = {$urandom, $urandom};
      if (n == 0) c.xchg = 3'b000;
      if (n == 1) c.xchg = 3'b111;
      verify(c, 1100, ok, h_ok, t_ok, rc);
      check(ok && h_ok && t_ok, $sformatf("honest run %0d passes", n));
      check(rc == 1027, $sformatf("honest run %0d response time %0d, expected 1027", n, rc));
      if (ok) n_pass++;
    end

    // rewrite attempt after the lock
    foreach (rows_x[k]) rows_x[k] = (rows_d[k] + 1) % 55;
    embed(rows_x, ~xd, 1'b0);
    verify({$urandom, $urandom}, 1100, ok, h_ok, t_ok, rc);
    check(ok, "locked pi_d unchanged by rewrite");
    if (ok) n_lock++;

    // tampered image
    w = $urandom_range(0, 1023);
    mem[base + 30'(w)] ^= 32'h8000_0001;
    verify({$urandom, $urandom}, 1100, ok, h_ok, t_ok, rc);
    check(!ok && !h_ok && t_ok, "tampered image fails the hash check");
    if (!h_ok) n_tamper++;
    mem[base + 30'(w)] ^= 32'h8000_0001;

    // response slower than allowed
    verify({$urandom, $urandom}, 1000, ok, h_ok, t_ok, rc);
    check(!ok && !t_ok, "late response fails the time check");
    if (!t_ok) n_late++;

    // impostor: a device holding another pi_d
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    check(!dev_locked, "lock cleared by reset");
    embed(rows_x, ~xd, 1'b1);
    verify({$urandom, $urandom}, 1100, ok, h_ok, t_ok, rc);
    check(!ok && !h_ok, "device with a different pi_d fails");
    if (!h_ok) n_impostor++;

    $display("mechanisms: fill=%0d pass=%0d lock=%0d tamper=%0d late=%0d impostor=%0d xchg0=%0d xchg1=%0d",
             n_fill, n_pass, n_lock, n_tamper, n_late, n_impostor, n_xchg0, n_xchg1);
    check(n_fill > 0, "table fill seen");
    check(n_pass > 0, "passing verification seen");
    check(n_lock > 0, "lock seen");
    check(n_tamper > 0, "tamper detection seen");
    check(n_late > 0, "late rejection seen");
    check(n_impostor > 0, "impostor detection seen");
    check(n_xchg0 > 0 && n_xchg1 > 0, "both exchanger settings seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
