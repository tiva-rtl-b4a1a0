// xrpu_tb: runs the device checksum engine against a memory model.
// After the tables fill, it embeds and locks a random pi_d, then for several
// random challenges and start addresses checks
//   - the hash against sum sext(M[start+i] ^ pi_v(pi_d(i))) from the reference,
//   - the same hash against the verifier's view, sum sext(M_obf[j] ^ pi_v(j))
//     with M_obf[pi_d(i)] = M[start+i],
//   - the latency, IMAGE_WORDS + 3 clocks from start to done,
//   - that one altered word changes the hash.
module xrpu_tb;
  import tiva_pkg::*;
  import tiva_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int MEMW = 4096;

  logic        we, xwe, lock, locked, ready, start, done, mem_req;
  logic [2:0]  lut, xb;
  lut_row_t    tbl;
  logic [29:0] start_addr, mem_addr;
  rpu_cfg_t    chal;
  logic [63:0] hash;
  logic [31:0] mem_rdata;
  logic [31:0] mem [MEMW];

  xrpu dut (.clk(clk), .rst_n(rst_n), .embed_we(we), .embed_lut(lut), .embed_table(tbl),
            .embed_xchg_we(xwe), .embed_xchg(xb), .embed_lock(lock), .locked(locked),
            .ready(ready), .start(start), .start_addr(start_addr), .challenge(chal),
            .done(done), .hash(hash), .mem_req(mem_req), .mem_addr(mem_addr),
            .mem_rdata(mem_rdata));

  // image memory: one clock read latency
  always_ff @(posedge clk) if (mem_req) mem_rdata <= mem[mem_addr[11:0]];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int         rows_d[6];
  logic [2:0] xd;

  function automatic logic [9:0] pi_d(input logic [9:0] i);
    return rpu_ref(rows_d, xd, i);
  endfunction

  task automatic run(input rpu_cfg_t c, input logic [29:0] base, output logic [63:0] h,
                     output int lat);
    int t0;
    while (!ready) @(negedge clk);
    start = 1; chal = c; start_addr = base;
    t0 = 0;
    @(negedge clk) start = 0; chal = '0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    h = hash;
  endtask

  initial begin
    int          rows_v[6];
    logic [63:0] h, e_dev, e_ver, h_prev;
    logic [31:0] obf [1024];
    logic [29:0] base;
    int          lat, waited;
    rpu_cfg_t    c;
    we = 0; xwe = 0; lock = 0; lut = 0; xb = 0; tbl = '0; start = 0; chal = '0;
    start_addr = '0;
    foreach (mem[i]) mem[i] = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    waited = 0;
    while (!ready) begin @(negedge clk); waited++; end
    check(waited == 64, $sformatf("tables ready after 64 clocks, got %0d", waited));
    // embed pi_d
    foreach (rows_d[k]) rows_d[k] = int'($urandom_range(0, 54));
    xd = 3'($urandom);
    for (int k = 0; k < 6; k++) begin
      @(negedge clk) we = 1; lut = 3'(k); tbl = table_ref(rows_d[k]);
    end
    @(negedge clk) we = 0; xwe = 1; xb = xd;
    @(negedge clk) xwe = 0; lock = 1;
    @(negedge clk) lock = 0;
    check(locked, "pi_d locked");
    h_prev = '0;
    for (int n = 0; n < 5; n++) begin
      c = {$urandom, $urandom};
      base = 30'($urandom_range(0, MEMW - 1024));
      for (int k = 0; k < 6; k++) rows_v[k] = int'(c.sel[k]);
      e_dev = '0;
      for (int i = 0; i < 1024; i++)
        e_dev += term_ref(mem[base + i], rpu_ref(rows_v, c.xchg, pi_d(10'(i))));
      for (int i = 0; i < 1024; i++) obf[pi_d(10'(i))] = mem[base + i];
      e_ver = '0;
      for (int j = 0; j < 1024; j++) e_ver += term_ref(obf[j], rpu_ref(rows_v, c.xchg, 10'(j)));
      run(c, base, h, lat);
      check(h == e_dev, $sformatf("run %0d hash %h expected %h", n, h, e_dev));
      check(h == e_ver, $sformatf("run %0d hash equals verifier sum", n));
      check(lat == 1027, $sformatf("run %0d latency %0d, expected 1027", n, lat));
      check(h != h_prev, $sformatf("run %0d hash differs from previous challenge", n));
      h_prev = h;
      // tamper with one word of the walked region
      mem[base + 30'($urandom_range(0, 1023))] ^= 32'h0000_0100;
      run(c, base, h, lat);
      check(h != e_dev, $sformatf("run %0d altered image detected", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
