// rpu_secret_tb: embeds a random secret permutation (one Toffoli table per
// LUT and three exchanger bits), checks all 1024 inputs against the
// reference, locks it, tries to overwrite tables and exchanger bits, and
// checks the permutation has not changed; then checks that reset clears the
// lock and the exchanger bits but keeps the tables.
module rpu_secret_tb;
  import tiva_pkg::*;
  import tiva_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we, xwe, lock, locked;
  logic [2:0] lut, xb;
  lut_row_t   tbl;
  logic [9:0] a, p;

  rpu_secret dut (.clk(clk), .rst_n(rst_n), .embed_we(we), .embed_lut(lut),
                  .embed_table(tbl), .embed_xchg_we(xwe), .embed_xchg(xb),
                  .embed_lock(lock), .locked(locked), .a(a), .p(p));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic embed(input int rows[6], input logic [2:0] bits);
    for (int k = 0; k < 6; k++) begin
      @(negedge clk); we = 1; lut = 3'(k); tbl = table_ref(rows[k]);
    end
    @(negedge clk); we = 0; xwe = 1; xb = bits;
    @(negedge clk); xwe = 0;
  endtask

  task automatic compare(input int rows[6], input logic [2:0] bits, input string what);
    int mism = 0;
    bit [1023:0] hit;
    hit = '0;
    for (int i = 0; i < 1024; i++) begin
      a = 10'(i); #1;
      if (p !== rpu_ref(rows, bits, a)) mism++;
      hit[p] = 1'b1;
    end
    check(mism == 0, $sformatf("%s: %0d mismatches", what, mism));
    check(&hit, $sformatf("%s: bijection", what));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rows[6], rows2[6], rows3[6];
    logic [2:0] bits, bits3;
    we = 0; xwe = 0; lock = 0; lut = 0; xb = 0; tbl = '0; a = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (rows[k]) rows[k] = int'($urandom_range(0, 54));
    bits = 3'($urandom);
    embed(rows, bits);
    compare(rows, bits, "embedded");
    // re-embedding before the lock is allowed
    foreach (rows3[k]) rows3[k] = int'($urandom_range(0, 54));
    bits3 = ~bits;
    embed(rows3, bits3);
    compare(rows3, bits3, "re-embedded before lock");
    check(!locked, "unlocked before lock");
    @(negedge clk) lock = 1;
    @(negedge clk) lock = 0;
    check(locked, "locked");
    foreach (rows2[k]) rows2[k] = (rows3[k] + 7) % 55;
    embed(rows2, ~bits3);
    compare(rows3, bits3, "unchanged after locked write attempt");
    check(locked, "still locked");
    // reset clears the lock but keeps the tables; exchanger bits return to 0
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    check(!locked, "lock cleared by reset");
    compare(rows3, 3'b000, "tables kept over reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
