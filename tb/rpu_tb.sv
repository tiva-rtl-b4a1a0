// rpu_tb: fills the six 64-row stores with the Toffoli tables, then for a
// set of random 39-bit configurations (plus the all-zero and all-exchange
// ones) checks every one of the 1024 inputs against the reference network
// and checks that the mapping is a bijection.
module rpu_tb;
  import tiva_pkg::*;
  import tiva_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_load;
  rpu_cfg_t   cfg;
  logic [5:0] row_we;
  logic [5:0] row_addr;
  lut_row_t   row_data;
  logic [9:0] a, p;

  rpu #(.ROWS(64)) dut (.clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .cfg_i(cfg),
                        .row_we(row_we), .row_addr(row_addr), .row_data(row_data),
                        .a(a), .p(p));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int       rows[6];
    bit [1023:0] hit;
    int       mism;
    cfg_load = 0; cfg = '0; row_we = 0; row_addr = 0; row_data = '0; a = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk);
      row_we = '1; row_addr = 6'(r); row_data = table_ref(r);
    end
    @(negedge clk) row_we = 0;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      if (n == 0)      cfg = '0;
      else if (n == 1) cfg = {3'b111, 36'd0};
      else             cfg = {$urandom, $urandom};
      cfg_load = 1;
      @(negedge clk) cfg_load = 0;
      for (int k = 0; k < 6; k++) rows[k] = int'(cfg.sel[k]);
      hit = '0; mism = 0;
      for (int i = 0; i < 1024; i++) begin
        a = 10'(i);
        #1;
        if (p !== rpu_ref(rows, cfg.xchg, a)) mism++;
        hit[p] = 1'b1;
      end
      check(mism == 0, $sformatf("config %0d: %0d inputs differ from reference", n, mism));
      check(&hit, $sformatf("config %0d is a bijection", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
