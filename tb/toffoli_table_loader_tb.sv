// toffoli_table_loader_tb: records the writes the loader makes after reset and
// checks their number and timing, each row's truth table against the
// reference Toffoli functions, that every row is a bijection, and that the
// first 55 rows are 55 different functions.
module toffoli_table_loader_tb;
  import tiva_pkg::*;
  import tiva_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0]   we;
  logic [5:0]   addr;
  lut_row_t     data;
  logic         ready;
  logic [159:0] seen [64];
  int           nwrites = 0, cyc = 0, ready_cyc = -1;

  toffoli_table_loader dut (.clk(clk), .rst_n(rst_n), .row_we(we), .row_addr(addr),
                            .row_data(data), .ready(ready));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (we != 0) begin
      check(we == 6'h3f, "all six LUTs written together");
      seen[addr] = data;
      nwrites++;
    end
    if (ready && ready_cyc < 0) ready_cyc = cyc;
  end

  initial begin
    bit [159:0] distinct [$];
    bit         dup;
    logic [31:0] outs;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (100) @(posedge clk);
    check(nwrites == 64, $sformatf("64 writes, got %0d", nwrites));
    check(ready_cyc == 65, $sformatf("ready after 64 clocks, got %0d", ready_cyc));
    check(we == 0, "no writes once ready");
    for (int r = 0; r < 64; r++) begin
      check(seen[r] == table_ref(r), $sformatf("row %0d contents", r));
      outs = '0;
      for (int x = 0; x < 32; x++) begin
        logic [4:0] y;
        for (int j = 0; j < 5; j++) y[j] = seen[r][j*32 + x];
        outs[y] = 1'b1;
      end
      check(outs == '1, $sformatf("row %0d bijective", r));
    end
    for (int r = 0; r < 55; r++) begin
      dup = 0;
      foreach (distinct[i]) if (distinct[i] == seen[r]) dup = 1;
      check(!dup, $sformatf("row %0d distinct", r));
      distinct.push_back(seen[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
