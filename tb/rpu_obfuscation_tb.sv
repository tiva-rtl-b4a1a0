// rpu_obfuscation_tb: the permutation-quality experiments, run on the RPU RTL
// with a reduced number of random configurations.
//
// For each random 39-bit configuration the RPU is evaluated on all 1024
// indices. The testbench then measures
//   - bijectivity (every index hit once),
//   - obfuscation strength OS_n for n = 5..11: the percentage of the n-word
//     runs I[j..j+n-1] of an image of distinct words that no longer appear as
//     a contiguous run of the obfuscated image I_obf[pi(i)] = I[i], i.e. for
//     which pi(j+k) = pi(j)+k fails for some k < n,
//   - redundancy: how many configurations repeat the mapping of an earlier one.
// The published experiment uses 2^20 configurations; NCFG here is smaller to
// keep the run short, so redundancy is only reported. Checks: all mappings
// bijective, OS_n not decreasing with n, and OS_5 above 90 %.
module rpu_obfuscation_tb;
  import tiva_pkg::*;
  import tiva_ref_pkg::*;
  localparam int NCFG = 4096;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_load;
  rpu_cfg_t   cfg;
  logic [5:0] row_we, row_addr;
  lut_row_t   row_data;
  logic [9:0] a, p;

  rpu #(.ROWS(64)) dut (.clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .cfg_i(cfg),
                        .row_we(row_we), .row_addr(row_addr), .row_data(row_data),
                        .a(a), .p(p));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0]  pi [1024];
    bit [1023:0] hit;
    longint      kept [12];
    longint      total [12];
    real         os [12];
    logic [63:0] sig;
    int          redundant = 0, nonbij = 0;
    bit          seen [logic [63:0]];
    cfg_load = 0; cfg = '0; row_we = 0; row_addr = 0; row_data = '0; a = 0;
    for (int n = 5; n <= 11; n++) begin kept[n] = 0; total[n] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk) row_we = '1; row_addr = 6'(r); row_data = table_ref(r);
    end
    @(negedge clk) row_we = 0;
    for (int c = 0; c < NCFG; c++) begin
      @(negedge clk) cfg = {$urandom, $urandom}; cfg_load = 1;
      @(negedge clk) cfg_load = 0;
      hit = '0;
      sig = 64'hcbf2_9ce4_8422_2325;
      for (int i = 0; i < 1024; i++) begin
        a = 10'(i); #1;
        pi[i] = p; hit[p] = 1'b1;
        sig = (sig ^ 64'(p)) * 64'h0000_0100_0000_01b3;
      end
      if (!(&hit)) nonbij++;
      if (seen.exists(sig)) redundant++; else seen[sig] = 1;
      for (int n = 5; n <= 11; n++)
        for (int j = 0; j + n <= 1024; j++) begin
          bit same;
          same = 1;
          for (int k = 1; k < n; k++) if (int'(pi[j+k]) != int'(pi[j]) + k) same = 0;
          total[n]++;
          if (same) kept[n]++;
        end
    end
    check(nonbij == 0, $sformatf("%0d of %0d configurations not bijective", nonbij, NCFG));
    for (int n = 5; n <= 11; n++) begin
      os[n] = 100.0 * real'(total[n] - kept[n]) / real'(total[n]);
      $display("OS_%0d = %6.2f %%", n, os[n]);
      if (n > 5) check(os[n] >= os[n-1], $sformatf("OS_%0d not below OS_%0d", n, n-1));
    end
    check(os[5] > 90.0, "OS_5 above 90 %");
    $display("redundant mappings: %0d of %0d configurations", redundant, NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
