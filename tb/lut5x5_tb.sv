// lut5x5_tb: writes random truth tables into the 64-row store and into a
// single-row instance, then checks random lookups against a copy of the
// written data, including rewrites of a row.
module lut5x5_tb;
  import tiva_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       we, we1;
  logic [5:0] row, sel;
  lut_row_t   data;
  logic [4:0] a, b, b1;
  logic [159:0] shadow [64];
  logic [159:0] shadow1;

  lut5x5 #(.ROWS(64)) dut (.clk(clk), .cfg_we(we), .cfg_row(row), .cfg_data(data),
                           .sel(sel), .a(a), .b(b));
  lut5x5 #(.ROWS(1)) dut1 (.clk(clk), .cfg_we(we1), .cfg_row(1'b0), .cfg_data(data),
                           .sel(1'b0), .a(a), .b(b1));

  function automatic logic [4:0] expect_out(input logic [159:0] t, input logic [4:0] x);
    logic [4:0] y;
    for (int j = 0; j < 5; j++) y[j] = t[j*32 + int'(x)];
    return y;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sel=%0d a=%0d", what, sel, a); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; we1 = 0; row = 0; sel = 0; a = 0; data = '0;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk);
      we = 1; row = 6'(r);
      data = {$urandom, $urandom, $urandom, $urandom, $urandom};
      shadow[r] = data;
      if (r == 7) begin we1 = 1; shadow1 = data; end else we1 = 0;
    end
    @(negedge clk); we = 0; we1 = 0;
    for (int n = 0; n < 2000; n++) begin
      sel = 6'($urandom); a = 5'($urandom);
      #1;
      check(b == expect_out(shadow[sel], a), "64-row lookup");
      check(b1 == expect_out(shadow1, a), "1-row lookup");
      if (n % 100 == 50) begin
        @(negedge clk);
        we = 1; row = 6'($urandom);
        data = {$urandom, $urandom, $urandom, $urandom, $urandom};
        shadow[row] = data;
        @(negedge clk); we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
