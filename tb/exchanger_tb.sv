// exchanger_tb: checks the conditional swap for the three widths used in the
// permutation network (3, 2 and 5 bits) with random data and both settings.
module exchanger_tb;
  int checks = 0, failures = 0;
  logic       x;
  logic [4:0] a5, b5, c5, d5;
  logic [2:0] a3, b3, c3, d3;
  logic [1:0] a2, b2, c2, d2;

  exchanger #(.W(5)) u5 (.x(x), .s0_i(a5), .s1_i(b5), .s0_o(c5), .s1_o(d5));
  exchanger #(.W(3)) u3 (.x(x), .s0_i(a3), .s1_i(b3), .s0_o(c3), .s1_o(d3));
  exchanger #(.W(2)) u2 (.x(x), .s0_i(a2), .s1_i(b2), .s0_o(c2), .s1_o(d2));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%0b", what, x);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      x  = n[0];
      a5 = 5'($urandom); b5 = 5'($urandom);
      a3 = 3'($urandom); b3 = 3'($urandom);
      a2 = 2'($urandom); b2 = 2'($urandom);
      #1;
      if (!x) begin
        check(c5 == a5 && d5 == b5, "W5 pass");
        check(c3 == a3 && d3 == b3, "W3 pass");
        check(c2 == a2 && d2 == b2, "W2 pass");
      end else begin
        check(c5 == b5 && d5 == a5, "W5 swap");
        check(c3 == b3 && d3 == a3, "W3 swap");
        check(c2 == b2 && d2 == a2, "W2 swap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
