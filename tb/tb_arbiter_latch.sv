`timescale 1ps/1ps
// tb_arbiter_latch: races two edges with random separations and checks that
// the first one decides (a first -> q = 1), that the later edge and the
// return to low change nothing, and that q_n = ~q.
module tb_arbiter_latch;
  logic a, b, q, q_n;
  int checks = 0, failures = 0;
  int wins_a = 0, wins_b = 0;

  arbiter_latch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sep;
    bit a_first;
    logic exp;
    a = 0; b = 0;
    #1000;
    check(q == 1'b0 && q_n == 1'b1, "initial state");
    for (int k = 0; k < 200; k++) begin
      a_first = $urandom_range(0, 1);
      sep = $urandom_range(1, 300);
      exp = a_first;
      if (a_first) begin a = 1; #(sep); b = 1; end
      else         begin b = 1; #(sep); a = 1; end
      #10;
      check(q == exp, $sformatf("race %0d: a_first=%b sep=%0d q=%b", k, a_first, sep, q));
      check(q_n == ~q, "q_n complement");
      a = 0; #($urandom_range(1, 50)); b = 0;
      #100;
      check(q == exp, "holds while inputs fall");
      if (exp) wins_a++; else wins_b++;
    end
    check(wins_a > 0 && wins_b > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
