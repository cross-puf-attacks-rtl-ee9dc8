`timescale 1ps/1ps
// tb_clock_pll: feeds a 48 MHz clock and checks lock, that the output
// period is 48 MHz * 17 / 2 / 128 = 3.1875 MHz (313.7 ns) within 1 ps per
// half period, that a reset drops lock and stops the clock, and that it
// locks again.
module tb_clock_pll;
  localparam int HALF_IN = 10417;      // 48 MHz, rounded to 1 ps
  logic clk_in = 0, rst, clk_out, locked;
  int checks = 0, failures = 0;

  clock_pll dut (.*);

  always #(HALF_IN) clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure();
    longint t0, t1, exp;
    exp = (longint'(2 * HALF_IN) * 2 * 128) / (2 * 17) * 2;
    @(posedge clk_out); t0 = $time;
    repeat (10) @(posedge clk_out);
    t1 = $time;
    check((t1 - t0) / 10 >= exp - 2 && (t1 - t0) / 10 <= exp,
          $sformatf("output period %0d ps, expected %0d", (t1 - t0) / 10, exp));
  endtask

  initial begin
    rst = 1;
    #100_000; rst = 0;
    check(!locked, "not locked right after reset");
    wait (locked);
    check($time < 2_000_000, "locks within 2 us");
    measure();
    rst = 1;
    #1000;
    check(!locked && !clk_out, "reset drops lock and stops the clock");
    #1_000_000;
    check(!clk_out, "no clock while in reset");
    rst = 0;
    wait (locked);
    measure();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
