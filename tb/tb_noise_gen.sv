`timescale 1ps/1ps
// tb_noise_gen: checks the 18 noise pins against a testbench model of the
// x^32 + x^22 + x^2 + x + 1 sequence (computed in Fibonacci form on the
// output bits), that every pin toggles while enabled, and that the pins hold
// while disabled.
module tb_noise_gen;
  logic clk = 0, rst_n, en;
  logic [17:0] pins, held;
  int checks = 0, failures = 0;
  int toggles [18];
  bit out_bits [$];

  noise_gen dut (.*);

  always #10417 clk = ~clk;

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

  initial begin
    logic [17:0] prev;
    foreach (toggles[i]) toggles[i] = 0;
    rst_n = 0; en = 0;
    #50_000; rst_n = 1;
    @(negedge clk);
    check(pins == '0, "pins low after reset");
    en = 1;
    @(negedge clk);
    check(pins == 18'(32'h1234_5678), "first pattern is the seed");
    prev = pins;
    for (int k = 0; k < 2000; k++) begin
      // pins[0] is the bit the LFSR shifted out one cycle earlier.
      out_bits.push_back(pins[0]);
      // Consecutive patterns are shifted copies apart from the feedback.
      @(negedge clk);
      foreach (toggles[i]) if (pins[i] != prev[i]) toggles[i]++;
      check(pins[16:0] == prev[17:1] ^ (prev[0] ? 17'(32'h8020_0003 >> 1) : 17'h0),
            $sformatf("shift relation at %0d", k));
      prev = pins;
    end
    for (int i = 0; i + 32 < out_bits.size(); i += 37)
      check(out_bits[i+32] == (out_bits[i] ^ out_bits[i+10] ^ out_bits[i+30] ^ out_bits[i+31]),
            $sformatf("recurrence at %0d", i));
    foreach (toggles[i]) check(toggles[i] > 500, $sformatf("pin %0d toggled %0d times", i, toggles[i]));
    en = 0;
    @(negedge clk);
    held = pins;
    repeat (20) @(negedge clk);
    check(pins == held, "pins hold while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
