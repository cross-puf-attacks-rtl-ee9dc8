`timescale 1ps/1ps
// tb_lfsr_prng: checks the generator against a Fibonacci-form model of the
// same polynomial (the bit sequence leaving state[0] of the Galois LFSR
// obeys s[n+16] = s[n] ^ s[n+2] ^ s[n+3] ^ s[n+5]), that it holds without
// 'step', and that the state returns to the seed after exactly 65535 steps.
module tb_lfsr_prng;
  logic clk = 0, rst_n, step;
  logic [1:0] rnd;
  int checks = 0, failures = 0;
  bit seq [$];

  lfsr_prng #(.OUT_W(2)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] held;
    int n;
    rst_n = 0; step = 0;
    #12_000;
    rst_n = 1;
    @(negedge clk);
    check(dut.state == 16'hACE1, "seed loaded");
    held = rnd;
    repeat (5) @(negedge clk);
    check(rnd == held, "holds without step");
    step = 1;
    n = 0;
    do begin
      seq.push_back(rnd[0]);
      @(negedge clk);
      n++;
    end while (dut.state != 16'hACE1 && n < 70000);
    check(n == 65535, $sformatf("period %0d", n));
    for (int i = 0; i + 16 < seq.size(); i += 97)
      check(seq[i+16] == (seq[i] ^ seq[i+2] ^ seq[i+3] ^ seq[i+5]),
            $sformatf("recurrence at %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
