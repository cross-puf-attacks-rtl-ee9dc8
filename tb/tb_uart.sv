`timescale 1ps/1ps
// tb_uart: the testbench acts as the far end of the serial line.
// Receive path: it sends random bytes as 8N1 frames (and one frame with a
// bad stop bit, which must be dropped) and checks rx_data. Transmit path: it
// hands random bytes to the transmitter, decodes txd in the middle of each
// bit and checks every bit time is CLKS_PER_BIT cycles long.
module tb_uart;
  localparam int CPB = 20;
  logic clk = 0, rst_n, rxd, txd, rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;
  int checks = 0, failures = 0;
  byte unsigned rx_q [$];
  int cyc = 0;

  uart #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5000 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rx_valid) rx_q.push_back(rx_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_frame(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    #500_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    logic [7:0] b, got;
    int t0, t1;
    rst_n = 0; rxd = 1; tx_valid = 0; tx_data = 0;
    #22_000; rst_n = 1;
    repeat (5) @(posedge clk);
    // Receive path.
    for (int k = 0; k < 40; k++) begin
      b = 8'($urandom);
      if (k == 20) send_frame(8'hA5, 1'b0);   // framing error: dropped
      send_frame(b, 1'b1);
      sent.push_back(b);
    end
    repeat (5) @(posedge clk);
    check(rx_q.size() == sent.size(), $sformatf("received %0d of %0d bytes", rx_q.size(), sent.size()));
    foreach (sent[i]) if (i < rx_q.size())
      check(rx_q[i] == sent[i], $sformatf("rx byte %0d: %h vs %h", i, rx_q[i], sent[i]));
    // Transmit path.
    for (int k = 0; k < 40; k++) begin
      b = 8'($urandom);
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      tx_valid = 1; tx_data = b;
      @(negedge clk);
      tx_valid = 0;
      check(!tx_ready, "busy after accept");
      wait (txd == 0);
      t0 = cyc;
      repeat (CPB / 2) @(posedge clk);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1, "stop bit");
      check(got == b, $sformatf("tx byte %h decoded %h", b, got));
      wait (tx_ready);
      t1 = cyc;
      check(t1 - t0 >= 10 * CPB - 1 && t1 - t0 <= 10 * CPB + 1,
            $sformatf("frame length %0d cycles", t1 - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
