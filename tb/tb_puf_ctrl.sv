`timescale 1ps/1ps
// tb_puf_ctrl: drives the controller with challenge bytes as the UART
// receiver would deliver them and answers with a stand-in PUF (response =
// parity of the challenge, and its inverse as lane 1). For each query it
// checks the assembled challenge, the order INIT -> trigger -> capture, that
// the capture enable comes in the cycle right after the trigger rose (one
// clock from trigger to registered response), that trigger falls after the
// capture, and the byte handed to the transmitter, including a transmitter
// that is busy for a while.
module tb_puf_ctrl;
  localparam int N = 64, NP = 2;
  localparam int NB = N / 8;
  logic clk = 0, rst_n;
  logic rx_valid, tx_valid, tx_ready, trigger, reg_init, cap_en, prng_step, busy;
  logic [7:0] rx_data, tx_data;
  logic [N-1:0] challenge;
  logic [NP-1:0] resp;
  int checks = 0, failures = 0, cyc = 0;
  int t_trig, t_init, t_cap;

  puf_ctrl #(.N_STAGES(N), .NUM_PUF(NP), .DRILL(1'b1)) dut (.*);

  always #5000 clk = ~clk;
  always @(posedge clk) cyc++;

  // Stand-in response register: captures on cap_en.
  always_ff @(posedge clk)
    if (cap_en) resp <= {~(^challenge), ^challenge};

  // Event times.
  logic trig_d;
  always @(posedge clk) begin
    trig_d <= trigger;
    if (reg_init) t_init <= cyc;
    if (trigger && !trig_d) t_trig <= cyc;
    if (cap_en) t_cap <= cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ch;
    logic [7:0] exp;
    rst_n = 0; rx_valid = 0; rx_data = 0; tx_ready = 1; resp = 0; trig_d = 0;
    #22_000; rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      ch = {$urandom, $urandom};
      tx_ready = (k % 3 != 0);
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        rx_valid = 1; rx_data = ch[8*b +: 8];
        @(negedge clk);
        rx_valid = 0;
        check(b == NB - 1 || !busy, "idle while collecting");
        if (b != NB - 1) repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      // Wait for the response byte.
      fork
        begin
          repeat (5) @(posedge clk);
          #1 tx_ready = 1;
        end
      join_none
      @(negedge clk);
      while (!(tx_valid && tx_ready)) @(negedge clk);
      exp = {6'b0, ~(^ch), ^ch};
      check(challenge == ch, $sformatf("challenge %h vs %h", challenge, ch));
      check(tx_data == exp, $sformatf("response byte %h vs %h", tx_data, exp));
      check(t_trig == t_init + 1, "trigger rises the cycle after INIT");
      check(t_cap == t_trig, "capture enable in the trigger's cycle");
      check(!trigger, "trigger low again by SEND");
      @(negedge clk);
      check(!busy, "back to idle after SEND");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
