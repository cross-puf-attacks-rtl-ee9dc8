`timescale 1ps/1ps
// tb_drill_reg: drives a 2-lane DRILL register through init/capture
// sequences like the controller does, plus random mixtures, and compares
// resp and decoy with a testbench model. It counts the transitions the
// countermeasure is about: after a random preset exactly one flip-flop of a
// lane switches at capture, and both 0->1 and 1->0 switches occur.
module tb_drill_reg;
  localparam int W = 2;
  logic clk = 0, rst_n, init, cap_en;
  logic [W-1:0] rnd, q, q_n, resp, decoy, m_resp, m_decoy, p_resp, p_decoy;
  int checks = 0, failures = 0;
  int rise = 0, fall = 0, one_switch = 0, captures = 0;

  drill_reg #(.W(W)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cycle(input logic i, input logic [W-1:0] r, input logic c, input logic [W-1:0] d);
    @(negedge clk);
    init = i; rnd = r; cap_en = c; q = d; q_n = ~d;
    p_resp = resp; p_decoy = decoy;
    @(posedge clk);
    if (i) begin m_resp = r; m_decoy = r; end
    else if (c) begin m_resp = d; m_decoy = ~d; end
    #1;
    check(resp == m_resp && decoy == m_decoy,
          $sformatf("init=%b rnd=%b cap=%b q=%b -> resp=%b decoy=%b exp %b %b",
                    i, r, c, d, resp, decoy, m_resp, m_decoy));
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; init = 0; cap_en = 0; rnd = '0; q = '0; q_n = '1;
    m_resp = '0; m_decoy = '0;
    #12_000;
    check(resp == '0 && decoy == '0, "reset");
    rst_n = 1;
    // Controller-like sequences: preset, then capture.
    for (int k = 0; k < 300; k++) begin
      cycle(1'b1, W'($urandom), 1'b0, W'($urandom));
      cycle(1'b0, '0, 1'b1, W'($urandom));
      captures++;
      for (int l = 0; l < W; l++) begin
        int sw;
        sw = int'(resp[l] != p_resp[l]) + int'(decoy[l] != p_decoy[l]);
        if (sw == 1) one_switch++;
        if ((resp[l] && !p_resp[l]) || (decoy[l] && !p_decoy[l])) rise++;
        if ((!resp[l] && p_resp[l]) || (!decoy[l] && p_decoy[l])) fall++;
      end
      check(decoy == ~resp, "dual rail after capture");
    end
    check(one_switch == captures * W, $sformatf("one flip-flop switches per lane: %0d of %0d", one_switch, captures * W));
    check(rise > 0 && fall > 0, "both 0->1 and 1->0 switches seen");
    // Random mixtures, including init and capture together (init wins).
    for (int k = 0; k < 300; k++)
      cycle(1'($urandom), W'($urandom), 1'($urandom), W'($urandom));
    $display("rise=%0d fall=%0d", rise, fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
