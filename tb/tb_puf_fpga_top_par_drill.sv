`timescale 1ps/1ps
// tb_puf_fpga_top_par_drill: end-to-end test of the 2-bit parallel PUF
// with DRILL (two 64-stage lanes sharing the challenge, PUF-1 placement).
//
// Same host model and checks as tb_puf_fpga_top; the UART runs at 16 system
// clocks per bit to shorten the run. With two lanes every one of the four
// response values 00, 01, 10, 11 must occur.
module tb_puf_fpga_top_par_drill;
  import apuf_ref_pkg::*;

  localparam int unsigned N   = 64;
  localparam int unsigned NP  = 2;
  localparam bit          DR  = 1'b1;
  localparam int unsigned PL  = 1;
  localparam int unsigned CPB = 16;
  localparam int unsigned NQ  = 48;
  localparam int unsigned NB  = (N + 7) / 8;

  logic clk48 = 0, rst_n, uart_rxd, uart_txd, noise_en, pll_locked, puf_busy;
  logic [17:0] noise_pins;
  logic [NP-1:0] decoy;

  puf_fpga_top #(.NUM_PUF(NP), .DRILL(DR), .PLACEMENT(PL), .CLKS_PER_BIT(CPB)) dut (.*);

  always #10417 clk48 = ~clk48;

  int checks = 0, failures = 0;
  int n_set = 0, n_reset = 0, n_rise = 0, n_fall = 0, n_resp1 = 0, n_resp0 = 0;
  int n_onecycle = 0, n_noise_toggle = 0;
  int seen_val [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(64'd100_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ internal observation
  logic [NP-1:0] exp_resp;        // expected response of the current query
  logic          exp_valid = 0;
  int            sys_cyc = 0, t_trig = -10, t_init = -10;
  logic          trig_d = 0;
  logic [NP-1:0] resp_prev, decoy_prev;

  always @(posedge dut.clk_sys) begin
    sys_cyc++;
    #1;
    // State right after this edge.
    if (dut.trigger && !trig_d) t_trig = sys_cyc;
    trig_d = dut.trigger;
    if (sys_cyc == t_init + 1 && DR) begin
      check(dut.resp == decoy, "preset: resp and decoy equal");
      for (int l = 0; l < NP; l++) if (dut.resp[l]) n_set++; else n_reset++;
    end
    if (sys_cyc == t_trig + 1 && exp_valid) begin
      check(dut.resp == exp_resp, $sformatf("response registered one cycle after trigger: %b vs %b",
                                            dut.resp, exp_resp));
      if (dut.resp == exp_resp) n_onecycle++;
      if (DR) begin
        check(decoy == ~dut.resp, "decoy is complement after capture");
        for (int l = 0; l < NP; l++) begin
          check((dut.resp[l] != resp_prev[l]) != (decoy[l] != decoy_prev[l]),
                "exactly one flip-flop of the pair switched");
          if ((dut.resp[l] && !resp_prev[l]) || (decoy[l] && !decoy_prev[l])) n_rise++;
          if ((!dut.resp[l] && resp_prev[l]) || (!decoy[l] && decoy_prev[l])) n_fall++;
        end
      end
    end
    if (dut.reg_init || (!DR && dut.prng_step)) t_init = sys_cyc;
    resp_prev  = dut.resp;
    decoy_prev = decoy;
  end

  // ------------------------------------------------------------ host UART
  task automatic host_send(input logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(posedge dut.clk_sys);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge dut.clk_sys); end
    uart_rxd = 1; repeat (CPB) @(posedge dut.clk_sys);
  endtask

  task automatic host_recv(output logic [7:0] b);
    wait (uart_txd == 0);
    repeat (CPB / 2) @(posedge dut.clk_sys);
    check(uart_txd == 0, "response start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge dut.clk_sys);
      b[i] = uart_txd;
    end
    repeat (CPB) @(posedge dut.clk_sys);
    check(uart_txd == 1, "response stop bit");
  endtask

  // ---------------------------------------------------------------- noise
  logic [17:0] np_prev;
  always @(posedge clk48) begin
    if (noise_en && noise_pins != np_prev && np_prev != 0) n_noise_toggle++;
    np_prev <= noise_pins;
  end

  initial begin
    logic [N-1:0] ch;
    logic [7:0] rb;
    longint t0, t1;
    foreach (seen_val[v]) seen_val[v] = 0;
    rst_n = 0; uart_rxd = 1; noise_en = 0;
    #1_000_000; rst_n = 1;
    wait (pll_locked);
    @(posedge dut.clk_sys); t0 = $time;
    repeat (16) @(posedge dut.clk_sys); t1 = $time;
    check((t1 - t0) / 16 > 313_000 && (t1 - t0) / 16 < 314_500,
          $sformatf("system clock period %0d ps", (t1 - t0) / 16));
    repeat (10) @(posedge dut.clk_sys);
    for (int k = 0; k < NQ; k++) begin
      // Challenges on which a lane's race ties are skipped: the arbiter's
      // decision is then arbitrary.
      do begin
        bit any_tie;
        ch = N'({$urandom, $urandom, $urandom, $urandom});
        any_tie = 0;
        for (int l = 0; l < NP; l++) any_tie |= is_tie(apuf_pkg::lane_seed(PL, l), N, 256'(ch));
        if (!any_tie) break;
      end while (1);
      noise_en = (k >= NQ / 2);
      for (int l = 0; l < NP; l++)
        exp_resp[l] = expected_resp(apuf_pkg::lane_seed(PL, l), N, 256'(ch));
      exp_valid = 1;
      for (int b = 0; b < NB; b++) host_send(ch[8*b +: 8]);
      host_recv(rb);
      check(rb == 8'(exp_resp), $sformatf("query %0d: response byte %h expected %h", k, rb, 8'(exp_resp)));
      for (int l = 0; l < NP; l++) if (exp_resp[l]) n_resp1++; else n_resp0++;
      seen_val[int'(exp_resp)]++;
      check(!puf_busy || uart_txd, "controller idle after the response");
    end
    noise_en = 0;
    repeat (4) @(posedge clk48);
    np_prev = noise_pins;
    repeat (50) @(posedge clk48);
    check(noise_pins == np_prev, "noise pins hold while disabled");
    $display("queries=%0d one-cycle=%0d set=%0d reset=%0d rise=%0d fall=%0d resp1=%0d resp0=%0d noise=%0d",
             NQ, n_onecycle, n_set, n_reset, n_rise, n_fall, n_resp1, n_resp0, n_noise_toggle);
    check(n_onecycle == NQ, "every response registered one cycle after its trigger");
    if (DR) begin
      check(n_set > 0,   "DRILL preset to 1 happened");
      check(n_reset > 0, "DRILL preset to 0 happened");
      check(n_rise > 0,  "0->1 capture switch happened");
      check(n_fall > 0,  "1->0 capture switch happened");
    end
    check(n_resp1 > 0 && n_resp0 > 0, "both response values happened");
    for (int v = 0; v < (1 << NP); v++)
      check(seen_val[v] > 0, $sformatf("response value %0d happened (%0d times)", v, seen_val[v]));
    check(n_noise_toggle > 0, "noise generator toggled the pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
