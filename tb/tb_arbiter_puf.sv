`timescale 1ps/1ps
// tb_arbiter_puf: checks the arbiter-PUF model at its default size (64
// stages) for two instances against the arithmetic race reference.
// For each random challenge: the response equals the reference; q does not
// change before the first edge reaches the arbiter and has its final value
// just after; q_n is ~q. It also checks that both instances answer both 0 and
// 1 and that they disagree on part of the challenges (different seeds act as
// different chips). When both edges arrive in the same picosecond the
// latch resolves the tie arbitrarily, like a metastable arbiter; such
// challenges are counted and their value is not checked. A watchdog ends a
// hung run.
module tb_arbiter_puf;
  import apuf_ref_pkg::*;

  localparam int unsigned N = 64;
  localparam int unsigned NQ = 300;

  logic [N-1:0] challenge;
  logic         trigger;
  logic [1:0]   q, q_n;

  int checks = 0, failures = 0;
  int ones [2];
  int differ = 0;
  int ties = 0;
  bit tie [2];

  arbiter_puf #(.N_STAGES(N), .SEED(11)) dut0 (.challenge, .trigger, .q(q[0]), .q_n(q_n[0]));
  arbiter_puf #(.N_STAGES(N), .SEED(12)) dut1 (.challenge, .trigger, .q(q[1]), .q_n(q_n[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arrival_t r [2];
    logic exp [2];
    logic q_prev [2];
    longint unsigned t_first;
    ones[0] = 0; ones[1] = 0;
    trigger = 0;
    challenge = '0;
    // Let values the chain held at power-up drain out (N x max delay).
    #200_000;
    for (int k = 0; k < NQ; k++) begin
      challenge = {$urandom, $urandom};
      #1_000;
      r[0] = race(11, N, 256'(challenge));
      r[1] = race(12, N, 256'(challenge));
      exp[0] = r[0].t_top < r[0].t_bot;
      exp[1] = r[1].t_top < r[1].t_bot;
      tie[0] = r[0].t_top == r[0].t_bot;
      tie[1] = r[1].t_top == r[1].t_bot;
      q_prev = '{q[0], q[1]};
      trigger = 1;
      for (int u = 0; u < 2; u++) begin
        t_first = (r[u].t_top < r[u].t_bot) ? r[u].t_top : r[u].t_bot;
        fork
          automatic int uu = u;
          automatic longint unsigned tf = t_first;
          begin
            #(tf - 1);
            check(q[uu] == q_prev[uu], $sformatf("inst %0d q changed before the race ended", uu));
            #2;
            if (!tie[uu])
              check(q[uu] == exp[uu], $sformatf("inst %0d ch=%h q=%b exp=%b", uu, challenge, q[uu], exp[uu]));
          end
        join_none
      end
      #50_000;
      wait fork;
      for (int u = 0; u < 2; u++) begin
        if (tie[u]) ties++;
        else check(q[u] == exp[u], $sformatf("inst %0d final q", u));
        check(q_n[u] == ~q[u], $sformatf("inst %0d q_n", u));
        if (q[u]) ones[u]++;
      end
      if (q[0] != q[1]) differ++;
      trigger = 0;
      #50_000;
    end
    for (int u = 0; u < 2; u++)
      check(ones[u] > NQ / 10 && ones[u] < NQ - NQ / 10,
            $sformatf("inst %0d answered 1 %0d of %0d times", u, ones[u], NQ));
    check(differ > NQ / 10, $sformatf("instances differ on %0d of %0d", differ, NQ));
    $display("inst0 ones=%0d inst1 ones=%0d differ=%0d ties=%0d", ones[0], ones[1], differ, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
