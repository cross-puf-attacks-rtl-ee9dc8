`timescale 1ps/1ps
// tb_puf_metrics: the PUF quality measurements run on the five placements
// PUF-0 .. PUF-4 of the default 64-stage arbiter-PUF model.
//   - Uniformity: share of 1 responses per instance over NQ challenges.
//   - Uniqueness: fraction of differing responses for every pair of
//     instances fed the same challenges (ideal 50 %).
//   - Reliability: the same challenges replayed a second time; the model
//     has no noise, so every non-tied response must repeat exactly.
// Each response is also compared with the arithmetic race reference.
// Bounds are loose (uniformity and pairwise distance between 30 % and 70 %,
// mean distance between 40 % and 60 %) because the delay model is only a
// stand-in for silicon variation.
module tb_puf_metrics;
  import apuf_ref_pkg::*;

  localparam int unsigned N  = 64;
  localparam int unsigned NI = 5;
  localparam int unsigned NQ = 400;

  logic [N-1:0]  challenge;
  logic          trigger;
  logic [NI-1:0] q, q_n;

  int checks = 0, failures = 0;

  for (genvar i = 0; i < NI; i++) begin : g_inst
    arbiter_puf #(.N_STAGES(N), .SEED(apuf_pkg::lane_seed(i, 0))) u_puf (
      .challenge, .trigger, .q(q[i]), .q_n(q_n[i])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic query(input logic [N-1:0] ch, output logic [NI-1:0] r);
    challenge = ch;
    #1_000;
    trigger = 1;
    #60_000;
    r = q;
    trigger = 0;
    #60_000;
  endtask

  initial begin
    logic [N-1:0]  chs  [NQ];
    logic [NI-1:0] run1 [NQ];
    logic [NI-1:0] run2;
    logic [NI-1:0] tied [NQ];
    int ones [NI];
    int hd [NI][NI];
    int valid [NI][NI];
    int repeat_diff = 0;
    real mean_hd;
    int npairs;
    trigger = 0;
    challenge = '0;
    foreach (ones[i]) ones[i] = 0;
    foreach (hd[i, j]) begin hd[i][j] = 0; valid[i][j] = 0; end
    #200_000;
    for (int k = 0; k < NQ; k++) begin
      chs[k] = {$urandom, $urandom};
      for (int i = 0; i < NI; i++) tied[k][i] = is_tie(apuf_pkg::lane_seed(i, 0), N, 256'(chs[k]));
      query(chs[k], run1[k]);
      for (int i = 0; i < NI; i++) begin
        if (!tied[k][i])
          check(run1[k][i] == expected_resp(apuf_pkg::lane_seed(i, 0), N, 256'(chs[k])),
                $sformatf("PUF-%0d challenge %0d", i, k));
        if (run1[k][i]) ones[i]++;
      end
      for (int i = 0; i < NI; i++)
        for (int j = i + 1; j < NI; j++)
          if (!tied[k][i] && !tied[k][j]) begin
            valid[i][j]++;
            if (run1[k][i] != run1[k][j]) hd[i][j]++;
          end
    end
    // Replay for reliability.
    for (int k = 0; k < NQ; k++) begin
      query(chs[k], run2);
      for (int i = 0; i < NI; i++)
        if (!tied[k][i] && run2[i] != run1[k][i]) repeat_diff++;
    end
    check(repeat_diff == 0, $sformatf("replayed responses differ %0d times", repeat_diff));
    for (int i = 0; i < NI; i++) begin
      $display("PUF-%0d uniformity %0.1f %%", i, 100.0 * ones[i] / NQ);
      check(ones[i] > NQ * 3 / 10 && ones[i] < NQ * 7 / 10, $sformatf("PUF-%0d uniformity", i));
    end
    mean_hd = 0.0;
    npairs = 0;
    for (int i = 0; i < NI; i++)
      for (int j = i + 1; j < NI; j++) begin
        real d;
        d = 100.0 * hd[i][j] / valid[i][j];
        $display("PUF-%0d vs PUF-%0d: %0.1f %% differ", i, j, d);
        check(d > 30.0 && d < 70.0, $sformatf("uniqueness PUF-%0d/PUF-%0d", i, j));
        mean_hd += d;
        npairs++;
      end
    mean_hd = mean_hd / npairs;
    $display("mean inter-instance distance %0.2f %%", mean_hd);
    check(mean_hd > 40.0 && mean_hd < 60.0, "mean uniqueness");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
