`timescale 1ps/1ps
// arbiter_puf: behavioural model (not synthesizable) of one arbiter-PUF:
// N_STAGES switch stages in a chain followed by an S-R latch arbiter.
//
// A rising edge on 'trigger' enters both the top (A) and bottom (B) input of
// stage 0. Each stage is an apuf_switch (straight for challenge bit 0,
// crossed for 1) whose two outputs are delayed by path_delay according to the
// path taken. The delays come from apuf_pkg::stage_delay_ps(SEED, stage,
// path), standing for the process variation and placement of this instance.
// The arbiter_latch at the end outputs q = 1 when the edge on the top path
// arrives first, q = 0 otherwise, and q_n = ~q.
//
// Interface: challenge must be stable before trigger rises. trigger is the
// "input edge"; it must return low, and stay low long enough for the falling
// edge to leave the chain (N_STAGES * max delay), before the next query.
// Timing: q settles about N_STAGES * NOMINAL_PS after the rising edge
// (32 ns for 64 stages), well within one 3.1875 MHz clock period.
// The stage structure and arbiter follow the document; the stage count and
// delay values are this design's choices.
module arbiter_puf #(
  parameter int unsigned N_STAGES = apuf_pkg::N_STAGES_DEF,
  parameter int unsigned SEED     = 1
) (
  input  logic [N_STAGES-1:0] challenge,
  input  logic                trigger,
  output logic                q,
  output logic                q_n
);
  import apuf_pkg::*;

  // top[i]/bot[i] are the inputs of stage i; index N_STAGES feeds the arbiter.
  logic [N_STAGES:0] top, bot;

  assign top[0] = trigger;
  assign bot[0] = trigger;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    logic a_sw, b_sw;

    apuf_switch u_sw (
      .a_i(top[i]), .b_i(bot[i]), .c_i(challenge[i]),
      .a_o(a_sw),   .b_o(b_sw)
    );

    path_delay #(
      .D0_PS(stage_delay_ps(SEED, i, PATH_AA)),
      .D1_PS(stage_delay_ps(SEED, i, PATH_BA))
    ) u_dly_a (.in(a_sw), .sel(challenge[i]), .out(top[i+1]));

    path_delay #(
      .D0_PS(stage_delay_ps(SEED, i, PATH_BB)),
      .D1_PS(stage_delay_ps(SEED, i, PATH_AB))
    ) u_dly_b (.in(b_sw), .sel(challenge[i]), .out(bot[i+1]));
  end

  arbiter_latch u_arb (
    .a(top[N_STAGES]), .b(bot[N_STAGES]), .q(q), .q_n(q_n)
  );
endmodule
