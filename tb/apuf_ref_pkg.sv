`timescale 1ps/1ps
// apuf_ref_pkg: testbench reference for the arbiter-PUF race.
//
// It walks the two edges through the stages arithmetically, using the same
// per-path delays the model is built with (apuf_pkg::stage_delay_ps), and
// returns the arrival times at the arbiter. The response is 1 when the top
// edge arrives first. This checks the wiring of the model (straight/crossed
// switching, which delay belongs to which path, arbiter polarity) without
// running its event-driven structure.
package apuf_ref_pkg;
  import apuf_pkg::*;

  localparam int unsigned MAX_STAGES = 256;

  typedef struct {
    longint unsigned t_top;
    longint unsigned t_bot;
  } arrival_t;

  function automatic arrival_t race(input int unsigned seed,
                                    input int unsigned n,
                                    input logic [MAX_STAGES-1:0] ch);
    arrival_t r;
    longint unsigned a, b, na, nb;
    a = 0;
    b = 0;
    for (int unsigned i = 0; i < n; i++) begin
      if (!ch[i]) begin
        na = a + 64'(stage_delay_ps(seed, i, PATH_AA));
        nb = b + 64'(stage_delay_ps(seed, i, PATH_BB));
      end else begin
        na = b + 64'(stage_delay_ps(seed, i, PATH_BA));
        nb = a + 64'(stage_delay_ps(seed, i, PATH_AB));
      end
      a = na;
      b = nb;
    end
    r.t_top = a;
    r.t_bot = b;
    return r;
  endfunction

  function automatic logic expected_resp(input int unsigned seed,
                                         input int unsigned n,
                                         input logic [MAX_STAGES-1:0] ch);
    arrival_t r;
    r = race(seed, n, ch);
    return r.t_top < r.t_bot;
  endfunction

  // True when both edges arrive in the same picosecond: the arbiter's
  // decision is then arbitrary and cannot be predicted.
  function automatic bit is_tie(input int unsigned seed,
                                input int unsigned n,
                                input logic [MAX_STAGES-1:0] ch);
    arrival_t r;
    r = race(seed, n, ch);
    return r.t_top == r.t_bot;
  endfunction
endpackage
