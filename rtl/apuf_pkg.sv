`timescale 1ps/1ps
// apuf_pkg: constants and the delay-variation function shared by the
// arbiter-PUF model, the system top and the testbenches.
//
// The arbiter-PUF is a race between two copies of one rising edge through a
// chain of switch stages. Its response depends only on which copy reaches the
// arbiter first. In silicon the per-path delays come from manufacturing
// variation and from placement; here they come from stage_delay_ps(), a
// deterministic hash of (instance seed, stage, path). A different seed stands
// for a different chip or a different placement of the same hard macro.
//
// Path numbering inside one stage (see apuf_switch):
//   PATH_AA : A_i -> A_i+1 (straight, C=0)   PATH_BB : B_i -> B_i+1 (straight, C=0)
//   PATH_BA : B_i -> A_i+1 (crossed,  C=1)   PATH_AB : A_i -> B_i+1 (crossed,  C=1)
// The stage count N, the nominal delay and the spread are this design's own
// choices; the document does not give them.
package apuf_pkg;

  // Number of switch stages (challenge bits) of one arbiter-PUF.
  parameter int unsigned N_STAGES_DEF = 64;

  // Nominal LUT-plus-routing delay of one path through one switch, and the
  // half-width of the uniform spread around it, both in picoseconds.
  parameter int unsigned NOMINAL_PS = 500;
  parameter int unsigned SPREAD_PS  = 40;

  typedef enum logic [1:0] {
    PATH_AA = 2'd0,
    PATH_BB = 2'd1,
    PATH_BA = 2'd2,
    PATH_AB = 2'd3
  } path_e;

  // 32-bit integer mixer (multiply/xor-shift avalanche). Any fixed mixer would
  // do; it only has to spread nearby inputs apart.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay in ps of one path of one stage of the PUF instance 'seed'.
  function automatic int unsigned stage_delay_ps(input int unsigned seed,
                                                 input int unsigned stage,
                                                 input path_e       path);
    logic [31:0] h;
    h = mix32(seed * 32'h9e3779b9 ^ mix32(stage * 4 + 32'(path) + 1));
    return NOMINAL_PS - SPREAD_PS + (h % (2 * SPREAD_PS + 1));
  endfunction

  // Seed of lane 'lane' of a PUF placed at 'placement' (PUF-0 .. PUF-4).
  function automatic int unsigned lane_seed(input int unsigned placement,
                                            input int unsigned lane);
    return placement * 16 + lane + 1;
  endfunction

  // Host protocol over the UART: the host sends the challenge as
  // ceil(N/8) bytes, least significant byte first; the board answers with
  // one byte holding the response bits in its low bits.
  function automatic int unsigned challenge_bytes(input int unsigned n_stages);
    return (n_stages + 7) / 8;
  endfunction

endpackage
