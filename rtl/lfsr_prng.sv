`timescale 1ps/1ps
// lfsr_prng: pseudo-random bit source for the DRILL random initialisation.
//
// A 16-bit Galois LFSR with the maximal-length polynomial
// x^16 + x^14 + x^13 + x^11 + 1 (period 65535). Each 'step' shifts it once;
// the low OUT_W state bits are the random bits, one per PUF lane. The
// document names only a pseudo random number generator; the LFSR, its
// polynomial and its seed are this design's choices.
//
// Interface: rnd is valid every cycle and changes the cycle after a step.
// rst_n (asynchronous, active low) loads SEED, which must be non-zero.
module lfsr_prng #(
  parameter int unsigned OUT_W = 1,
  parameter logic [15:0] SEED  = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  output logic [OUT_W-1:0] rnd
);
  localparam logic [15:0] TAPS = 16'hB400;

  logic [15:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= (state >> 1) ^ (state[0] ? TAPS : 16'h0000);
  end

  assign rnd = state[OUT_W-1:0];

  initial assert (SEED != 16'h0000) else $error("lfsr_prng: SEED must be non-zero");
endmodule
