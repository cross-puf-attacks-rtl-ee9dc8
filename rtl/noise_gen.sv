`timescale 1ps/1ps
// noise_gen: noise-inducing logic for the "noisy circuitry" experiment.
//
// Clocked by the 48 MHz board clock, it drives N_PINS external pins with
// pseudo-random values that change every cycle, so that many output drivers
// switch while the PUF operates and raise the supply noise. The pin count
// (18) and the clock follow the document; the pattern source, a 32-bit Galois
// LFSR with polynomial x^32 + x^22 + x^2 + x + 1, is this design's choice.
//
// Interface: while 'en' is high the LFSR advances every cycle and 'pins'
// shows its low N_PINS bits, registered. While 'en' is low the pins hold
// their last value. rst_n is asynchronous, active low.
module noise_gen #(
  parameter int unsigned N_PINS = 18,
  parameter logic [31:0] SEED   = 32'h1234_5678
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic [N_PINS-1:0] pins
);
  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEED;
      pins  <= '0;
    end else if (en) begin
      state <= (state >> 1) ^ (state[0] ? TAPS : 32'h0);
      pins  <= state[N_PINS-1:0];
    end
  end

  initial assert (N_PINS <= 32 && SEED != 0) else $error("noise_gen: bad parameters");
endmodule
