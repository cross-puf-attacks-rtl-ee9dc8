`timescale 1ps/1ps
// arbiter_latch: behavioural model (not synthesizable) of the S-R latch that
// arbitrates the race at the end of the arbiter-PUF chain.
//
// While both inputs are low the latch holds its last decision. The input
// whose rising edge arrives while the other input is still low wins:
// a wins -> q = 1, b wins -> q = 0. q_n is always the complement of q, which
// the DRILL decoy flip-flop stores. A later rising edge on the losing input
// changes nothing. An exact tie (both edges in the same picosecond) goes to
// whichever edge the simulator evaluates first, standing in for the
// metastability of a real latch; the document describes the
// arbiter only as an S-R latch, so the polarity (a first -> 1) and the
// hold-while-low behaviour are this design's choices.
// A reset is not part of an S-R latch; the model starts with q = 0.
module arbiter_latch (
  input  logic a,
  input  logic b,
  output logic q,
  output logic q_n
);
  logic state;

  initial state = 1'b0;
  always @(posedge a or posedge b) begin
    if (a && !b)      state <= 1'b1;
    else if (b && !a) state <= 1'b0;
  end

  assign q   = state;
  assign q_n = ~state;
endmodule
