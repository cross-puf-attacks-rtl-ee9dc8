`timescale 1ps/1ps
// apuf_switch: one switch stage of the arbiter-PUF.
//
// Two multiplexers, each one LUT in the FPGA, route the two racing edges.
// The top output follows the LUT equation (C & B) | (~C & A): with the
// challenge bit C = 0 both edges pass straight (A->A', B->B'), with C = 1
// they are crossed (B->A', A->B'). The bottom LUT is the same equation with
// A and B swapped. This follows the document's switch placement; the module
// itself is zero-delay logic, and the path delays that make the PUF work are
// added around it by the behavioural model arbiter_puf.
//
// Interface: a_i, b_i racing inputs; c_i challenge bit; a_o, b_o outputs.
// Timing: purely combinational.
module apuf_switch (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic a_o,
  output logic b_o
);
  always_comb begin
    a_o = (c_i & b_i) | (~c_i & a_i);
    b_o = (c_i & a_i) | (~c_i & b_i);
  end
endmodule
