`timescale 1ps/1ps
// path_delay: behavioural model (not synthesizable) of the propagation delay
// of one switch output. The output follows the input after D0_PS picoseconds
// when sel = 0 and after D1_PS when sel = 1. Placed behind a switch output
// and driven by the stage's challenge bit, it gives that output the delay of
// whichever path (straight or crossed) the challenge bit selected.
// The delays stand for LUT and routing delay in the FPGA; their values are
// set by the instantiating arbiter-PUF model. Delays are inertial, which is
// enough for the single rising and falling edge of one PUF query.
module path_delay #(
  parameter int unsigned D0_PS = 500,
  parameter int unsigned D1_PS = 500
) (
  input  logic in,
  input  logic sel,
  output logic out
);
  logic d0, d1;
  assign #(D0_PS) d0 = in;
  assign #(D1_PS) d1 = in;
  assign out = sel ? d1 : d0;
endmodule
