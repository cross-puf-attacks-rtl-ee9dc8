`timescale 1ps/1ps
// clock_pll: behavioural model (not synthesizable) of the FPGA clock PLL
// that makes the system clock from the 48 MHz board clock.
//
// The output frequency is f_out = f_in * MULT / DIV_PRE / DIV_OUT, with the
// document's factors 17, 2 and 128: 48 MHz * 17 / 2 / 128 = 3.1875 MHz. The
// model measures the input period from successive rising edges; once
// LOCK_CYCLES consecutive periods agree it raises 'locked' and starts
// toggling clk_out with half period T_in * DIV_PRE * DIV_OUT / (2 * MULT),
// rounded down to a picosecond. rst (active high, like the FPGA primitive)
// drops lock and stops the output. Phase alignment, jitter and the
// VCO itself are not modelled; the lock criterion is this design's choice.
module clock_pll #(
  parameter int unsigned MULT        = 17,
  parameter int unsigned DIV_PRE     = 2,
  parameter int unsigned DIV_OUT     = 128,
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  output logic locked
);
  // Declaration initialisers take effect before any process runs, so the
  // oscillator below never sees an unset half period.
  longint unsigned last_edge = 0;
  longint unsigned period    = 0;
  longint unsigned half_out  = 0;
  int unsigned     stable    = 0;
  logic            lock_q    = 1'b0;

  assign locked = lock_q;

  always @(posedge clk_in or posedge rst) begin
    if (rst) begin
      lock_q <= 1'b0;
      stable <= 0;
      period <= 0;
    end else begin
      last_edge <= $time;
      if (last_edge != 0) begin
        period <= $time - last_edge;
        if (period == $time - last_edge) begin
          if (stable >= LOCK_CYCLES) begin
            lock_q   <= 1'b1;
            half_out <= (period * DIV_PRE * DIV_OUT) / (2 * MULT);
          end else begin
            stable <= stable + 1;
          end
        end else begin
          stable <= 0;
          lock_q <= 1'b0;
        end
      end
    end
  end

  // Free-running output oscillator, gated off while unlocked.
  logic clk_osc = 1'b0;

  always begin
    if (!lock_q || half_out == 0) begin
      clk_osc = 1'b0;
      wait (lock_q && half_out != 0);
    end
    #(half_out) clk_osc = ~clk_osc;
  end

  assign clk_out = clk_osc & locked;
endmodule
