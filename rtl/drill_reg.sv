`timescale 1ps/1ps
// drill_reg: DRILL-protected response storage (dual-rail plus random
// initialisation), one pair of flip-flops per PUF lane.
//
// Dual rail: next to the response flip-flop that stores the arbiter output q
// sits a decoy flip-flop that stores q_n, so that every capture switches the
// same kind of load whatever the response. Random initialisation: before each
// capture a pseudo-random bit sets (1) or resets (0) both flip-flops of a
// lane. After the capture exactly one of the two has changed, and it changed
// 0 -> 1 or 1 -> 0 depending on the random bit, so the supply current no
// longer tells the response apart. Both techniques follow the document; the
// one-cycle 'init' strobe that applies the random set/reset synchronously, and
// one random bit per lane for multi-bit PUFs, are this design's choices.
//
// Interface: init high for one cycle loads rnd into resp and decoy; cap_en
// high for one cycle loads q into resp and q_n into decoy (init wins if both
// are high). rst_n is asynchronous, active low, and clears both.
// After a capture decoy == ~resp, which an assertion checks.
module drill_reg #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [W-1:0] rnd,
  input  logic         cap_en,
  input  logic [W-1:0] q,
  input  logic [W-1:0] q_n,
  output logic [W-1:0] resp,
  output logic [W-1:0] decoy
);
  // Per-flip-flop synchronous set and reset, as driven by the generator.
  logic [W-1:0] set, clr;
  assign set = init ? rnd  : '0;
  assign clr = init ? ~rnd : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp  <= '0;
      decoy <= '0;
    end else begin
      for (int i = 0; i < W; i++) begin
        if (set[i]) begin
          resp[i]  <= 1'b1;
          decoy[i] <= 1'b1;
        end else if (clr[i]) begin
          resp[i]  <= 1'b0;
          decoy[i] <= 1'b0;
        end else if (cap_en) begin
          resp[i]  <= q[i];
          decoy[i] <= q_n[i];
        end
      end
    end
  end

  // The arbiter's outputs are complementary, so a capture leaves the pair
  // complementary.
  property p_dual_rail;
    @(posedge clk) disable iff (!rst_n) (cap_en && !init && (q == ~q_n)) |=> (decoy == ~resp);
  endproperty
  a_dual_rail: assert property (p_dual_rail);
endmodule
