`timescale 1ps/1ps
// resp_reg: response register of an unprotected arbiter-PUF.
//
// One D flip-flop per PUF lane stores the arbiter output q. This is the
// storage element whose switching (0 -> 1 only when the response is 1, no
// transition when it is 0) leaks the response through the supply current,
// which is what the cross-PUF power attack exploits. The flip-flop and its
// active-low reset follow the document's system-component drawing; the
// capture enable (the FPGA flip-flop's CE pin) is this design's choice so
// that the controller picks the capturing clock edge.
//
// Interface: cap_en high for one cycle captures q into resp at the next
// rising clk edge. rst_n is asynchronous and active low and clears resp.
module resp_reg #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cap_en,
  input  logic [W-1:0] q,
  output logic [W-1:0] resp
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      resp <= '0;
    else if (cap_en) resp <= q;
  end
endmodule
