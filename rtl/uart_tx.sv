`timescale 1ps/1ps
// uart_tx: 8N1 serial transmitter (helper of uart).
//
// A byte accepted with valid while ready is high is sent as a start bit (0),
// eight data bits LSB first and a stop bit (1), each CLKS_PER_BIT cycles
// long. ready is low from the accepting cycle until the stop bit has ended.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 332
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bits_left;   // frame bits still to send, 0 = idle
  logic [9:0]    frame;       // {stop, data, start}, shifted out LSB first

  assign ready = (bits_left == 0);
  assign txd   = frame[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      bits_left <= '0;
      frame     <= 10'h3FF;
    end else if (bits_left == 0) begin
      if (valid) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (cnt == 0) begin
      frame     <= {1'b1, frame[9:1]};
      bits_left <= bits_left - 1'b1;
      cnt       <= CW'(CLKS_PER_BIT - 1);
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
