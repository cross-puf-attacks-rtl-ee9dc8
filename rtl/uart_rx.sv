`timescale 1ps/1ps
// uart_rx: 8N1 serial receiver (helper of uart).
//
// The line idles high. A falling edge starts a frame; the start bit is
// re-checked at its middle, then the 8 data bits (LSB first) are sampled at
// the middle of each bit time and the stop bit is checked. A frame whose
// stop bit is low is dropped. rxd is passed through a two-flop synchroniser
// first. CLKS_PER_BIT is the bit time in clock cycles.
//
// Interface: 'valid' pulses for one cycle with 'data' when a byte arrives,
// about 9.5 bit times after the start edge.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 332
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  rx_state_e     state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= RX_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      valid   <= 1'b0;
      data    <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        RX_IDLE: if (!sync[1]) begin
          state <= RX_START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        RX_START: if (cnt == 0) begin
          if (!sync[1]) begin
            state   <= RX_DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else begin
            state <= RX_IDLE;
          end
        end else cnt <= cnt - 1'b1;
        RX_DATA: if (cnt == 0) begin
          shreg <= {sync[1], shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= RX_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        RX_STOP: if (cnt == 0) begin
          state <= RX_IDLE;
          if (sync[1]) begin
            valid <= 1'b1;
            data  <= shreg;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= RX_IDLE;
      endcase
    end
  end
endmodule
