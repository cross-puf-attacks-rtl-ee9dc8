`timescale 1ps/1ps
// uart: serial link between the host PC and the PUF controller.
//
// A receiver and a transmitter, both 8 data bits, no parity, one stop bit.
// The document only names a UART module; the frame format and the bit rate
// are this design's choices. With the 3.1875 MHz system clock the default
// CLKS_PER_BIT = 332 gives 9601 baud (0.01 % from 9600).
//
// Interface: rx_valid/rx_data pulse once per received byte. A byte is sent
// by holding tx_valid with tx_data in a cycle where tx_ready is high.
module uart #(
  parameter int unsigned CLKS_PER_BIT = 332
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       txd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready
);
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .valid(rx_valid), .data(rx_data)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .txd
  );
endmodule
