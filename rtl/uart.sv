// uart: asynchronous serial port, 8 data bits, 1 stop bit, no parity.
//
// Wraps the transmitter (uart_tx) and the receiver (uart_rx), each with its
// own baud-rate generator. With the 50 MHz system clock and DIV = 390 the
// line runs at 128.2 kbit/s (0.16 % from 128 kbit/s). tx_load starts a frame
// when busy is low; rx_av pulses for one clock when rx_data holds a new byte.
// Interface and figures are those of the measurement system's UART.
module uart #(
  parameter int unsigned NUM_BITS_TX = 8,
  parameter int unsigned NUM_BITS_RX = 8,
  parameter int unsigned DIV         = 390,
  parameter int unsigned CNT_W       = 13
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_BITS_TX-1:0] tx_data,
  input  logic                   tx_load,
  input  logic                   rxd,
  output logic                   txd,
  output logic                   busy,
  output logic [NUM_BITS_RX-1:0] rx_data,
  output logic                   rx_av
);
  uart_tx #(.NUM_BITS(NUM_BITS_TX), .DIV(DIV), .CNT_W(CNT_W)) u_tx (
    .clk, .rst_n, .load(tx_load), .data(tx_data), .txd, .busy);

  uart_rx #(.NUM_BITS(NUM_BITS_RX), .DIV(DIV), .CNT_W(CNT_W)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .data_av(rx_av));
endmodule
