// uart_selector: shares the single UART transmitter between the
// measurement path and the processor (UARTselector).
//
// With tx_enable high the storage unit's bytes and load pulses go to the
// transmitter; with tx_enable low the processor's 9-bit port does, its bit 8
// being the load request and bits 7:0 the byte. The processor's request is
// a level written by software, so only its rising edge starts a byte. Both
// outputs are registered (one clock of latency). Selecting by tx_enable is
// the measurement system's; the edge detection is this design's choice.
module uart_selector
  import bioz_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tx_enable,
  input  logic [7:0] meas_data,
  input  logic      meas_load,
  input  pio_byte_t cpu_byte,
  output logic [7:0] tx_data,
  output logic      tx_load
);
  logic cpu_strobe_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_strobe_q <= 1'b0;
      tx_data      <= '0;
      tx_load      <= 1'b0;
    end else begin
      cpu_strobe_q <= cpu_byte.strobe;
      if (tx_enable) begin
        tx_data <= meas_data;
        tx_load <= meas_load;
      end else begin
        tx_data <= cpu_byte.data;
        tx_load <= cpu_byte.strobe & ~cpu_strobe_q;
      end
    end
  end
endmodule
