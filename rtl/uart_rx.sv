// uart_rx: UART receiver (SmRx state machine with its baud generator).
//
// The line idles high. A low level moves Idle to Filter, where FILTER
// consecutive low samples at the 50 MHz clock (30 by default) are required
// before the start bit is believed; a single high sample returns to Idle, so
// short noise pulses are rejected. In Start the baud generator is enabled
// with its first tick DIV/3 clocks away; that tick moves to Capture, and
// every following tick, one bit slot apart and about 40 % into the bit,
// stores the line level at the next bit position, LSB first. After NUM_BITS
// bits the Stop state waits one more tick and returns to Idle, presenting
// the byte on data with a one-clock data_av pulse. The stop bit's level is
// not checked and there is no parity.
//
// The state sequence, the 30-sample filter and the DIV/3 trigger are the
// measurement system's; the two-flip-flop input synchroniser is this
// design's addition.
module uart_rx #(
  parameter int unsigned NUM_BITS = 8,
  parameter int unsigned DIV      = 390,
  parameter int unsigned CNT_W    = 13,
  parameter int unsigned FILTER   = 30
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rxd,
  output logic [NUM_BITS-1:0] data,
  output logic                data_av
);
  typedef enum logic [2:0] {RX_IDLE, RX_FILTER, RX_START, RX_CAPTURE, RX_STOP} rx_state_t;

  rx_state_t                       state;
  logic                            rx;
  logic [$clog2(FILTER+1)-1:0]     fcnt;
  logic [$clog2(NUM_BITS)-1:0]     bitn;
  logic [NUM_BITS-1:0]             sh;
  logic                            tick, brg_en;

  reg_stability #(.W(1), .STAGES(2), .RST_VAL(1'b1)) u_sync (.clk, .rst_n, .d(rxd), .q(rx));

  assign brg_en = (state == RX_START) || (state == RX_CAPTURE) || (state == RX_STOP);

  baud_rate_gen #(.CNT_W(CNT_W), .DIV(DIV)) u_brg (
    .clk, .rst_n, .en(brg_en), .first(CNT_W'(DIV / 3)), .tick);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= RX_IDLE;
      fcnt    <= '0;
      bitn    <= '0;
      sh      <= '0;
      data    <= '0;
      data_av <= 1'b0;
    end else begin
      data_av <= 1'b0;
      unique case (state)
        RX_IDLE: if (!rx) begin
          fcnt  <= 1;
          state <= RX_FILTER;
        end
        RX_FILTER: begin
          if (rx) state <= RX_IDLE;
          else if (int'(fcnt) == FILTER - 1) state <= RX_START;
          else fcnt <= fcnt + 1'b1;
        end
        RX_START: if (tick) begin
          bitn  <= '0;
          state <= RX_CAPTURE;
        end
        RX_CAPTURE: if (tick) begin
          sh[bitn] <= rx;
          if (int'(bitn) == NUM_BITS - 1) state <= RX_STOP;
          else bitn <= bitn + 1'b1;
        end
        RX_STOP: if (tick) begin
          data    <= sh;
          data_av <= 1'b1;
          state   <= RX_IDLE;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end
endmodule
