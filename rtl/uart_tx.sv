// uart_tx: UART transmitter (SmTx state machine with its baud generator).
//
// Frame: one start bit (0), NUM_BITS data bits LSB first, one stop bit (1),
// no parity. A one-clock load in Idle registers the byte, raises busy and
// enables the baud generator (state Ready). Each baud tick then advances the
// frame: Ready -> Start bit -> Shift (one bit per tick, shifting the byte
// right) -> Stop bit -> Idle, where busy falls and the generator stops.
// load is ignored while busy. The line idles high.
//
// The states and their order are the measurement system's. The first tick
// comes one clock after load, so Ready lasts one clock and a frame takes
// (NUM_BITS + 2) * DIV + 1 clocks from load to busy falling; that trigger
// level is this design's choice.
module uart_tx #(
  parameter int unsigned NUM_BITS = 8,
  parameter int unsigned DIV      = 390,
  parameter int unsigned CNT_W    = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [NUM_BITS-1:0] data,
  output logic                txd,
  output logic                busy
);
  typedef enum logic [2:0] {TX_IDLE, TX_READY, TX_START, TX_SHIFT, TX_STOP} tx_state_t;

  tx_state_t                     state;
  logic [NUM_BITS-1:0]           sh;
  logic [$clog2(NUM_BITS)-1:0]   bitn;
  logic                          tick;

  baud_rate_gen #(.CNT_W(CNT_W), .DIV(DIV)) u_brg (
    .clk, .rst_n, .en(state != TX_IDLE), .first(CNT_W'(1)), .tick);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TX_IDLE;
      sh    <= '0;
      bitn  <= '0;
      txd   <= 1'b1;
    end else begin
      unique case (state)
        TX_IDLE: if (load) begin
          sh    <= data;
          state <= TX_READY;
        end
        TX_READY: if (tick) begin
          txd   <= 1'b0;
          state <= TX_START;
        end
        TX_START: if (tick) begin
          txd   <= sh[0];
          bitn  <= '0;
          state <= TX_SHIFT;
        end
        TX_SHIFT: if (tick) begin
          if (int'(bitn) == NUM_BITS - 1) begin
            txd   <= 1'b1;
            state <= TX_STOP;
          end else begin
            txd  <= sh[1];
            sh   <= sh >> 1;
            bitn <= bitn + 1'b1;
          end
        end
        TX_STOP: if (tick) state <= TX_IDLE;
        default: state <= TX_IDLE;
      endcase
    end
  end

  assign busy = (state != TX_IDLE);
endmodule
