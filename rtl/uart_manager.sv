// uart_manager: paces the transfer of stored result bytes to the UART.
//
// While the measurement path owns the UART (tx_enable high), the manager
// asks the storage unit for one byte (send, one clock) whenever bytes are
// pending and the UART is not busy, then waits for the UART to become busy
// and idle again before asking for the next byte. If busy does not rise
// within TIMEOUT clocks of a request (the byte was not taken), it returns to
// Idle and asks again. The request rule is the measurement system's; the
// states Idle, Request, Wait-busy, Wait-done and the timeout are this
// design's reading of it.
module uart_manager #(
  parameter int unsigned TIMEOUT = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tx_enable,
  input  logic pending,
  input  logic busy,
  output logic send
);
  typedef enum logic [1:0] {M_IDLE, M_REQ, M_WAIT_BUSY, M_WAIT_DONE} m_state_t;

  m_state_t state;
  logic [$clog2(TIMEOUT+1)-1:0] t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE;
      t     <= '0;
    end else begin
      unique case (state)
        M_IDLE:      if (tx_enable && pending && !busy) state <= M_REQ;
        M_REQ: begin
          t     <= '0;
          state <= M_WAIT_BUSY;
        end
        M_WAIT_BUSY: begin
          t <= t + 1'b1;
          if (busy) state <= M_WAIT_DONE;
          else if (int'(t) == TIMEOUT - 1) state <= M_IDLE;
        end
        M_WAIT_DONE: if (!busy) state <= M_IDLE;
        default:     state <= M_IDLE;
      endcase
    end
  end

  assign send = (state == M_REQ);
endmodule
