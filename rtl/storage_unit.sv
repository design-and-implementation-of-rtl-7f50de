// storage_unit: result store between the demodulator and the UART.
//
// The demodulator's sums R and J arrive from the 38.4 MHz domain together
// with res_toggle, which changes state once per finished measurement. The
// toggle is synchronised (reg_stability) and its edge starts a capture: both
// sums, stable since their comp, are copied, then divided one after the
// other by the filter length N with a bit-serial divider, giving the
// averages I = R/N and Q = J/N (32-bit two's complement, truncated toward
// zero). res_valid pulses when both are ready and i_res/q_res hold them.
//
// The eight result bytes, I before Q and most significant byte first, are
// then offered to the UART: pending is high while bytes remain, and each
// send request from the UART manager puts the next byte on tx_data with a
// one-clock tx_load. A new measurement that arrives before all bytes of the
// previous one have been handed out replaces them and pulses overrun: the
// serial link is then slower than the measurements.
//
// Storing, averaging by the length value and the clock-domain crossing are
// the measurement system's; the byte order, the overrun rule and the divider
// are this design's choices. Latency from the toggle to res_valid is about
// 2*(ACC_W+1) + 4 clocks.
module storage_unit #(
  parameter int unsigned ACC_W = 42,
  parameter int unsigned RES_W = 32,
  parameter int unsigned LEN_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    res_toggle,
  input  logic signed [ACC_W-1:0] r_sum,
  input  logic signed [ACC_W-1:0] j_sum,
  input  logic [LEN_W-1:0]        len,
  input  logic                    send,
  output logic                    pending,
  output logic [7:0]              tx_data,
  output logic                    tx_load,
  output logic                    overrun,
  output logic signed [RES_W-1:0] i_res,
  output logic signed [RES_W-1:0] q_res,
  output logic                    res_valid
);
  localparam int unsigned NBYTES = 2 * RES_W / 8;

  typedef enum logic [1:0] {ST_IDLE, ST_DIV_I, ST_DIV_Q, ST_READY} st_t;

  st_t                     state;
  logic                    tog_s, tog_q, new_res;
  logic signed [ACC_W-1:0] r_hold, j_hold;
  logic                    div_start, div_busy, div_done;
  logic signed [ACC_W-1:0] div_a, div_q;
  logic [LEN_W-1:0]        div_n;
  logic [$clog2(NBYTES+1)-1:0] idx;
  logic [2*RES_W-1:0]      words;

  reg_stability #(.W(1), .STAGES(2)) u_sync (.clk, .rst_n, .d(res_toggle), .q(tog_s));

  assign new_res = tog_s ^ tog_q;
  assign div_n   = (len == '0) ? LEN_W'(1) : len;   // the counter treats 0 as 1
  assign div_a   = (state == ST_DIV_Q) ? j_hold : r_hold;

  seq_divider #(.NW(ACC_W), .DW(LEN_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_n),
    .busy(div_busy), .done(div_done), .quot(div_q));

  assign words   = {i_res, q_res};
  assign pending = (state == ST_READY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_q     <= 1'b0;
      state     <= ST_IDLE;
      r_hold    <= '0;
      j_hold    <= '0;
      div_start <= 1'b0;
      i_res     <= '0;
      q_res     <= '0;
      res_valid <= 1'b0;
      idx       <= '0;
      tx_data   <= '0;
      tx_load   <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      tog_q     <= tog_s;
      div_start <= 1'b0;
      res_valid <= 1'b0;
      tx_load   <= 1'b0;
      overrun   <= 1'b0;
      if (new_res) begin
        r_hold    <= r_sum;
        j_hold    <= j_sum;
        div_start <= 1'b1;
        state     <= ST_DIV_I;
        overrun   <= (state != ST_IDLE);
      end else begin
        unique case (state)
          ST_IDLE: ;
          ST_DIV_I: if (div_done) begin
            i_res     <= RES_W'(div_q);
            div_start <= 1'b1;
            state     <= ST_DIV_Q;
          end
          ST_DIV_Q: if (div_done && !div_start) begin
            q_res     <= RES_W'(div_q);
            res_valid <= 1'b1;
            idx       <= '0;
            state     <= ST_READY;
          end
          ST_READY: if (send) begin
            tx_data <= words[2*RES_W-1 - 8*idx -: 8];
            tx_load <= 1'b1;
            idx     <= idx + 1'b1;
            if (int'(idx) == NBYTES - 1) state <= ST_IDLE;
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  // The divider is only started when it is free or being restarted.
  assert property (@(posedge clk) disable iff (!rst_n) div_done |-> !div_busy);
endmodule
