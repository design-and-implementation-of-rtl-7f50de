// coherent_demod: digital homodyne (I/Q) demodulator.
//
// The ADC sample, converted to two's complement by bintoa2, is multiplied on
// every sample strobe fs_stb by the NCO's sine (I branch) and cosine
// (Q branch) and summed over N = len samples by two multacum blocks. With a
// response Vd = A sin(wt + phi) the sums are R = N*A*B/2*cos(phi) and
// J = N*A*B/2*sin(phi) (B: oscillator amplitude), the 2w terms averaging
// out. The sample counter raises comp after the N-th sample; the reset
// controller then clears both accumulators, so consecutive measurements
// follow without a gap while enable stays high.
//
// At comp the two sums are copied into r_sum/j_sum, which stay stable until
// the next comp (at least N sample periods), and res_toggle changes state.
// A consumer in another clock domain synchronises res_toggle and then reads
// r_sum/j_sum safely. The structure (bintoa2, two multacum, counter,
// reset controller, comp) is the measurement system's; the held outputs and
// the toggle handshake are this design's choice.
//
// Timing: the NCO values and the converted ADC sample present in the clock
// of fs_stb are used; comp comes one clock after the N-th strobe.
module coherent_demod #(
  parameter int unsigned W     = 14,
  parameter int unsigned ACC_W = 42,
  parameter int unsigned LEN_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    fs_stb,
  input  logic [LEN_W-1:0]        len,
  input  logic [W-1:0]            adc_code,
  input  logic signed [W-1:0]     lo_sin,
  input  logic signed [W-1:0]     lo_cos,
  output logic                    comp,
  output logic                    res_toggle,
  output logic signed [ACC_W-1:0] r_sum,
  output logic signed [ACC_W-1:0] j_sum
);
  logic signed [W-1:0]     x;
  logic signed [ACC_W-1:0] acc_i, acc_q;
  logic                    clr, run, take;

  bintoa2 #(.W(W)) u_bintoa2 (.clk, .rst_n, .din(adc_code), .dout(x));

  reset_controller u_rstctl (.clk, .rst_n, .enable, .comp, .clr, .run);

  assign take = fs_stb & run;

  sample_counter #(.LEN_W(LEN_W)) u_counter (
    .clk, .rst_n, .run, .stb(fs_stb), .len, .comp, .count());

  multacum #(.IN_W(W), .ACC_W(ACC_W)) u_mac_i (
    .clk, .rst_n, .clr, .en(take), .x, .lo(lo_sin), .acc(acc_i));

  multacum #(.IN_W(W), .ACC_W(ACC_W)) u_mac_q (
    .clk, .rst_n, .clr, .en(take), .x, .lo(lo_cos), .acc(acc_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_sum      <= '0;
      j_sum      <= '0;
      res_toggle <= 1'b0;
    end else if (comp) begin
      r_sum      <= acc_i;
      j_sum      <= acc_q;
      res_toggle <= ~res_toggle;
    end
  end

  // A measurement is only finished while the block is running.
  assert property (@(posedge clk) disable iff (!rst_n) comp |-> $past(run));
endmodule
