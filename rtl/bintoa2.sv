// bintoa2: offset binary ADC code to two's complement.
//
// The ADC delivers offset binary (mid-scale 2^(W-1) for zero input); the
// demodulator multiplies signed numbers. Inverting the sign bit converts the
// code. The result is registered (one clock of latency), which also retimes
// the ADC pins into the FPGA. The conversion follows the measurement system;
// the register is this design's choice.
module bintoa2 #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic        [W-1:0] din,
  output logic signed [W-1:0] dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= {~din[W-1], din[W-2:0]};
  end
endmodule
