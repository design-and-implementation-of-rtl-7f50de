// a2tobin: two's complement to offset ("pure") binary for the DAC.
//
// The NCO produces signed samples while the DAC input is offset binary
// (0 = most negative, 2^(W-1) = zero). Inverting the sign bit maps one onto
// the other. The result is registered so the DAC data pins come straight from
// flip-flops; latency is one clock. The conversion is the measurement
// system's; registering it is this design's choice.
module a2tobin #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] din,
  output logic        [W-1:0] dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= {1'b1, {(W-1){1'b0}}};     // mid-scale: zero signal
    else        dout <= {~din[W-1], din[W-2:0]};
  end
endmodule
