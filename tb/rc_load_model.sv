// rc_load_model: behavioural model of the DAC, a current-driven impedance
// Z = R1 + R2 / (1 + j*w*R2*C) seen through the analog front end, and the
// ADC, for simulation only.
//
// The DAC code (offset binary) is taken as the injected current; the
// voltage is the impedance's response computed by a bilinear-transform
// filter at the 38.4 MHz clock (warping below 2e-5 at 100 kHz), scaled by
// 1/RSCALE, delayed by DELAY clocks for the converter and front-end latency,
// rounded, clipped and returned as an offset-binary ADC code. R2 = 0 gives a
// plain resistor R1. zre()/zim() give the exact continuous-time impedance
// for checking.
// Original design: the loads (resistors, 50 ohm + 150 ohm || 56 nF) are the
// characterization loads. This model's choices: an ideal front end with no
// transformer high-pass, no noise and a fixed delay; the scale RSCALE.
module rc_load_model #(
  parameter real R1     = 150.0,
  parameter real R2     = 0.0,
  parameter real C      = 1.0e-9,
  parameter real RSCALE = 250.0,
  parameter int  DELAY  = 20
) (
  input  logic        clk,
  input  logic [13:0] dac_code,
  output logic [13:0] adc_code
);
  localparam real T = 1.0 / 38.4e6;
  localparam real K = 2.0 * R2 * C / T;

  real x_prev = 0.0, y2_prev = 0.0;
  int  line [DELAY];

  always @(posedge clk) begin
    real x, y2, y;
    x  = real'(int'(dac_code) - 8192);
    y2 = (R2 * (x + x_prev) - (1.0 - K) * y2_prev) / (1.0 + K);
    y  = (R1 * x + y2) / RSCALE;
    x_prev  = x;
    y2_prev = y2;
    for (int i = DELAY - 1; i > 0; i--) line[i] <= line[i-1];
    line[0] <= (y < 0.0) ? -int'($rtoi(-y + 0.5)) : int'($rtoi(y + 0.5));
  end

  always_comb begin
    int a;
    a = line[DELAY-1] + 8192;
    if (a < 0) a = 0;
    if (a > 16383) a = 16383;
    adc_code = 14'(a);
  end

  initial for (int i = 0; i < DELAY; i++) line[i] = 0;

  // exact impedance at frequency f
  function automatic real zre(input real f);
    real w;
    w = 2.0 * 3.14159265358979 * f * R2 * C;
    return R1 + R2 / (1.0 + w * w);
  endfunction
  function automatic real zim(input real f);
    real w;
    w = 2.0 * 3.14159265358979 * f * R2 * C;
    return -R2 * w / (1.0 + w * w);
  endfunction
endmodule
