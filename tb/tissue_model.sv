// tissue_model: behavioural model of the DAC, analog front end, tissue
// impedance and ADC, for simulation only (not synthesizable in intent).
//
// The DAC code (offset binary) is scaled by gain_q16 / 65536, the relative
// magnitude of the impedance under test seen through the front end, and
// delayed by DELAY reference clocks, which stands for the phase of the
// impedance and the converter latencies: at frequency f the response lags
// by 2*pi*f*DELAY/f_clk. The result is rounded, clipped to 14 bits and
// returned as an offset-binary ADC code.
module tissue_model #(
  parameter int DELAY = 20
) (
  input  logic        clk,
  input  logic [16:0] gain_q16,
  input  logic [13:0] dac_code,
  output logic [13:0] adc_code
);
  int line [DELAY];

  always @(posedge clk) begin
    int v;
    v = ((int'(dac_code) - 8192) * int'(gain_q16) + 32768) >>> 16;
    for (int i = DELAY - 1; i > 0; i--) line[i] <= line[i-1];
    line[0] <= v;
  end

  always_comb begin
    int a;
    a = line[DELAY-1] + 8192;
    if (a < 0) a = 0;
    if (a > 16383) a = 16383;
    adc_code = 14'(a);
  end

  initial for (int i = 0; i < DELAY; i++) line[i] = 0;
endmodule
