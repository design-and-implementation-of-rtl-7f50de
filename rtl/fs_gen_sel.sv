// fs_gen_sel: sampling-rate generator and selector (fsGeneratorAndSelector).
//
// The demodulator samples at fs, four times the measurement frequency for the
// standard set (8, 32, 48, 64, 96 kHz). A prescaler divides the 38.4 MHz
// reference by PRESCALE = 25 to a 1.536 MHz base rate; several counters, one
// per entry of DIVS, divide the base rate further, and fs_sel picks one of
// them. All rates are one-clock strobes (clock enables) in the reference
// domain rather than derived clocks, so every sample is exactly synchronous
// with the NCO.
//
// fs_sel | divisor | fs       | measurement frequency at 4 samples/period
//   0    |   48    |  32 kHz  |  8 kHz
//   1    |   12    | 128 kHz  | 32 kHz
//   2    |    8    | 192 kHz  | 48 kHz
//   3    |    6    | 256 kHz  | 64 kHz
//   4    |    4    | 384 kHz  | 96 kHz
//   5    |    2    | 768 kHz  | 192 kHz
//   6    |    1    | 1.536 MHz| 384 kHz
// Values of fs_sel beyond the table select entry 0.
//
// The 1.536 MHz base rate, the counters and the selector are the measurement
// system's; the strobe form, the divisors and the fs_sel encoding are this
// design's choices.
module fs_gen_sel #(
  parameter int unsigned PRESCALE = 25,
  parameter int unsigned NUM_FS   = 7,
  parameter int unsigned SEL_W    = 4,
  parameter int unsigned DIVS [NUM_FS] = '{48, 12, 8, 6, 4, 2, 1}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SEL_W-1:0] fs_sel,
  output logic             fs_stb,
  output logic             base_stb
);
  localparam int unsigned PW = $clog2(PRESCALE + 1);
  localparam int unsigned DW = 8;

  logic [PW-1:0] pre;
  logic [NUM_FS-1:0] stb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre      <= '0;
      base_stb <= 1'b0;
    end else begin
      base_stb <= (pre == PW'(PRESCALE - 1));
      pre      <= (pre == PW'(PRESCALE - 1)) ? '0 : pre + 1'b1;
    end
  end

  for (genvar i = 0; i < NUM_FS; i++) begin : g_div
    logic [DW-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) cnt <= '0;
      else if (base_stb) cnt <= (cnt == DW'(DIVS[i] - 1)) ? '0 : cnt + 1'b1;
    end
    assign stb[i] = base_stb && (cnt == DW'(DIVS[i] - 1));
  end

  localparam int unsigned IW = (NUM_FS > 1) ? $clog2(NUM_FS) : 1;
  logic [IW-1:0] sel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= '0;
      fs_stb <= 1'b0;
    end else begin
      sel_q  <= (int'(fs_sel) < NUM_FS) ? IW'(fs_sel) : '0;
      fs_stb <= stb[sel_q];
    end
  end
endmodule
