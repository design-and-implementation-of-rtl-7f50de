// nco: numerically controlled oscillator giving sine and cosine.
//
// A 32-bit phase accumulator advances by phase_inc every clock, so the output
// frequency is f = phase_inc * f_clk / 2^32 (38.4 MHz reference clock in this
// system). The top 16 bits of the accumulator are the phase angle. Sine and
// cosine of that angle are computed by a fully pipelined CORDIC rotator: the
// angle is first folded into [-90, +90] degrees (a half-turn flip whose sign
// is restored at the end), then ITER shift-and-add micro-rotations turn the
// vector (1/K * A, 0) onto the angle. Both outputs are 14-bit two's complement
// with amplitude +/-8191 and are used as the DAC signal and as the local
// oscillators of the demodulator.
//
// The accumulator, angle and output precisions (32, 16, 14 bits) follow the
// measurement system. Generating the waveform with CORDIC instead of a
// multiplier-based table, the amplitude and the pipeline depth are this
// design's choices. The accumulator runs free; a new phase_inc takes effect on
// the next clock without a phase jump.
//
// Timing: one sample per clock; sin_out/cos_out are ITER+2 clocks behind the
// accumulator value they belong to.
module nco #(
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned ANGLE_W = 16,
  parameter int unsigned OUT_W   = 14,
  parameter int unsigned ITER    = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      phase_inc,
  output logic signed [OUT_W-1:0] sin_out,
  output logic signed [OUT_W-1:0] cos_out
);

  localparam int unsigned GUARD = 4;                 // fractional guard bits of x, y
  localparam int unsigned XW    = OUT_W + GUARD + 2; // x/y width, room for the CORDIC gain
  localparam int unsigned ZG    = 2;                 // guard bits of the angle
  localparam int unsigned ZW    = ANGLE_W + ZG + 2;  // z width
  localparam int          AMP   = (1 << (OUT_W - 1)) - 1;   // 8191
  // x start value: AMP * 2^GUARD / K, K = prod sqrt(1 + 2^-2i) = 1.6467603
  localparam int          X0    = 79584;

  // atan(2^-i) in units of 2^(ANGLE_W+ZG) per full turn:
  // round(atan(2^-i) / (2*pi) * 2^18)
  localparam int ATAN [16] = '{32768, 19344, 10221, 5188, 2604, 1303, 652, 326,
                               163, 81, 41, 20, 10, 5, 3, 1};

  logic [PHASE_W-1:0] phase_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_acc <= '0;
    else        phase_acc <= phase_acc + phase_inc;
  end

  // Fold the angle into [-90, +90] degrees: quadrants 1 and 2 (top bits 01
  // and 10) are turned by half a circle and the result negated at the end.
  wire [ANGLE_W-1:0] angle = phase_acc[PHASE_W-1 -: ANGLE_W];
  wire               flip  = angle[ANGLE_W-1] ^ angle[ANGLE_W-2];

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic [ITER:0]        neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0]  <= '0;
      ys[0]  <= '0;
      zs[0]  <= '0;
      neg[0] <= 1'b0;
    end else begin
      xs[0]  <= XW'(X0);
      ys[0]  <= '0;
      zs[0]  <= ZW'($signed({angle[ANGLE_W-1] ^ flip, angle[ANGLE_W-2:0], {ZG{1'b0}}}));
      neg[0] <= flip;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1]  <= '0;
        ys[i+1]  <= '0;
        zs[i+1]  <= '0;
        neg[i+1] <= 1'b0;
      end else begin
        if (!zs[i][ZW-1]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ZW'(ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ZW'(ATAN[i]);
        end
        neg[i+1] <= neg[i];
      end
    end
  end

  // Round off the guard bits, restore the sign of a flipped angle, saturate.
  function automatic logic signed [OUT_W-1:0] finish(input logic signed [XW-1:0] v,
                                                     input logic n);
    logic signed [XW-1:0] r;
    r = (v + XW'(1 << (GUARD - 1))) >>> GUARD;
    if (n) r = -r;
    if (r > XW'(AMP))       return OUT_W'(AMP);
    else if (r < -XW'(AMP)) return OUT_W'(-AMP);
    else                    return r[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_out <= '0;
      cos_out <= '0;
    end else begin
      sin_out <= finish(ys[ITER], neg[ITER]);
      cos_out <= finish(xs[ITER], neg[ITER]);
    end
  end

endmodule
