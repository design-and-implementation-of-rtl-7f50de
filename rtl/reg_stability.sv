// reg_stability: synchroniser for signals that enter a clock domain.
//
// The measurement logic runs on the 38.4 MHz reference clock and the UART
// side on the 50 MHz system clock, which are asynchronous to each other.
// A signal crossing between them passes STAGES flip-flops in the receiving
// domain, so that a flip-flop that goes metastable has a full clock period to
// settle before the value is used. Latency is STAGES clocks. Use it for
// single-bit levels, toggles and quasi-static buses only. The synchroniser
// stage is the measurement system's; two stages and the reset value
// RST_VAL are this design's choice.
module reg_stability #(
  parameter int unsigned W       = 1,
  parameter int unsigned STAGES  = 2,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sync [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) sync[i] <= RST_VAL;
    end else begin
      sync[0] <= d;
      for (int i = 1; i < STAGES; i++) sync[i] <= sync[i-1];
    end
  end

  assign q = sync[STAGES-1];
endmodule
