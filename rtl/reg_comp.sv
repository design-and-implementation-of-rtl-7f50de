// reg_comp: measurement-done flag for the processor (RegComp).
//
// The processor starts a measurement with enable and waits for this flag
// (its control input port); when the flag is up it drops enable and moves on
// to the next frequency. The flag is set by a one-clock result pulse
// while enable is high and stays set until enable goes low, so a software
// poll or an edge-triggered interrupt cannot miss it. The flag's use follows
// the measurement system; its set/clear rule is this design's choice.
module reg_comp (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic enable,
  output logic flag
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       flag <= 1'b0;
    else if (!enable) flag <= 1'b0;
    else if (set)     flag <= 1'b1;
  end
endmodule
