// reset_controller: clear logic for the demodulator's accumulators.
//
// The accumulators must start from zero after reset, after every finished
// measurement (comp) and whenever the processor stops measuring (enable
// low). clr is the OR of these conditions for the multiply-accumulate
// branches; run, the registered enable, tells the sample counter and the
// accumulators to take samples. Because run rises one clock after enable and
// clr is high while run is low, every measurement begins with empty
// accumulators. The reset/comp clearing is the measurement system's; routing
// enable here is this design's reading of the enable connection. clr's comp
// term acts in the same clock as comp.
module reset_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic comp,
  output logic clr,
  output logic run
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
    end else begin
      run <= enable;
    end
  end

  assign clr = comp | ~run;
endmodule
