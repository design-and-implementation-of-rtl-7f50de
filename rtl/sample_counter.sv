// sample_counter: filter-length counter and comparator of the demodulator.
//
// While run is high the counter counts sample strobes. On the strobe of the
// N-th sample (N = len) it returns to zero and, one clock later, raises comp
// for one clock: the multiply-accumulate branches then hold the sum of
// exactly N products. comp both ends a measurement and, through the reset
// controller, restarts the accumulation. When run is low the count is held
// at zero. len = 0 is treated as 1 (this design's choice); the 14-bit
// length register is that of the measurement system.
module sample_counter #(
  parameter int unsigned LEN_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             stb,
  input  logic [LEN_W-1:0] len,
  output logic             comp,
  output logic [LEN_W-1:0] count
);
  logic [LEN_W-1:0] last;
  assign last = (len == '0) ? '0 : len - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      comp  <= 1'b0;
    end else begin
      comp <= 1'b0;
      if (!run) begin
        count <= '0;
      end else if (stb) begin
        if (count >= last) begin
          count <= '0;
          comp  <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end
endmodule
