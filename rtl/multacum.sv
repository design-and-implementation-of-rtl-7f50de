// multacum: multiply-accumulate branch of the coherent demodulator.
//
// On every sample strobe (en) the signed sample x is multiplied by the local
// oscillator lo (sine for the I branch, cosine for the Q branch) and the
// product is added to the running sum acc. Summing N products and dividing
// by N is the moving-average low-pass filter that leaves only the DC term
// |Z| cos(phi)/2 or |Z| sin(phi)/2 of the product; the division is done
// later, outside this block.
//
// clr restarts the sum. If clr and en arrive in the same clock the new sum
// starts with that sample, so no sample is lost between two consecutive
// measurements (this design's choice). acc updates one clock after en.
// ACC_W = 2*IN_W + 14 holds 16383 full-scale products without overflow.
module multacum #(
  parameter int unsigned IN_W  = 14,
  parameter int unsigned ACC_W = 42
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  lo,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [2*IN_W-1:0]  prod;
  logic signed [ACC_W-1:0]   base;

  always_comb begin
    prod = x * lo;
    base = clr ? '0 : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= base + ACC_W'(prod);
    else         acc <= base;
  end
endmodule
