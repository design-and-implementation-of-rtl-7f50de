// tb_multacum: drives random samples and oscillator values with random
// strobes and clears, and compares acc every clock with a sum kept in the
// testbench (64-bit integer arithmetic). Also checks that a clear in the
// same clock as a strobe starts the new sum with that product.
module tb_multacum;
  logic clk = 0, rst_n = 0;
  logic clr, en;
  logic signed [13:0] x, lo;
  logic signed [41:0] acc;
  longint model;
  int checks = 0, failures = 0, both = 0;
  multacum dut (.clk, .rst_n, .clr, .en, .x, .lo, .acc);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    clr = 0; en = 0; x = 0; lo = 0; model = 0;
    #12 rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      // full-scale stretches to exercise the accumulator's upper bits
      if (k < 4000) begin x = -14'sd8192; lo = -14'sd8192; end
      else begin
        x  = 14'($urandom);
        lo = 14'($urandom);
      end
      en  = (k < 4000) ? 1'b1 : ($urandom_range(0, 3) == 0);
      clr = (k >= 4000) && ($urandom_range(0, 200) == 0);
      if (clr && en) both++;
      @(posedge clk);
      if (clr) model = 0;
      if (en)  model = model + longint'(x) * longint'(lo);
      #1;
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        if (failures < 5) $display("k=%0d acc=%0d expected %0d", k, acc, model);
      end
    end
    if (both == 0) failures++;
    $display("clear-with-strobe cases: %0d", both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
