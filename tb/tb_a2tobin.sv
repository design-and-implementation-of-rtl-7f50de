// tb_a2tobin: checks the two's-complement to offset-binary conversion on
// the extremes, zero and random codes: dout must equal din + 2^13 (mod 2^14),
// one clock after din is applied.
module tb_a2tobin;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] din;
  logic [13:0] dout;
  int checks = 0, failures = 0;
  a2tobin dut (.clk, .rst_n, .din, .dout);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic apply(input int v);
    int e;
    din = 14'(v);
    @(posedge clk); #1;
    e = v + 8192;
    checks++;
    if (int'(dout) != e) begin
      failures++;
      $display("din=%0d dout=%0d expected %0d", v, dout, e);
    end
  endtask
  initial begin
    din = 0;
    #12;
    checks++;
    if (dout != 14'd8192) failures++;          // reset value is mid-scale
    rst_n = 1;
    apply(-8192); apply(8191); apply(0); apply(-1); apply(1);
    repeat (500) apply(int'($urandom_range(0, 16383)) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
