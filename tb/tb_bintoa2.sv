// tb_bintoa2: checks the offset-binary to two's-complement conversion:
// dout must equal din - 2^13, one clock after din is applied.
module tb_bintoa2;
  logic clk = 0, rst_n = 0;
  logic [13:0] din;
  logic signed [13:0] dout;
  int checks = 0, failures = 0;
  bintoa2 dut (.clk, .rst_n, .din, .dout);
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
    e = v - 8192;
    checks++;
    if (int'(dout) != e) begin
      failures++;
      $display("din=%0d dout=%0d expected %0d", v, dout, e);
    end
  endtask
  initial begin
    din = 0;
    #12 rst_n = 1;
    apply(0); apply(16383); apply(8192); apply(8191); apply(8193);
    repeat (500) apply(int'($urandom_range(0, 16383)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
