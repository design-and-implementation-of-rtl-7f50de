// tb_reg_stability: drives random values and checks that q reproduces d
// exactly two clocks later, and that reset sets the reset value.
module tb_reg_stability;
  logic clk = 0, rst_n = 0;
  logic [3:0] d, q;
  logic [3:0] h0, h1;
  int checks = 0, failures = 0;
  reg_stability #(.W(4), .RST_VAL(4'h5)) dut (.clk, .rst_n, .d, .q);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    d = 0;
    @(posedge clk); #1;
    checks++;
    if (q != 4'h5) failures++;
    rst_n = 1;
    h0 = 4'h5; h1 = 4'h5;
    for (int k = 0; k < 1000; k++) begin
      d = 4'($urandom);
      @(posedge clk);
      h1 = h0; h0 = d;
      #1;
      checks++;
      if (q != h1) begin
        failures++;
        if (failures < 5) $display("q=%h expected %h", q, h1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
