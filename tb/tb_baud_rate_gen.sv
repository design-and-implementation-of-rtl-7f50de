// tb_baud_rate_gen: for several trigger levels, enables the generator and
// checks that the first tick comes `first` clocks after enable and later
// ticks every 390 clocks, each one clock wide, and none while disabled.
module tb_baud_rate_gen;
  logic clk = 0, rst_n = 0;
  logic en;
  logic [12:0] first;
  logic tick;
  int checks = 0, failures = 0;
  baud_rate_gen dut (.clk, .rst_n, .en, .first, .tick);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic try(input int f);
    int n;
    first = 13'(f);
    en = 0;
    repeat (5) begin
      @(posedge clk); #1;
      checks++;
      if (tick) failures++;
    end
    en = 1;
    // count enabled clocks until the first tick (tick is combinational)
    n = 1;
    #0;
    while (!tick && n < 1000) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != f) begin failures++; $display("first=%0d: first tick after %0d clocks", f, n); end
    for (int t = 0; t < 3; t++) begin
      @(posedge clk); #1;
      n = 1;
      while (!tick && n < 1000) begin @(posedge clk); #1; n++; end
      checks++;
      if (n != 390) begin failures++; $display("tick period %0d", n); end
    end
    @(posedge clk); #1;
    en = 0;
  endtask
  initial begin
    en = 0; first = 1;
    #25 rst_n = 1;
    try(1); try(130); try(390); try(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
