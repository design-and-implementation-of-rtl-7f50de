// tb_seq_divider: divides random signed 42-bit dividends (full range and
// realistic accumulator values) by random 14-bit divisors and compares the
// quotient with SystemVerilog's own truncating division; also checks the
// NW+1-clock latency and that a start while busy restarts cleanly.
module tb_seq_divider;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic signed [41:0] dividend, quot;
  logic [13:0] divisor;
  int checks = 0, failures = 0;
  seq_divider dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quot);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic divide(input longint a, input int b, input bit interrupt);
    longint e;
    int lat;
    if (interrupt) begin
      dividend = 42'(a + 12345); divisor = 14'(b); start = 1;
      @(posedge clk); #1; start = 0;
      repeat (7) @(posedge clk);
      #1;
    end
    dividend = 42'(a); divisor = 14'(b); start = 1;
    @(posedge clk); #1; start = 0;
    dividend = '0; divisor = 14'd1;
    lat = 1;
    while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
    e = a / longint'(b);
    checks += 2;
    if (longint'(quot) != e) begin failures++; $display("%0d / %0d = %0d, expected %0d", a, b, quot, e); end
    if (lat != 43) begin failures++; $display("latency %0d", lat); end
  endtask
  initial begin
    start = 0; dividend = 0; divisor = 1;
    #25 rst_n = 1;
    @(posedge clk); #1;
    divide(0, 1, 0); divide(-1, 1, 0); divide(-7, 2, 0); divide(7, 2, 0);
    divide((longint'(1) <<< 41) - 1, 16383, 0);      // 2^41-1
    divide(-(longint'(1) <<< 41), 16383, 0);     // -2^41
    divide(-(longint'(1) <<< 41), 1, 0);
    for (int k = 0; k < 300; k++) begin
      longint a;
      int b;
      a = longint'({$urandom, $urandom}) >>> 22;
      if (k % 2 == 0) a = a >>> ($urandom_range(0, 30));
      b = int'($urandom_range(1, 16383));
      divide(a, b, (k % 10) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
