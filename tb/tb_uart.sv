// tb_uart: connects the UART's line output to its input and sends a stream
// of random bytes back to back, loading each one as soon as busy falls.
// Every byte must come back unchanged and in order, and the stream must run
// at one byte per 10 bit slots of 390 clocks (plus one clock per frame).
module tb_uart;
  logic clk = 0, rst_n = 0;
  logic [7:0] tx_data, rx_data;
  logic tx_load, line, busy, rx_av;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  uart dut (.clk, .rst_n, .tx_data, .tx_load, .rxd(line), .txd(line), .busy, .rx_data, .rx_av);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_rx = 0;
  always @(posedge clk) if (rst_n && rx_av) begin
    logic [7:0] e;
    n_rx++;
    checks++;
    e = (q.size() > 0) ? q.pop_front() : ~rx_data;
    if (e != rx_data) begin failures++; $display("got %h expected %h", rx_data, e); end
  end
  initial begin
    longint t0, t1;
    tx_load = 0; tx_data = 0;
    #25 rst_n = 1;
    repeat (5) @(posedge clk);
    t0 = $time;
    for (int k = 0; k < 40; k++) begin
      #1;
      tx_data = 8'($urandom);
      q.push_back(tx_data);
      tx_load = 1;
      @(posedge clk); #1;
      tx_load = 0;
      while (busy) @(posedge clk);
    end
    t1 = $time;
    repeat (800) @(posedge clk);
    checks += 2;
    if (n_rx != 40) begin failures++; $display("%0d of 40 bytes received", n_rx); end
    // 3901 clocks from load to busy falling, plus 2 clocks of testbench turnaround
    if ((t1 - t0) / 20 != 40 * (3901 + 2)) begin
      failures++;
      $display("40 frames took %0d clocks", (t1 - t0) / 20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
