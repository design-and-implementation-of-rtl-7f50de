// tb_uart_rx: sends random bytes on the serial line at the nominal rate and
// at +/-2.5 % rate error, interleaved with low noise pulses shorter than the
// 30-sample start-bit filter. Every byte must arrive once, intact, with a
// one-clock data_av pulse; a noise pulse must produce nothing.
module tb_uart_rx;
  logic clk = 0, rst_n = 0;
  logic rxd;
  logic [7:0] data;
  logic data_av;
  int checks = 0, failures = 0;
  int n_av = 0, n_noise = 0;
  logic [7:0] q [$];
  uart_rx dut (.clk, .rst_n, .rxd, .data, .data_av);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && data_av) begin
    n_av++;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected byte %h", data);
    end else begin
      logic [7:0] e;
      e = q.pop_front();
      if (data != e) begin failures++; $display("got %h expected %h", data, e); end
    end
  end
  task automatic send(input logic [7:0] b, input int bit_clocks);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    q.push_back(b);
    for (int i = 0; i < 10; i++) begin
      rxd = frame[i];
      repeat (bit_clocks) @(posedge clk);
    end
  endtask
  task automatic noise(input int width);
    rxd = 0;
    repeat (width) @(posedge clk);
    rxd = 1;
    n_noise++;
    repeat (500) @(posedge clk);
  endtask
  initial begin
    int sent = 0;
    rxd = 1;
    #25 rst_n = 1;
    repeat (50) @(posedge clk);
    send(8'h00, 390); send(8'hFF, 390); send(8'h5A, 390);
    sent = 3;
    for (int k = 0; k < 30; k++) begin
      int rate;
      rate = (k % 3 == 0) ? 380 : (k % 3 == 1) ? 400 : 390;
      if (k % 5 == 0) noise(1 + (k % 28));
      send(8'($urandom), rate);
      sent++;
    end
    noise(29);
    repeat (1000) @(posedge clk);
    checks++;
    if (n_av != sent || q.size() != 0) begin
      failures++;
      $display("%0d bytes sent, %0d received", sent, n_av);
    end
    $display("noise pulses rejected: %0d", n_noise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
