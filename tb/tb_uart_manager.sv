// tb_uart_manager: plays the storage unit and a UART around the manager.
// The UART model goes busy two clocks after each request and stays busy
// for a random time. Checks: no request while busy, while nothing is
// pending or while tx_enable is low; every request is a one-clock pulse;
// after a request that the UART ignores, the manager asks again after its
// timeout; all pending bytes are requested in turn.
module tb_uart_manager;
  logic clk = 0, rst_n = 0;
  logic tx_enable, pending, busy, send;
  int checks = 0, failures = 0;
  int left, sends = 0, retries = 0;
  bit ignore_next = 0;
  uart_manager dut (.clk, .rst_n, .tx_enable, .pending, .busy, .send);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // UART and storage model
  int busy_left = 0, delay = -1, since_ignored = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (send && (busy || !pending || !tx_enable || delay >= 0)) begin
        failures++;
        $display("request at a wrong time: busy=%b pending=%b txen=%b", busy, pending, tx_enable);
      end
      if (since_ignored >= 0) since_ignored++;
      if (send) begin
        sends++;
        if (since_ignored >= 0) begin
          retries++;
          if (since_ignored < 8) begin failures++; $display("retry after %0d clocks", since_ignored); end
          since_ignored = -1;
        end
        if (ignore_next) begin ignore_next = 0; since_ignored = 0; end
        else delay = 2;
      end
      if (delay == 0) begin
        busy <= 1;
        busy_left = $urandom_range(5, 60);
        left--;
        if (left == 0) pending <= 0;
      end
      if (delay >= 0) delay--;
      if (busy_left > 0) begin busy_left--; if (busy_left == 0) busy <= 0; end
    end
  end
  initial begin
    tx_enable = 0; pending = 0; busy = 0; left = 0;
    #25 rst_n = 1;
    // nothing may happen with tx_enable low
    left = 8; pending = 1;
    repeat (200) @(posedge clk);
    checks++;
    if (sends != 0) failures++;
    tx_enable = 1;
    wait (left == 0);
    repeat (100) @(posedge clk);
    checks++;
    if (sends != 8) begin failures++; $display("%0d requests for 8 bytes", sends); end
    // one ignored request: the manager must retry
    @(posedge clk); #1;
    ignore_next = 1;
    left = 3; pending = 1;
    wait (left == 0);
    repeat (100) @(posedge clk);
    checks++;
    if (retries != 1 || sends != 12) begin failures++; $display("retries %0d, requests %0d", retries, sends); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
