// tb_uart_tx: loads random bytes and watches the line. For each frame it
// checks that the start bit begins one clock after the load is taken, that every bit
// (start, 8 data bits LSB first, stop) lasts exactly 390 clocks with the
// right level, that busy covers the frame, and that a load while busy is
// ignored.
module tb_uart_tx;
  logic clk = 0, rst_n = 0;
  logic load, txd, busy;
  logic [7:0] data;
  int checks = 0, failures = 0;
  uart_tx dut (.clk, .rst_n, .load, .data, .txd, .busy);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic send(input logic [7:0] b);
    logic [9:0] frame;
    int n;
    frame = {1'b1, b, 1'b0};
    data = b; load = 1;
    @(posedge clk); #1;
    load = 0; data = ~b;
    checks++;
    if (!busy) failures++;
    n = 0;
    while (txd && n < 10) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != 1) begin failures++; $display("start bit after %0d clocks", n); end
    for (int i = 0; i < 10; i++) begin
      for (int c = 0; c < 390; c++) begin
        if (c == 2 && i == 3) begin
          // a load in the middle of the frame must be ignored
          load = 1; @(posedge clk); #1; load = 0;
        end else begin
          @(posedge clk); #1;
        end
        if (txd != frame[i] && !(i == 9 && c == 389)) begin
          if (c != 389) begin
            failures++;
            if (failures < 10) $display("byte %h bit %0d clock %0d: txd=%b", b, i, c, txd);
          end
        end
      end
      checks++;
    end
    checks++;
    if (busy) begin failures++; $display("busy still high after frame"); end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!txd || busy) failures++;
  endtask
  initial begin
    load = 0; data = 0;
    #25 rst_n = 1;
    repeat (3) @(posedge clk);
    #1;
    send(8'h55); send(8'h00); send(8'hFF); send(8'hA3);
    repeat (4) send(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
