// tb_uart_selector: checks both routes. With tx_enable high the measurement
// byte and load must appear one clock later; with tx_enable low the
// processor byte must appear and a load pulse must follow only the rising
// edge of its request bit, once per edge however long the bit is held.
module tb_uart_selector;
  import bioz_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_enable, meas_load, tx_load;
  logic [7:0] meas_data, tx_data;
  pio_byte_t cpu_byte;
  int checks = 0, failures = 0, loads = 0, cpu_edges = 0;
  logic prev_strobe;
  uart_selector dut (.clk, .rst_n, .tx_enable, .meas_data, .meas_load, .cpu_byte, .tx_data, .tx_load);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] ed;
    logic       el;
    tx_enable = 0; meas_load = 0; meas_data = 0; cpu_byte = '0; prev_strobe = 0;
    #25 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      #1;
      if (k % 500 == 0) tx_enable = ~tx_enable;
      meas_data = 8'($urandom);
      meas_load = ($urandom_range(0, 5) == 0);
      cpu_byte.data = 8'($urandom);
      if ($urandom_range(0, 8) == 0) cpu_byte.strobe = ~cpu_byte.strobe;
      ed = tx_enable ? meas_data : cpu_byte.data;
      el = tx_enable ? meas_load : (cpu_byte.strobe & ~prev_strobe);
      if (!tx_enable && cpu_byte.strobe && !prev_strobe) cpu_edges++;
      prev_strobe = cpu_byte.strobe;
      @(posedge clk); #1;
      checks++;
      if (tx_data != ed || tx_load != el) begin
        failures++;
        if (failures < 5) $display("k=%0d data=%h/%h load=%b/%b", k, tx_data, ed, tx_load, el);
      end
      if (tx_load) loads++;
    end
    if (cpu_edges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
