// tb_reset_controller: checks clr and run against the rule
// run = enable delayed one clock, clr = comp | !run, for random stimuli.
module tb_reset_controller;
  logic clk = 0, rst_n = 0;
  logic enable, comp, clr, run;
  logic en_prev;
  int checks = 0, failures = 0;
  reset_controller dut (.clk, .rst_n, .enable, .comp, .clr, .run);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    enable = 0; comp = 0; en_prev = 0;
    #7;
    checks++;
    if (!clr || run) failures++;       // in reset the accumulators are cleared
    #5 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      if ($urandom_range(0, 20) == 0) enable = ~enable;
      @(posedge clk);
      en_prev = enable;
      #1;
      comp = ($urandom_range(0, 10) == 0);
      #1;
      checks++;
      if (run !== en_prev || clr !== (comp | ~en_prev)) begin
        failures++;
        if (failures < 5) $display("k=%0d run=%b clr=%b enable(prev)=%b comp=%b", k, run, clr, en_prev, comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
