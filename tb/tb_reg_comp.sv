// tb_reg_comp: checks the flag against its rule (set by a pulse while
// enable is high, held, cleared when enable is low) for random stimuli.
module tb_reg_comp;
  logic clk = 0, rst_n = 0;
  logic set, enable, flag, model;
  int checks = 0, failures = 0, n_set = 0;
  reg_comp dut (.clk, .rst_n, .set, .enable, .flag);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    set = 0; enable = 0; model = 0;
    #25 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      #1;
      set = ($urandom_range(0, 30) == 0);
      if ($urandom_range(0, 60) == 0) enable = ~enable;
      @(posedge clk);
      if (!enable) model = 0;
      else if (set) begin model = 1; n_set++; end
      #1;
      checks++;
      if (flag != model) begin failures++; if (failures < 5) $display("k=%0d flag=%b expected %b", k, flag, model); end
    end
    if (n_set == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
