// tb_sample_counter: counts strobes with random spacing for several filter
// lengths and checks that comp is high in the clock after every N-th
// strobe, never elsewhere, and that dropping run restarts the count.
module tb_sample_counter;
  logic clk = 0, rst_n = 0;
  logic run, stb, comp;
  logic [13:0] len, count;
  int checks = 0, failures = 0;
  int n_strobes, n_comp;
  sample_counter dut (.clk, .rst_n, .run, .stb, .len, .comp, .count);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // expected comp: one clock after the strobe that completes N samples
  logic exp_comp;
  int   seen;
  initial begin
    int lens[6] = '{1, 2, 5, 64, 512, 0};
    run = 0; stb = 0; len = 1; exp_comp = 0;
    #12 rst_n = 1;
    foreach (lens[i]) begin
      len = 14'(lens[i]);
      run = 1; seen = 0; n_comp = 0;
      for (int k = 0; k < 3000; k++) begin
        stb = ($urandom_range(0, 2) == 0);
        exp_comp = 0;
        if (stb) begin
          seen++;
          if (seen == ((lens[i] == 0) ? 1 : lens[i])) begin exp_comp = 1; seen = 0; end
        end
        @(posedge clk);
        #1;
        checks++;
        if (comp !== exp_comp) begin
          failures++;
          if (failures < 5) $display("len=%0d k=%0d comp=%b expected %b", lens[i], k, comp, exp_comp);
        end
        if (comp) n_comp++;
      end
      // stop: the count returns to zero
      stb = 0; run = 0;
      @(posedge clk); #1;
      checks++;
      if (count != 0 || comp) failures++;
      if (lens[i] <= 64 && n_comp == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
