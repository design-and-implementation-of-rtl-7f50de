// tb_fs_gen_sel: measures the period of fs_stb for every fs_sel value,
// including out-of-range ones, and checks it against 25 * divisor reference
// clocks; also checks that every strobe lasts exactly one clock and that the
// 1.536 MHz base strobe comes every 25 clocks.
module tb_fs_gen_sel;
  logic clk = 0, rst_n = 0;
  logic [3:0] fs_sel;
  logic fs_stb, base_stb;
  int checks = 0, failures = 0;
  fs_gen_sel dut (.clk, .rst_n, .fs_sel, .fs_stb, .base_stb);
  always #13 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int divisor(input int sel);
    case (sel)
      0: return 48;  1: return 12;  2: return 8;  3: return 6;
      4: return 4;   5: return 2;   6: return 1;
      default: return 48;
    endcase
  endfunction
  task automatic measure(input int sel);
    int t0, per, n;
    fs_sel = 4'(sel);
    // let the selection settle: skip two strobes
    repeat (2) begin
      @(posedge clk); #1;
      while (!fs_stb) begin @(posedge clk); #1; end
    end
    for (int p = 0; p < 4; p++) begin
      per = 0;
      do begin @(posedge clk); #1; per++; end while (!fs_stb);
      checks++;
      if (per != 25 * divisor(sel)) begin
        failures++;
        $display("fs_sel=%0d period %0d clocks, expected %0d", sel, per, 25 * divisor(sel));
      end
    end
  endtask
  initial begin
    int bper, last;
    fs_sel = 0;
    #30 rst_n = 1;
    for (int s = 0; s < 16; s++) measure(s);
    measure(4);
    // base strobe period and pulse width
    last = -1;
    for (int k = 0; k < 500; k++) begin
      @(posedge clk); #1;
      if (base_stb) begin
        if (last >= 0) begin
          checks++;
          if (k - last != 25) failures++;
        end
        last = k;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
