// tb_coherent_demod: demodulates synthetic responses of known gain and phase.
//
// The testbench plays an oscillator of amplitude 8191 (lo_sin, lo_cos) and a
// response G*8191*sin(theta + phi) on adc_code (offset binary), four samples
// per period, new values two clocks before each strobe. For every finished
// measurement it compares r_sum and j_sum with the exact sums of the products
// it presented, and the averages with G*8191^2/2*cos(phi) and sin(phi) to
// 0.5 % of full scale. It also checks the comp rate (one per N strobes), that
// measurements follow one another without losing a sample while enable stays
// high, and that dropping enable stops them.
module tb_coherent_demod;
  logic clk = 0, rst_n = 0;
  logic enable, fs_stb;
  logic [13:0] len, adc_code;
  logic signed [13:0] lo_sin, lo_cos;
  logic comp, res_toggle;
  logic signed [41:0] r_sum, j_sum;
  int checks = 0, failures = 0;

  coherent_demod dut (.clk, .rst_n, .enable, .fs_stb, .len, .adc_code,
                      .lo_sin, .lo_cos, .comp, .res_toggle, .r_sum, .j_sum);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_r, exp_j;
  int     n_in_meas, n_meas, strobe_cnt;
  real    gain, phi;
  logic   tog_prev;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int rnd(input real v);
    return (v < 0) ? -int'($rtoi(-v + 0.5)) : int'($rtoi(v + 0.5));
  endfunction

  task automatic run_case(input real g, input real ph_deg, input int n, input int meas,
                          input int step_div);
    int k = 0;
    real th, a;
    longint r_meas, j_meas;
    gain = g; phi = ph_deg * 3.14159265358979 / 180.0;
    len = 14'(n);
    exp_r = 0; exp_j = 0; n_in_meas = 0; n_meas = 0;
    enable = 1;
    @(posedge clk);   // run rises one clock after enable
    while (n_meas < meas) begin
      // present new values, strobe two clocks later
      th = 2.0 * 3.14159265358979 * real'(k) / real'(step_div);
      lo_sin = 14'(rnd(8191.0 * $sin(th)));
      lo_cos = 14'(rnd(8191.0 * $cos(th)));
      a = g * 8191.0 * $sin(th + phi);
      adc_code = 14'(rnd(a) + 8192);
      @(posedge clk); @(posedge clk); #1;
      fs_stb = 1;
      exp_r += longint'(rnd(a)) * longint'(lo_sin);
      exp_j += longint'(rnd(a)) * longint'(lo_cos);
      n_in_meas++;
      k++;
      @(posedge clk); #1;
      fs_stb = 0;
      checks++;
      if (comp !== (n_in_meas == n)) begin
        failures++;
        $display("comp=%b after %0d of %0d samples", comp, n_in_meas, n);
      end
      @(posedge clk); #1;
      if (n_in_meas == n) begin
        n_meas++;
        checks += 3;
        if (res_toggle == tog_prev) begin failures++; $display("res_toggle did not change"); end
        tog_prev = res_toggle;
        if (longint'(r_sum) != exp_r || longint'(j_sum) != exp_j) begin
          failures++;
          $display("R=%0d exp %0d  J=%0d exp %0d", r_sum, exp_r, j_sum, exp_j);
        end
        r_meas = longint'(r_sum) / n;
        j_meas = longint'(j_sum) / n;
        if (n % step_div == 0 && (fabs(real'(r_meas) - g * 8191.0 * 8191.0 / 2.0 * $cos(phi)) > 0.005 * 8191.0 * 8191.0 / 2.0 ||
            fabs(real'(j_meas) - g * 8191.0 * 8191.0 / 2.0 * $sin(phi)) > 0.005 * 8191.0 * 8191.0 / 2.0)) begin
          failures++;
          $display("I=%0d Q=%0d for gain %f phase %f deg", r_meas, j_meas, g, ph_deg);
        end
        exp_r = 0; exp_j = 0; n_in_meas = 0;
      end
    end
    enable = 0;
    @(posedge clk); #1;     // run follows enable one clock later
    repeat (20) begin
      fs_stb = 1; @(posedge clk); #1; fs_stb = 0;
      checks++;
      if (comp) begin failures++; $display("comp while stopped"); end
      @(posedge clk);
    end
  endtask

  initial begin
    enable = 0; fs_stb = 0; len = 4; adc_code = 14'd8192; lo_sin = 0; lo_cos = 0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    tog_prev = res_toggle;
    run_case(0.5,   30.0,  64, 3, 4);
    run_case(0.9,  -75.0, 512, 2, 4);
    run_case(0.1,  150.0, 100, 3, 20);
    run_case(0.99,   0.0,   1, 4, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
