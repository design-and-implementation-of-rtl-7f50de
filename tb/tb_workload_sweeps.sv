// tb_workload_sweeps: the measurement campaign the analyser is built for,
// run on the whole design at its default parameters.
//
// The testbench acts as the processor software: every 30 ms (the interval
// timer) it runs one sweep over 8, 32, 48, 64 and 96 kHz with fs = 4*f0 and
// a 512-sample filter, and decodes the 40 result bytes from the serial line
// as the PC does. Three sweeps are run on three loads (rc_load_model):
//   sweep 0: a 150 ohm reference resistor (calibration),
//   sweep 1: 150 ohm in parallel with 150 kohm, 0.1 % lower,
//   sweep 2: 50 ohm in series with (150 ohm parallel 56 nF), a tissue-like
//            RC network.
// Checks: every sweep and all its bytes finish within its 30 ms slot; the
// serial bytes equal the results; the 0.1 % change is detected at every
// frequency (measured change within 0.03 % of the true -0.0999 %); the RC
// network, calibrated against the reference resistor as Z = 150*M/M_ref, is
// within 1 % in magnitude and 0.5 degree in phase of its exact impedance.
// Last, single measurements at 1 MHz and 12.5 MHz (N = 2048, fs = 1.536 MHz)
// on the resistor must give its 8 kHz magnitude within 0.5 % and the phase
// of the path delay within 1 degree. Then four back-to-back results at
// 614.49 kHz with N = 1024 must all reach the serial line with no overrun,
// the limit of the serial link.
// Original design: loads, frequencies, 30 ms interval and the calibration
// against a known resistor. This testbench's choices: N = 512, one sweep
// per load instead of hundreds, an ideal load model, and the tolerances.
`timescale 1ns/1ps
module tb_workload_sweeps;
  logic clk_sys = 0, clk_ref = 0, rst_n = 1;
  logic [13:0] adc_code, dac_code, adc_ref, adc_par, adc_rc;
  logic uart_rxd, uart_txd;
  logic enable_pio, txenable_pio, control_pio;
  logic [31:0] frequency_pio;
  logic [13:0] filterlen_pio;
  logic [3:0]  fs_pio;
  logic [8:0]  to_matlab_pio, rs232_pio;
  logic signed [31:0] i_res, q_res;
  logic res_valid, overrun;
  int   load_sel;

  int checks = 0, failures = 0;

  bioimpedance_top dut (.*);
  rc_load_model #(.R1(150.0))                           m_ref (.clk(clk_ref), .dac_code, .adc_code(adc_ref));
  rc_load_model #(.R1(150.0 * 150.0e3 / 150.15e3))      m_par (.clk(clk_ref), .dac_code, .adc_code(adc_par));
  rc_load_model #(.R1(50.0), .R2(150.0), .C(56.0e-9))   m_rc  (.clk(clk_ref), .dac_code, .adc_code(adc_rc));
  assign adc_code = (load_sel == 0) ? adc_ref : (load_sel == 1) ? adc_par : adc_rc;

  always #10.0    clk_sys = ~clk_sys;
  always #13.0208 clk_ref = ~clk_ref;

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PC side: serial decoder
  logic [7:0] txq [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (195) @(posedge clk_sys);
      if (uart_txd) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (390) @(posedge clk_sys);
        b[i] = uart_txd;
      end
      repeat (390) @(posedge clk_sys);
      txq.push_back(b);
    end
  end

  // overrun is a one-clock pulse: remember it
  int n_overrun = 0;
  always @(posedge clk_sys) if (overrun) n_overrun++;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real fr [5] = '{8.0e3, 32.0e3, 48.0e3, 64.0e3, 96.0e3};
  real mi [3][5], mq [3][5];
  longint ri [5], rq [5];

  // one measurement, as the processor software does it
  task automatic measure(input real f, input int fsel, input int n, output longint i, output longint q);
    frequency_pio = 32'($rtoi(f / 38.4e6 * 4294967296.0 + 0.5));
    fs_pio        = 4'(fsel);
    filterlen_pio = 14'(n);
    @(posedge clk_sys); #1;
    enable_pio = 1;
    while (!control_pio) @(posedge clk_sys);
    i = longint'(i_res); q = longint'(q_res);
    #1 enable_pio = 0;
  endtask

  task automatic sweep(input int s);
    for (int k = 0; k < 5; k++) begin
      measure(fr[k], k, 512, ri[k], rq[k]);
      mi[s][k] = real'(ri[k]); mq[s][k] = real'(rq[k]);
    end
  endtask

  function automatic real wrap_deg(input real d);
    while (d > 180.0)   d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction

  initial begin
    real t_tick, zr, zi, er, ei, mag, emag, ph, eph, d, rel;
    logic [63:0] got;
    uart_rxd = 1; enable_pio = 0; txenable_pio = 0; to_matlab_pio = '0;
    frequency_pio = '0; filterlen_pio = 14'd512; fs_pio = '0; load_sel = 0;
    #1 rst_n = 0;
    #100 rst_n = 1;
    repeat (20) @(posedge clk_sys);
    txenable_pio = 1;
    t_tick = $realtime;
    for (int s = 0; s < 3; s++) begin
      load_sel = s;
      sweep(s);
      // all 40 bytes of the sweep must be out before the next 30 ms tick
      while (txq.size() < 40 && $realtime < t_tick + 30.0e6) @(posedge clk_sys);
      checks++;
      if (txq.size() < 40) begin failures++; $display("sweep %0d: only %0d bytes in its 30 ms slot", s, txq.size()); end
      else $display("sweep %0d: done %0.2f ms after its tick", s, ($realtime - t_tick) / 1.0e6);
      for (int k = 0; k < 5 && txq.size() >= 8; k++) begin
        for (int i = 0; i < 8; i++) got[63 - 8*i -: 8] = txq.pop_front();
        checks++;
        if (got != {32'(ri[k]), 32'(rq[k])}) begin failures++; $display("serial bytes %h, expected %h", got, {32'(ri[k]), 32'(rq[k])}); end
      end
      while ($realtime < t_tick + 30.0e6) @(posedge clk_sys);
      t_tick = t_tick + 30.0e6;
    end

    for (int k = 0; k < 5; k++) begin
      // 0.1 % change
      rel = $sqrt(mi[1][k]*mi[1][k] + mq[1][k]*mq[1][k]) / $sqrt(mi[0][k]*mi[0][k] + mq[0][k]*mq[0][k]) - 1.0;
      checks++;
      if (fabs(rel - (-1.0 / 1001.0)) > 0.0003) begin failures++; $display("%0.0f Hz: change %f %% not resolved", fr[k], rel * 100.0); end
      // RC network, calibrated against the reference resistor
      d  = mi[0][k]*mi[0][k] + mq[0][k]*mq[0][k];
      zr = 150.0 * (mi[2][k]*mi[0][k] + mq[2][k]*mq[0][k]) / d;
      zi = 150.0 * (mq[2][k]*mi[0][k] - mi[2][k]*mq[0][k]) / d;
      er = m_rc.zre(fr[k]); ei = m_rc.zim(fr[k]);
      mag = $sqrt(zr*zr + zi*zi); emag = $sqrt(er*er + ei*ei);
      ph  = $atan2(zi, zr) * 180.0 / 3.14159265358979;
      eph = $atan2(ei, er) * 180.0 / 3.14159265358979;
      $display("%6.0f Hz: change %8.4f %%   Z = %7.3f %7.3fj ohm (exact %7.3f %7.3fj), |Z| err %6.3f %%, phase err %6.3f deg",
               fr[k], rel * 100.0, zr, zi, er, ei, (mag / emag - 1.0) * 100.0, ph - eph);
      checks += 2;
      if (fabs(mag / emag - 1.0) > 0.01) begin failures++; $display("magnitude off"); end
      if (fabs(ph - eph) > 0.5) begin failures++; $display("phase off"); end
    end
    // single frequencies above the sweep band, on the reference resistor,
    // sampled at fs = 1.536 MHz with N = 2048 (the ADC itself runs at the
    // 38.4 MHz reference, so the sample strobe may be slower than f0).
    // Expected: the 8 kHz magnitude, and the phase of the path lag (a whole
    // number of reference clocks, estimated at 96 kHz).
    load_sel = 0;
    begin
      real hf [2] = '{1.0e6, 12.5e6};
      real m0, tau, hph, pph;
      m0  = $sqrt(mi[0][0]*mi[0][0] + mq[0][0]*mq[0][0]);
      tau = $atan2(-mq[0][4], mi[0][4]) / (2.0 * 3.14159265358979 * 96.0e3) * 38.4e6;
      for (int k = 0; k < 2; k++) begin
        measure(hf[k], 6, 2048, ri[k], rq[k]);
        mag = $sqrt(real'(ri[k])*real'(ri[k]) + real'(rq[k])*real'(rq[k]));
        hph = $atan2(-real'(rq[k]), real'(ri[k])) * 180.0 / 3.14159265358979;
        // the path is a whole number of clocks; 96 kHz fixes which one
        pph = 360.0 * hf[k] * real'($rtoi(tau + 0.5)) / 38.4e6;
        $display("%8.0f Hz: |M| %f of the 8 kHz value, phase %7.2f deg, expected %7.2f (lag %f clocks)",
                 hf[k], mag / m0, hph, wrap_deg(pph), tau);
        checks += 2;
        if (fabs(mag / m0 - 1.0) > 0.005) begin failures++; $display("magnitude off"); end
        if (fabs(wrap_deg(hph - pph)) > 1.0) begin failures++; $display("phase off"); end
      end
      while (txq.size() < 16) @(posedge clk_sys);
      for (int k = 0; k < 2; k++) begin
        for (int i = 0; i < 8; i++) got[63 - 8*i -: 8] = txq.pop_front();
        checks++;
        if (got != {32'(ri[k]), 32'(rq[k])}) begin failures++; $display("serial bytes %h, expected %h", got, {32'(ri[k]), 32'(rq[k])}); end
      end
    end
    // link limit: back-to-back results at 614.49 kHz with N = 1024 and the
    // highest built rate, fs = 1.536 MHz: a result every 667 us against
    // 624 us of serial time for its 8 bytes, so nothing may be overwritten.
    checks++;
    if (n_overrun != 0) begin failures++; $display("overrun during the sweeps"); end
    for (int k = 0; k < 4; k++) measure(614.49e3, 6, 1024, ri[k], rq[k]);
    while (txq.size() < 32) @(posedge clk_sys);
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 8; i++) got[63 - 8*i -: 8] = txq.pop_front();
      checks++;
      if (got != {32'(ri[k]), 32'(rq[k])}) begin failures++; $display("serial bytes %h, expected %h", got, {32'(ri[k]), 32'(rq[k])}); end
    end
    $display("614.49 kHz, N = 1024, back to back: %0d overruns", n_overrun);
    checks++;
    if (n_overrun != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
