// tb_bioimpedance_top: end-to-end run of the whole design at its default
// parameters, with the testbench playing the processor software and the PC.
//
//  1. PC -> processor: a request byte (1) is sent on the serial line after a
//     short noise pulse; it must arrive once on rs232_pio (the noise pulse
//     must not produce a byte).
//  2. Processor -> PC: with txenable low the processor answers ACK (1)
//     through to_matlab_pio; the byte must appear on the serial line.
//  3. One multifrequency sweep: with txenable high the processor measures
//     at 8, 32, 48, 64 and 96 kHz (phase increments for the 38.4 MHz
//     reference, fs_pio 0..4 = four samples per period, filter length 512):
//     set the parameters, raise enable, wait for control_pio, drop enable.
//     The load is tissue_model (gain 0.6, 20-clock lag). Each result must
//     have magnitude 0.6 * 8191^2 / 2 within 0.5 % and a phase that grows
//     in proportion to frequency (one common delay between 20 and 24
//     clocks). The eight bytes of each result, decoded from the serial line
//     by the testbench, must equal I and Q, most significant byte first.
//     Each measurement must take 512 sample periods (checked on the clock).
//  4. Overrun: sampling at 1.536 MHz with a 16-sample filter produces
//     results faster than the serial link can send them; overrun must be
//     reported.
// Every mechanism above is counted and a failure is counted for one that
// never happened.
`timescale 1ns/1ps
module tb_bioimpedance_top;
  logic clk_sys = 0, clk_ref = 0, rst_n = 1;
  logic [13:0] adc_code, dac_code;
  logic uart_rxd, uart_txd;
  logic enable_pio, txenable_pio, control_pio;
  logic [31:0] frequency_pio;
  logic [13:0] filterlen_pio;
  logic [3:0]  fs_pio;
  logic [8:0]  to_matlab_pio, rs232_pio;
  logic signed [31:0] i_res, q_res;
  logic res_valid, overrun;
  logic [16:0] gain_q16;

  int checks = 0, failures = 0;

  bioimpedance_top dut (.*);
  tissue_model #(.DELAY(20)) load (.clk(clk_ref), .gain_q16, .dac_code, .adc_code);

  always #10.0    clk_sys = ~clk_sys;   // 50 MHz
  always #13.0208 clk_ref = ~clk_ref;   // 38.4 MHz

  initial begin : watchdog
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_comp = 0, n_overrun = 0, n_rx = 0, n_tx_bytes = 0, n_noise = 0;
  int n_cpu_bytes = 0, n_meas = 0, n_fs_modes = 0;
  always @(posedge clk_sys) if (overrun) n_overrun++;

  // ---- PC side: serial decoder on uart_txd (128.2 kbit/s = 390 clocks) ----
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
      checks++;
      if (!uart_txd) begin failures++; $display("missing stop bit"); end
      txq.push_back(b);
      n_tx_bytes++;
    end
  end

  // ---- processor side: bytes from rs232_pio ----
  logic [7:0] rxq [$];
  always @(posedge clk_sys) if (rs232_pio[8]) begin rxq.push_back(rs232_pio[7:0]); n_rx++; end

  task automatic pc_send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (390) @(posedge clk_sys);
    end
  endtask

  task automatic cpu_send(input logic [7:0] b);
    @(posedge clk_sys); #1;
    to_matlab_pio = {1'b1, b};
    repeat (4) @(posedge clk_sys);
    #1 to_matlab_pio[8] = 1'b0;
    repeat (10 * 390 + 20) @(posedge clk_sys);
  endtask

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---- one measurement at one frequency, as the processor software does ----
  real  tau [5];
  task automatic measure(input int k, input real f0, input int fs_div);
    real t0, t1, mag, ph, expmag, nper;
    longint ir, qr;
    logic [63:0] got;
    frequency_pio = 32'($rtoi(f0 / 38.4e6 * 4294967296.0 + 0.5));
    fs_pio        = 4'(k);
    filterlen_pio = 14'd512;
    @(posedge clk_sys); #1;
    enable_pio = 1;
    t0 = $realtime;
    while (!control_pio) @(posedge clk_sys);
    t1 = $realtime;
    n_comp++;
    ir = longint'(i_res); qr = longint'(q_res);
    #1 enable_pio = 0;
    // measurement time: 512 sample periods of 25*fs_div reference clocks,
    // less up to one period (the first strobe falls anywhere in the first period)
    // plus the hand-over latency to control_pio
    nper = (t1 - t0) / (25.0 * fs_div * 26.0416);
    checks++;
    if (nper < 511.0 || nper > 516.0) begin failures++; $display("%0.0f Hz: took %f sample periods", f0, nper); end
    mag    = $sqrt(real'(ir) * real'(ir) + real'(qr) * real'(qr));
    expmag = 0.6 * 8191.0 * 8191.0 / 2.0;
    ph     = $atan2(-real'(qr), real'(ir));
    tau[k] = ph / (2.0 * 3.14159265358979 * f0) * 38.4e6;
    $display("%6.0f Hz: I=%0d Q=%0d |Z|=%f (%f of expected) lag=%f clocks", f0, ir, qr, mag, mag / expmag, tau[k]);
    checks += 2;
    if (fabs(mag / expmag - 1.0) > 0.005) begin failures++; $display("magnitude off"); end
    if (tau[k] < 20.0 || tau[k] > 24.0) begin failures++; $display("lag off"); end
    // the eight bytes on the serial line
    wait (txq.size() >= 8);
    for (int i = 0; i < 8; i++) got[63 - 8*i -: 8] = txq.pop_front();
    checks++;
    if (got != {32'(ir), 32'(qr)}) begin failures++; $display("serial bytes %h, expected %h", got, {32'(ir), 32'(qr)}); end
    n_meas++;
    n_fs_modes++;
  endtask

  initial begin
    real fr [5] = '{8.0e3, 32.0e3, 48.0e3, 64.0e3, 96.0e3};
    int  dv [5] = '{48, 12, 8, 6, 4};
    real tmin, tmax;
    uart_rxd = 1; enable_pio = 0; txenable_pio = 0; to_matlab_pio = '0;
    frequency_pio = '0; filterlen_pio = 14'd512; fs_pio = '0; gain_q16 = 17'd39322;  // 0.6
    #1 rst_n = 0;           // asynchronous reset edge
    #100 rst_n = 1;
    repeat (20) @(posedge clk_sys);

    // 1. request from the PC, preceded by a noise pulse on the line
    uart_rxd = 0; repeat (12) @(posedge clk_sys); uart_rxd = 1; n_noise++;
    repeat (500) @(posedge clk_sys);
    pc_send(8'd1);
    repeat (400) @(posedge clk_sys);
    checks++;
    if (rxq.size() != 1 || rxq[0] != 8'd1) begin failures++; $display("request not received once (%0d bytes)", rxq.size()); end

    // 2. processor answers ACK through its own port
    cpu_send(8'd1);
    wait (txq.size() >= 1);
    checks++;
    if (txq.pop_front() != 8'd1) begin failures++; $display("ACK not seen"); end
    else n_cpu_bytes++;

    // 3. one sweep over the five frequencies
    txenable_pio = 1;
    for (int k = 0; k < 5; k++) measure(k, fr[k], dv[k]);
    tmin = tau[0]; tmax = tau[0];
    for (int k = 1; k < 5; k++) begin
      if (tau[k] < tmin) tmin = tau[k];
      if (tau[k] > tmax) tmax = tau[k];
    end
    checks++;
    // the 8 kHz phase is only 1.7 degrees, so allow a wider spread there
    if (tmax - tmin > 1.0) begin failures++; $display("lag differs between frequencies: %f..%f", tmin, tmax); end

    // 4. results faster than the link: overrun
    frequency_pio = 32'd42949673;   // 384 kHz
    fs_pio = 4'd6; filterlen_pio = 14'd16;
    @(posedge clk_sys); #1 enable_pio = 1;
    repeat (20000) @(posedge clk_sys);
    #1 enable_pio = 0;
    n_fs_modes++;
    repeat (40000) @(posedge clk_sys);

    // ---- mechanisms ----
    checks += 7;
    if (n_comp != 5)      begin failures++; $display("measurements: %0d", n_comp); end
    if (n_overrun == 0)   begin failures++; $display("no overrun seen"); end
    if (n_noise == 0 || n_rx != 1) begin failures++; $display("receiver: %0d bytes", n_rx); end
    if (n_cpu_bytes != 1) failures++;
    if (n_meas != 5)      failures++;
    if (n_fs_modes != 6)  failures++;
    if (n_tx_bytes < 41)  begin failures++; $display("serial bytes: %0d", n_tx_bytes); end
    $display("measurements=%0d overruns=%0d rx_bytes=%0d noise_pulses=%0d cpu_bytes=%0d serial_bytes=%0d fs_modes=%0d",
             n_comp, n_overrun, n_rx, n_noise, n_cpu_bytes, n_tx_bytes, n_fs_modes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
