// tb_nco: self-checking test of the NCO.
//
// Runs the oscillator at several phase increments, keeps its own copy of the
// phase accumulator and compares every output sample, ITER+2 clocks later,
// with 8191*sin and 8191*cos of the 16-bit angle computed with $sin/$cos.
// Allowed error is 3 LSB. A frequency change must take effect without a
// phase jump (the reference accumulator simply continues).
module tb_nco;
  localparam int LAT = 16;            // history depth matching the NCO pipeline (ITER+2 clocks)
  logic clk = 0, rst_n = 0;
  logic [31:0] inc;
  logic signed [13:0] s, c;
  int checks = 0, failures = 0;

  nco dut (.clk, .rst_n, .phase_inc(inc), .sin_out(s), .cos_out(c));

  always #13 clk = ~clk;   // ~38.4 MHz

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference accumulator history, value held by the DUT's accumulator
  logic [31:0] ref_acc;
  logic [31:0] hist [LAT+1];
  int maxerr = 0;

  task automatic check_sample();
    real ang, es, ec;
    int ds, dc;
    ang = 2.0 * 3.14159265358979 * real'(hist[LAT][31:16]) / 65536.0;
    es = 8191.0 * $sin(ang);
    ec = 8191.0 * $cos(ang);
    ds = int'($rtoi(es < 0 ? es - 0.5 : es + 0.5)) - int'(s);
    dc = int'($rtoi(ec < 0 ? ec - 0.5 : ec + 0.5)) - int'(c);
    if (ds < 0) ds = -ds;
    if (dc < 0) dc = -dc;
    if (ds > maxerr) maxerr = ds;
    if (dc > maxerr) maxerr = dc;
    checks++;
    if (ds > 3 || dc > 3) begin
      failures++;
      if (failures < 10)
        $display("mismatch angle=%0d sin=%0d exp=%f cos=%0d exp=%f", hist[LAT][31:16], s, es, c, ec);
    end
  endtask

  initial begin
    int n;
    inc = 32'd10737418;     // 96 kHz at 38.4 MHz
    ref_acc = 0;
    for (int i = 0; i <= LAT; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30000; k++) begin
      if (k == 8000)  inc = 32'd894785;      // 8 kHz
      if (k == 12000) inc = 32'd5368709;     // 48 kHz
      if (k == 16000) inc = 32'h1234_5679;   // fast sweep through all angles
      if (k == 22000) inc = 32'h7fff_0001;   // near Nyquist
      @(posedge clk);
      // state after this edge: DUT accumulator = ref_acc + previous inc
      for (int i = LAT; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = ref_acc;
      ref_acc = ref_acc + inc_d;
      #1;
      if (k > LAT + 2) check_sample();
    end
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // increment as seen by the DUT at the edge just taken
  logic [31:0] inc_d;
  always @(posedge clk) inc_d <= inc;
endmodule
