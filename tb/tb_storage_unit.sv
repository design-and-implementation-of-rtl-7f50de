// tb_storage_unit: presents measurement sums with a toggle (as the
// demodulator does, from an unrelated clock) and plays the UART manager.
// For each result the eight bytes handed out must be R/N then J/N, 32 bits
// each, most significant byte first, truncated toward zero; i_res, q_res
// and res_valid must agree. A result that arrives while bytes are still
// pending must pulse overrun and replace the old bytes.
module tb_storage_unit;
  logic clk = 0, rst_n = 0;
  logic res_toggle = 0;
  logic signed [41:0] r_sum, j_sum;
  logic [13:0] len;
  logic send, pending, tx_load, overrun, res_valid;
  logic [7:0] tx_data;
  logic signed [31:0] i_res, q_res;
  int checks = 0, failures = 0, n_over = 0, n_valid = 0;
  storage_unit dut (.clk, .rst_n, .res_toggle, .r_sum, .j_sum, .len, .send, .pending,
                    .tx_data, .tx_load, .overrun, .i_res, .q_res, .res_valid);
  always #10 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    if (overrun) n_over++;
    if (res_valid) n_valid++;
  end

  task automatic post(input longint r, input longint j, input int n);
    #3;
    r_sum = 42'(r); j_sum = 42'(j); len = 14'(n);
    #4 res_toggle = ~res_toggle;
  endtask

  task automatic collect(input longint r, input longint j, input int n);
    logic [63:0] exp_w, got;
    longint ei, eq;
    int b = 0, guard = 0;
    ei = r / longint'(n);
    eq = j / longint'(n);
    exp_w = {32'(ei), 32'(eq)};
    while (b < 8 && guard < 5000) begin
      @(posedge clk); #1;
      guard++;
      if (pending && guard % 7 == 0) begin
        send = 1; @(posedge clk); #1; send = 0;
        checks++;
        if (!tx_load) failures++;
        got[63 - 8*b -: 8] = tx_data;
        b++;
      end
    end
    checks += 3;
    if (got != exp_w) begin failures++; $display("bytes %h expected %h", got, exp_w); end
    if (longint'(i_res) != ei || longint'(q_res) != eq) begin
      failures++; $display("I=%0d Q=%0d expected %0d %0d", i_res, q_res, ei, eq);
    end
    repeat (3) @(posedge clk);
    #1;
    if (pending) failures++;
  endtask

  initial begin
    int nv;
    send = 0; r_sum = 0; j_sum = 0; len = 1;
    #25 rst_n = 1;
    repeat (3) @(posedge clk);
    post(1000, -1000, 4);                 collect(1000, -1000, 4);
    post(-(longint'(1) <<< 40), 12345678, 512); collect(-(longint'(1) <<< 40), 12345678, 512);
    for (int k = 0; k < 20; k++) begin
      longint r, j;
      int n;
      n = int'($urandom_range(1, 16383));
      // averages up to +/-2^27, as from 14x14-bit products
      r = longint'($signed($urandom) >>> 4) * longint'(n) + longint'($urandom_range(0, 999));
      j = longint'($signed($urandom) >>> 4) * longint'(n) - longint'($urandom_range(0, 999));
      post(r, j, n);
      collect(r, j, n);
    end
    // overrun: a second result before the first one's bytes are taken
    nv = n_over;
    post(5000, 6000, 10);
    repeat (150) @(posedge clk);
    post(7000, -8000, 10);
    collect(7000, -8000, 10);
    checks++;
    if (n_over != nv + 1) begin failures++; $display("overrun count %0d", n_over - nv); end
    checks++;
    if (n_valid != 24) begin failures++; $display("res_valid count %0d", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
