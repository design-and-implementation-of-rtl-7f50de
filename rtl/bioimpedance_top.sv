// bioimpedance_top: FPGA logic of the multifrequency bioimpedance analyser.
//
// Signal path (38.4 MHz reference clock clk_ref): the NCO turns the phase
// increment frequency_pio into sine and cosine; the sine goes through
// a2tobin to the DAC, which drives the current source of the analog front
// end. The voltage measured across the tissue comes back through the ADC
// (adc_code) and is demodulated coherently: on every strobe of the selected
// sampling rate (fs_gen_sel, fs_pio) the sample is multiplied by the NCO's
// sine and cosine and summed over filterlen_pio samples. enable_pio starts
// and stops the measurement.
//
// Result path (50 MHz system clock clk_sys): the storage unit takes each
// finished pair of sums across the clock boundary, divides both by the
// filter length to give I and Q, and hands their eight bytes to the UART
// through the UART manager and the UART selector. With txenable_pio low the
// selector gives the transmitter to the processor's to_matlab_pio port
// instead. control_pio tells the processor that a result is ready;
// rs232_pio carries each received byte (bit 8: a one-clock "byte received"
// pulse) to it.
//
// The processor, its memory and peripherals, the PLL that makes clk_ref and
// the converters are outside this module: their signals are ports. The
// processor-side ports are in the clk_sys domain; frequency_pio,
// filterlen_pio and fs_pio must be set before enable_pio rises and held
// while it is high (they cross to clk_ref without synchronisers; enable_pio
// is synchronised). The block structure follows the measurement system;
// clocking the signal path with strobes and the port list are this
// design's choices.
module bioimpedance_top
  import bioz_pkg::*;
#(
  parameter int unsigned BAUD_DIV_P = BAUD_DIV
) (
  input  logic                    clk_sys,
  input  logic                    clk_ref,
  input  logic                    rst_n,
  // converters (offset binary)
  input  logic [ADC_W-1:0]        adc_code,
  output logic [ADC_W-1:0]        dac_code,
  // serial link
  input  logic                    uart_rxd,
  output logic                    uart_txd,
  // processor parallel ports
  input  logic                    enable_pio,
  input  logic [PHASE_W-1:0]      frequency_pio,
  input  logic [FILTLEN_W-1:0]    filterlen_pio,
  input  logic [FSSEL_W-1:0]      fs_pio,
  input  logic                    txenable_pio,
  input  logic [8:0]              to_matlab_pio,
  output logic                    control_pio,
  output logic [8:0]              rs232_pio,
  // averaged results, for observation
  output logic signed [RES_W-1:0] i_res,
  output logic signed [RES_W-1:0] q_res,
  output logic                    res_valid,
  output logic                    overrun
);
  // ---------------- 38.4 MHz signal path ----------------
  logic                    rst_ref_n;
  logic                    enable_ref;
  logic                    fs_stb;
  logic signed [NCO_W-1:0] nco_sin, nco_cos;
  logic                    res_toggle;
  logic signed [ACC_W-1:0] r_sum, j_sum;

  // reset: asserted asynchronously, released synchronously in each domain
  reg_stability #(.W(1), .STAGES(2)) u_rst_ref (.clk(clk_ref), .rst_n, .d(1'b1), .q(rst_ref_n));
  reg_stability #(.W(1), .STAGES(2)) u_en_ref  (.clk(clk_ref), .rst_n(rst_ref_n), .d(enable_pio), .q(enable_ref));

  fs_gen_sel u_fs (
    .clk(clk_ref), .rst_n(rst_ref_n), .fs_sel(fs_pio), .fs_stb, .base_stb());

  nco #(.PHASE_W(PHASE_W), .ANGLE_W(ANGLE_W), .OUT_W(NCO_W)) u_nco (
    .clk(clk_ref), .rst_n(rst_ref_n), .phase_inc(frequency_pio),
    .sin_out(nco_sin), .cos_out(nco_cos));

  a2tobin #(.W(NCO_W)) u_a2tobin (
    .clk(clk_ref), .rst_n(rst_ref_n), .din(nco_sin), .dout(dac_code));

  coherent_demod #(.W(ADC_W), .ACC_W(ACC_W), .LEN_W(FILTLEN_W)) u_demod (
    .clk(clk_ref), .rst_n(rst_ref_n), .enable(enable_ref), .fs_stb,
    .len(filterlen_pio), .adc_code, .lo_sin(nco_sin), .lo_cos(nco_cos),
    .comp(), .res_toggle, .r_sum, .j_sum);

  // ---------------- 50 MHz result and communication path ----------------
  logic       rst_sys_n;
  logic       send, pending, meas_load, tx_load, busy, rx_av;
  logic [7:0] meas_data, tx_data, rx_data;

  reg_stability #(.W(1), .STAGES(2)) u_rst_sys (.clk(clk_sys), .rst_n, .d(1'b1), .q(rst_sys_n));

  storage_unit #(.ACC_W(ACC_W), .RES_W(RES_W), .LEN_W(FILTLEN_W)) u_store (
    .clk(clk_sys), .rst_n(rst_sys_n), .res_toggle, .r_sum, .j_sum,
    .len(filterlen_pio), .send, .pending, .tx_data(meas_data), .tx_load(meas_load),
    .overrun, .i_res, .q_res, .res_valid);

  uart_manager u_mgr (
    .clk(clk_sys), .rst_n(rst_sys_n), .tx_enable(txenable_pio), .pending, .busy, .send);

  uart_selector u_sel (
    .clk(clk_sys), .rst_n(rst_sys_n), .tx_enable(txenable_pio),
    .meas_data, .meas_load, .cpu_byte(pio_byte_t'(to_matlab_pio)), .tx_data, .tx_load);

  uart #(.DIV(BAUD_DIV_P)) u_uart (
    .clk(clk_sys), .rst_n(rst_sys_n), .tx_data, .tx_load, .rxd(uart_rxd),
    .txd(uart_txd), .busy, .rx_data, .rx_av);

  reg_comp u_regcomp (
    .clk(clk_sys), .rst_n(rst_sys_n), .set(res_valid), .enable(enable_pio), .flag(control_pio));

  assign rs232_pio = {rx_av, rx_data};
endmodule
