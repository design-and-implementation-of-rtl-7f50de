// bioz_pkg: widths and constants shared by the bioimpedance measurement logic.
//
// The converter and oscillator widths (14-bit samples, 32-bit phase
// accumulator, 16-bit phase angle, 14-bit filter length) and the clock and
// baud numbers (50 MHz system clock, 38.4 MHz reference, 390 clocks per bit)
// are those of the measurement system. The accumulator and result widths are
// this design's choice: ACC_W holds 16383 full-scale 14x14-bit products
// without overflow, RES_W is the 32-bit word sent for each of I and Q.
package bioz_pkg;

  localparam int unsigned ADC_W     = 14;   // ADC and DAC sample width
  localparam int unsigned NCO_W     = 14;   // NCO magnitude precision
  localparam int unsigned PHASE_W   = 32;   // NCO phase accumulator
  localparam int unsigned ANGLE_W   = 16;   // NCO angular resolution
  localparam int unsigned FILTLEN_W = 14;   // filter length N (filterlen_pio)
  localparam int unsigned FSSEL_W   = 4;    // sampling-rate select (fs_pio)
  localparam int unsigned PROD_W    = ADC_W + NCO_W;
  localparam int unsigned ACC_W     = PROD_W + FILTLEN_W;   // 42
  localparam int unsigned RES_W     = 32;   // averaged I or Q word
  localparam int unsigned RES_BYTES = 2 * RES_W / 8;        // bytes per measurement

  localparam int unsigned SYS_CLK_HZ  = 50_000_000;
  localparam int unsigned REF_CLK_HZ  = 38_400_000;
  localparam int unsigned BAUD_DIV    = 390;  // 50 MHz / 128 kbit/s
  localparam int unsigned BAUD_CNT_W  = 13;
  localparam int unsigned RX_FILTER   = 30;   // start-bit glitch filter length

  // Processor-side byte port: data plus a strobe bit (to_matlab_pio, rs232_pio)
  typedef struct packed {
    logic       strobe;
    logic [7:0] data;
  } pio_byte_t;

endpackage
