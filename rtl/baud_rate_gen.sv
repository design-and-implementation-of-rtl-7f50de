// baud_rate_gen: bit-slot timer of the UART (BaudRateGenerator).
//
// While en is high the generator pulses tick for one clock every DIV clocks,
// one bit slot (50 MHz / 390 = 128.2 kbit/s by default). The first tick after
// en rises comes after `first` clocks instead: the receiver uses DIV/3 so that
// its later ticks fall about 40 % into each bit, the transmitter uses 1 so
// the start bit begins at once. While en is low the counter is parked, so
// every enable starts a fresh bit-slot sequence. The 13-bit counter and the
// 390-clock slot are the measurement system's; the form of the trigger
// level input is this design's reading of it.
module baud_rate_gen #(
  parameter int unsigned CNT_W = 13,
  parameter int unsigned DIV   = 390
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [CNT_W-1:0] first,
  output logic             tick
);
  logic [CNT_W-1:0] cnt;

  assign tick = en && (cnt == CNT_W'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (!en)     cnt <= CNT_W'(DIV) - first;
    else if (tick)    cnt <= '0;
    else              cnt <= cnt + 1'b1;
  end
endmodule
