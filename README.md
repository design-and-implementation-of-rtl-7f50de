# Coherent bioimpedance analyser: FPGA logic

This design measures the electrical impedance of tissue at several
frequencies, using only a small FPGA, a dual ADC/DAC board and an analog
front end. The FPGA makes a sine wave. The front end turns it into a
constant-amplitude current through the tissue and returns the voltage
across it. The FPGA then multiplies that voltage by the same sine and by its
cosine and averages each product. This gives the in-phase and quadrature
parts (I, Q) of the impedance at that frequency. Each I/Q pair goes to a
PC over a serial line.

The design's main use is a sweep over 8, 32, 48, 64 and 96 kHz that repeats
every 30 ms. It targets impedances from 10 Ω to 1 kΩ with about 1 % error
in magnitude. A soft processor (outside this RTL) sets the frequency,
sampling rate and averaging length for each step. It starts and stops each
measurement and talks to the PC.

All RTL is SystemVerilog-2017 in `rtl/`, one module or package per file.
Self-checking testbenches are in `tb/`.

## How one measurement works

The tissue voltage is `Vd(t) = A·sin(2πf0·t + φ)`, where `A` is proportional
to |Z| and `φ` is the phase of Z. The local oscillators have amplitude `B`
(8191). The two products are:

    Vd·sin = A·B/2 · (cos φ − cos(4πf0·t + φ))
    Vd·cos = A·B/2 · (sin φ + sin(4πf0·t + φ))

Summing N products is a moving-average low-pass filter. Its response is a
sinc with nulls at multiples of fs/N. When the N samples cover a whole
number of periods of f0, the 2·f0 terms cancel exactly. What remains is:

    R = Σ x·sin = N·A·B/2·cos φ        I = R / N
    J = Σ x·cos = N·A·B/2·sin φ        Q = J / N

The standard set samples at fs = 4·f0 (four samples per period), so any
filter length that is a multiple of 4 gives exact cancellation. The PC turns
(I, Q) into |Z| and φ with a calibration on known resistors. Delays in the
converters and the front end add a phase lag of 2π·f0·τ, which the
calibration removes. In simulation the lag is exactly the model's delay
plus two register stages (see the top-level testbench).

Hardware for this, in the 38.4 MHz reference domain:

| block | file | what it does |
|---|---|---|
| NCO | `nco.sv` | 32-bit phase accumulator. The top 16 bits feed a 16-stage pipelined CORDIC that gives 14-bit sine and cosine, amplitude ±8191. |
| DAC coding | `a2tobin.sv` | Converts two's complement to the DAC's offset binary by inverting the sign bit. Output is registered. |
| ADC coding | `bintoa2.sv` | Converts the ADC's offset binary back to two's complement. Output is registered. |
| sampling rate | `fs_gen_sel.sv` | Divides 38.4 MHz by 25 to a 1.536 MHz base strobe. Parallel counters divide that further, and `fs_sel` picks one as the sample strobe `fs_stb`. |
| demodulator | `coherent_demod.sv` | Holds `bintoa2`, two `multacum` branches (I: ×sin, Q: ×cos), `sample_counter` and `reset_controller`. |
| multiply-accumulate | `multacum.sv` | Each `fs_stb` adds `x·lo` to a 42-bit sum. 16383 full-scale products cannot overflow it. |
| filter length | `sample_counter.sv` | Counts strobes. After the N-th it pulses `comp` (measurement done). |
| clear logic | `reset_controller.sv` | Clears the accumulators on `comp` and while the measurement is disabled. |

On `comp`, the demodulator copies R and J into holding registers and toggles
`res_toggle`. The accumulators restart from the next sample, and none is lost
between back-to-back measurements. The held sums stay unchanged for at
least N sample periods, which is much longer than the other domain needs to
read them.

Each phase increment is `round(f0 / 38.4 MHz · 2^32)`:

| f0 | phase increment | fs_sel | fs | N = 512 takes |
|---|---|---|---|---|
| 8 kHz | 894785 | 0 | 32 kHz | 16.0 ms |
| 32 kHz | 3579139 | 1 | 128 kHz | 4.0 ms |
| 48 kHz | 5368709 | 2 | 192 kHz | 2.67 ms |
| 64 kHz | 7158279 | 3 | 256 kHz | 2.0 ms |
| 96 kHz | 10737418 | 4 | 384 kHz | 1.33 ms |

`fs_sel` 5 and 6 give 768 kHz and 1.536 MHz. Values above 6 fall back to
entry 0. One sweep at N = 512 samples for 26 ms, which fits the 30 ms
sweep period. The 38.4 MHz reference is a whole multiple of every sampling
period in the table, so sample instants do not jitter against the
oscillator.

## Two clock domains

| domain | clock | contents |
|---|---|---|
| reference | 38.4 MHz `clk_ref` | NCO, converter coding, fs generator, demodulator |
| system | 50 MHz `clk_sys` | storage unit, divider, UART, UART manager and selector, processor flag |

All sampling rates are one-clock strobes (clock enables) in the reference
domain, not derived clocks. Signals cross between the domains like this:

- **Results, reference to system.** `res_toggle` passes a two-flop
  synchroniser (`reg_stability.sv`). Its edge tells the storage unit that
  `r_sum`/`j_sum` are stable and can be copied. The 42-bit buses themselves
  are never synchronised bit by bit.
- **enable, system to reference.** It is synchronised.
- **Configuration, system to reference.** `frequency_pio`, `filterlen_pio`
  and `fs_pio` are quasi-static. Software must set them before raising
  `enable_pio` and hold them while it is high.
- **Reset.** It is asserted asynchronously and released synchronously in
  each domain.

## From sums to bytes on the serial line

`storage_unit.sv` catches each new result. It divides R and then J by the
filter length using `seq_divider.sv`, a bit-serial restoring divider that
produces one quotient bit per clock (43 clocks per division). This gives
I and Q as 32-bit two's-complement numbers, truncated toward zero, and
pulses `res_valid`. It then offers the eight bytes in this order:

    I[31:24] I[23:16] I[15:8] I[7:0] Q[31:24] Q[23:16] Q[15:8] Q[7:0]

`uart_manager.sv` asks for one byte whenever the UART is idle and bytes
remain. It waits for the UART to go busy and then idle again before asking
for the next byte. If the UART does not take a byte within 8 clocks, the
manager asks again.

`uart_selector.sv` gives the single transmitter to one of two sources:

- **`txenable_pio` high:** the measurement path.
- **`txenable_pio` low:** the processor's `to_matlab_pio` port. Bit 8 is
  the load request and bits 7:0 the byte. A rising edge on bit 8 sends one
  byte.

**Overrun.** One result takes 8 × 10 × 390 clocks ≈ 624 µs to send. If a
new result arrives before the previous one's bytes have all been handed out,
the new one replaces them and `overrun` pulses. Fast settings (a high fs
with a short filter) cause this, because the link cannot keep up.

### UART

`uart.sv` sends 8 data bits, one stop bit and no parity. With `DIV` = 390
clocks per bit at 50 MHz the line runs at 128.2 kbit/s.

Transmitter (`uart_tx.sv`):

- The states are Idle → Ready → Start → Shift ×8 → Stop, sent LSB first.
- `busy` covers the whole frame: 3901 clocks from load to idle.

Receiver (`uart_rx.sv`):

- Idle → Filter: a low must last 30 consecutive clocks, or the receiver
  returns to Idle. Noise pulses are rejected this way.
- Start: the baud generator is enabled. Its first tick comes after DIV/3
  clocks.
- Capture ×8: every later tick is one bit slot apart, about 40 % into each
  bit. It tolerates a rate error of ±2.5 % (tested).
- Stop: `data_av` pulses for one clock with the byte.
- The input passes a two-flop synchroniser first.

Both directions use `baud_rate_gen.sv`. It ticks every `DIV` clocks, and
its first tick comes after a programmable number of clocks (the "trigger
level").

## The processor interface

The processor, its program memory, a 30 ms interval timer and its parallel
ports are not part of this RTL. Their signals are ports of
`bioimpedance_top`, all in the 50 MHz domain:

| port | dir | width | meaning |
|---|---|---|---|
| `enable_pio` | in | 1 | start (1) / stop (0) measuring |
| `frequency_pio` | in | 32 | NCO phase increment |
| `filterlen_pio` | in | 14 | filter length N (0 is treated as 1) |
| `fs_pio` | in | 4 | sampling-rate select |
| `txenable_pio` | in | 1 | 1: UART sends results, 0: UART sends `to_matlab_pio` |
| `to_matlab_pio` | in | 9 | processor byte, bit 8 = send |
| `control_pio` | out | 1 | result ready; held until `enable_pio` falls (`reg_comp.sv`) |
| `rs232_pio` | out | 9 | received byte, bit 8 = one-clock "byte received" |

The remaining ports are:

- `adc_code` in and `dac_code` out: 14-bit offset binary, on `clk_ref`.
- `uart_rxd` and `uart_txd`.
- The observation outputs `i_res`, `q_res`, `res_valid` and `overrun`.

The software sweep is expected to run like this:

1. Set `txenable_pio`.
2. For each frequency, write the phase increment, `fs_pio` and
   `filterlen_pio`. Raise `enable_pio`, wait for `control_pio`, then lower
   `enable_pio`.
3. Wait for the next 30 ms tick and repeat.

The results go out on the serial line by themselves. The PC protocol is
simple. A request byte (1) arrives on `rs232_pio`. The processor answers
with an ACK (1) or NACK (0) through `to_matlab_pio`, with `txenable_pio`
low. It then receives the number of sweeps the same way.

## Not in this RTL

- **The processor system.** A 32-bit soft CPU with 20 KB of on-chip RAM, a
  JTAG UART, an interval timer and parallel I/O cores. These are vendor
  components and are replaced here by the ports above.
- **The PLL that makes 38.4 MHz.** The reference clock is an input.
- **The converter board.** A dual 14-bit ADC (up to 65 MS/s) and DAC (up to
  125 MS/s) with AC-coupling transformers.
  Only the two 14-bit data buses are ports of the top; the converter
  clock, output-enable and power-down pins are left to the pin assignment.
- **The analog front end.** A current source, a differential amplifier and
  a transimpedance amplifier.
- **The RS-232 level shifter and the USB-serial converter.**

For simulation, `tb/tissue_model.sv` stands in for the whole analog chain.
It scales the DAC code by a gain and delays it by a fixed number of clocks.

## Where this implementation chose for itself

These points were chosen here and are not part of the original design:

- **Sine generation.** It uses a CORDIC pipeline rather than a
  multiplier-and-table oscillator. The phase accumulator (32 bits), phase
  angle (16 bits) and output precision (14 bits) are as in the original.
  The output error is within ±3 LSB of ideal, and the latency is 18 clocks.
- **Sampling rates.** They are strobes, not generated clocks. The `fs_sel`
  encoding and the divisor table are this design's own.
- **Widths.** The accumulator is 42 bits, and the result format is two
  32-bit words sent most significant byte first.
- **Averaging.** A serial divider in the storage unit does the division.
- **Overrun.** The rule is that a newer result replaces the unsent one.
- **Clear and enable timing.** A clear in the same clock as a sample
  strobe keeps that sample. `enable` is registered once, so a measurement
  starts and stops one clock after it changes.
- **UART details.** The transmitter's first tick comes one clock after
  load, and a load while busy is ignored. The receiver has an input
  synchroniser and does not check the stop bit.
- **The processor's send bit** acts on its rising edge, and the
  result-ready flag is held until enable falls.
- **One frequency at a time.** The frequencies of a sweep are measured one
  after another, as the sweep description does; there is no simultaneous
  multi-frequency mode.
- **Baud rate.** The original gives 128 kbit/s for the UART and elsewhere
  reasons with 192 kbit/s. This design uses 128.2 kbit/s (`BAUD_DIV` = 390).

The design cannot do a single-frequency measurement at 1 MHz with a
2048-sample filter at 1953 results per second. That needs 4 MHz sampling,
which is above the 1.536 MHz maximum and not an integer division of
38.4 MHz. It also needs 156 kbit/s on the serial link. A 1 MHz measurement with the same
filter length does work at the highest built rate, giving 750 results per
second.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. For example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/bioz_pkg.sv tb/tb_bioimpedance_top.sv --top-module tb_bioimpedance_top
    ./obj_dir/Vtb_bioimpedance_top

Replace the testbench name to run any other one.

`tb_bioimpedance_top` runs the whole design at its default parameters,
with the testbench acting as the processor and the PC. It covers:

- a request byte received over the serial line, after a rejected noise
  pulse;
- an ACK sent from the processor port;
- a full five-frequency sweep with N = 512 through the tissue model
  (gain 0.6, 20-clock delay);
- an overrun provoked with fs = 1.536 MHz and N = 16.

For every result it checks:

- the magnitude against 0.6·8191²/2 (all five are within 0.01 %; the limit
  is 0.5 %);
- the phase lag, 22.0 clocks at every frequency;
- the measurement time (512 sample periods);
- the eight bytes decoded from the serial line.

It takes a few seconds.

`tb_workload_sweeps` repeats the section 5.1 characterization on the whole
design. Every 30 ms it runs one five-frequency sweep (N = 512), as the
interval timer would, each time on a different load model
(`rc_load_model`, an exact bilinear model of R1 + R2 parallel C):

- a 150 Ω reference resistor;
- 150 Ω parallel 150 kΩ, which is 0.1 % lower;
- 50 Ω in series with 150 Ω parallel 56 nF, the tissue-like network.

It checks the following:

- each sweep and its 40 serial bytes finish inside the 30 ms slot (26.6 ms);
- the bytes match the results;
- the 0.1 % change is resolved at all five frequencies (measured -0.084 %
  to -0.110 %; true value -0.0999 %);
- the RC network, calibrated as Z = 150 Ω · M / M_ref, is within 0.08 % in
  magnitude and 0.07° in phase of its exact impedance (limits 1 % and
  0.5°).

The ideal load model has no transformer cut-off, so unlike the measured
system the change is also seen at 8 kHz.

Last, it measures the resistor once at 1 MHz and once at 12.5 MHz, with
N = 2048 and fs = 1.536 MHz. The ADC and oscillator run at 38.4 MHz, so
the sample strobe may be slower than the excitation. The 2·f0 product
term is not aliased to DC, and it averages out. Both results are within
0.3 % of the 8 kHz magnitude and within 0.1° of the phase of the 22-clock
path delay.

Finally it runs four back-to-back measurements at 614.49 kHz, with
N = 1024 and fs = 1.536 MHz. A result arrives every 667 µs, and its eight
bytes take 624 µs on the line. That is the serial link's limit, and none
of the results may be overwritten.

The unit testbenches (`tb_<module>.sv`) compare each block with values the
testbench computes on its own:

- `tb_nco` compares against `$sin`/`$cos`.
- `tb_multacum` and `tb_coherent_demod` use exact integer sums.
- `tb_seq_divider` uses the language's own division.
- `tb_uart_tx` and `tb_uart_rx` check at bit level, including rate error
  and noise pulses.
- The others check each rule cycle by cycle.

## Trust and limits

- **What is tested.** All blocks and the whole chain have been tested in
  RTL simulation only. Nothing has been run on hardware.
- **Lint and synthesis.** Every module passes Verilator lint. It also
  elaborates in a second SystemVerilog front end.
- **The analog chain.** The model is ideal: no noise, no transformer
  high-pass, no front-end bandwidth. The accuracy shown in simulation is
  therefore that of the digital processing alone.
- **Clock-domain crossing.** It relies on the configuration being static
  while `enable_pio` is high. Nothing in the logic enforces that.
