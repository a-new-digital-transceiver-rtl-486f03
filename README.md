# All-digital transceiver for asynchronous serial frames

An asynchronous serial receiver must find the start of each frame and sample
every following bit near its middle, with no knowledge of the transmitter's
clock phase. Classic discrete-logic receivers do this with monostable
multivibrators: one-shot timers whose pulse width is set by a resistor and a
capacitor, so their timing drifts with part tolerances and temperature. This
design does the same job with counters and gates only. A single
*frame-detect* signal `f` is computed from the line and a small counter. It
rises on the leading edge of a start bit, releases a divider that produces a
sampling clock `CLK_R` from a local 8x oscillator, and drops by itself a fixed
number of sampling edges later. Every duration in the receiver is a whole
number of oscillator cycles, so its timing does not depend on analog parts.

Two links are provided, side by side in `transceiver_top`:

| Link | Frame | Data | Source | Sink |
|------|-------|------|--------|------|
| A (basic) | 8 bits: start, 4 data, 3 stop | code of the pressed one of 16 switches | `transmitter` | `receiver`, one-hot outputs |
| B (generalized) | 16 bits: start, n data, 16-n-1 stop | n = 1..12 bits from a host | `gen_transmitter` | `gen_receiver`, n set by a host register |

The line idles HIGH. The start bit is LOW, stop bits are HIGH, and data go
least significant bit first.

## The frame-detect signal f

`comb_logic` holds a counter Q of `CLK_R` rising edges. The counter is held at
zero while f is LOW, and

    f = (!In | Q != 0) & !((Q & F_END) == F_END)

* Idle: Q = 0 and In = 1, so f = 0.
* Start bit: In = 0 makes f = 1 at once, without waiting for any clock.
* Hold: after the first sampling edge Q is non-zero, and f stays HIGH whatever
  the line does.
* End: on the F_END-th sampling edge Q reaches F_END. f drops, every receiver
  counter is cleared, and the receiver again waits for In = 0.

For link A, F_END = 6 (binary 110), so the second factor is `!(Q2 & Q1)`. The
full function is `(!In + Q2 + Q1 + Q0)(!Q2 + !Q1)`:

| In | Q2 Q1 Q0 | f |
|----|----------|---|
| 0 | 000 to 101 | 1 |
| 1 | 000 | 0 (idle) |
| 1 | 001 to 101 | 1 |
| x | 110, 111 | 0 |

For link B, F_END = 14 (1110), so the second factor is `!(Q3 & Q2 & Q1)`.
In general F_END = (data bits) + 2, so f stays HIGH for
(data bits + 1.5) bit periods.

f also filters glitches. If the line goes LOW for less than half a bit, In
returns HIGH before the first sampling edge while Q is still 0. f then falls
and nothing is received.

## Timing of one frame

Times below are in oscillator (`clk8`) cycles after f rises. The sampling
clock is the MSB of a mod-8 counter that is held at zero while f is LOW, so
its edges fall on fixed cycles:

| Cycle | Event (link A) |
|-------|----------------|
| 0 | start bit begins, f rises |
| 4 | CLK_R rises: middle of the start bit; shift register takes it |
| 8 | CLK_R falls; latch counter = 1 |
| 12, 20, 28, 36 | CLK_R rises in the middle of data bits 0..3 |
| 40 | 5th falling edge; latch counter = 5 (`0101`), CLK_latch rises, `data` is loaded |
| 44 | 6th sampling edge: Q = 6, f drops (5.5 bits), CLK_R is forced LOW |
| 45 | all counters cleared; receiver idle |

There are five full `CLK_R` cycles per frame. The shift register fills from
its top bit and shifts toward bit 0. After five shifts the start bit has left
the 4-bit register and bit 0 holds data bit 0. The sixth sampling edge also
shifts the register, but the data were already stored at cycle 40.

Link B is the same up to cycle 108 (f HIGH for 13.5 bits, 13 `CLK_R`
cycles). The data are stored at cycle 8(n+1).

The first sampling edge falls 4 to 5 oscillator cycles after the true bit
edge, depending on phase. Relative to the transmitter bit period T = 8(1+e)
oscillator cycles, the last sample must stay inside its bit and f must end in
a stop bit. This gives roughly these clock-mismatch limits:

* link A: -7.5 % < e < +10 %;
* link B with n = 12: -2.9 % < e < +3.8 % (looser for smaller n).

## Data latching

**Fixed (link A, `data_latch_fixed`).** An up counter counts `CLK_R` falling
edges and is held at zero while f is LOW. Its state DATA_BITS+1 (`0101`) is
decoded as `CLK_latch`. On the rising edge of `CLK_latch` the shift register
is copied into the output register. The register keeps the last frame's code
while the line is idle.

**Programmable (link B, `data_latch_prog`).** A register holds n+1, written by
a host (`cfg_we`, `cfg_n` = n). While f is LOW it is loaded into a down
counter. Each `CLK_R` falling edge counts the down counter down. When it
reaches `0000`, after n+1 falling edges, `CLK_latch` rises and the data are
stored. Only this variable part depends on n. The fixed part (`comb_logic`,
`sampling_clock_gen`) is built for the longest frame content, 12 data bits.
Changing n is therefore a register write. Change n only while the line is
idle, and set the same n at the transmitter.

The generalized shift register is 12 bits wide. After n+1 shifts the n data
bits sit in its top n bits. They are stored shifted down, so
`data[0]` is the first data bit and bits above n are zero. The 4-to-16
decoder of link B decodes `data[3:0]`.

## Transmitter

`transmitter` takes 16 active-LOW switches. A priority encoder gives the
binary index of the pressed switch; the highest index wins when several are
pressed, and the output is `1111` when none is pressed. The start bit is the
AND of all switch inputs. The stop bits are constant 1. The frame
`{111, code, start}` is sent by `piso`. `piso` reloads its parallel input
every 8 bit clocks, so a held switch is resent in every frame slot and an
idle input sends continuous ones. Switch 15 encodes to `1111`, the same as
the idle code; its LOW start bit is what makes it a frame.

`gen_transmitter` builds the 16-bit frame of link B from `send`, `n` and
`data` and uses the same `piso`.

## Clocking and reset

The original circuit clocks its counters from `CLK_R`, from the inverse of
`CLK_R` and from the decoded latch clock, and clears them asynchronously from
f. This RTL keeps each receiver in the single `clk8` domain instead:

* `sampling_clock_gen` supplies `rise_en` and `fall_en` pulses in the cycle
  whose clock edge makes `CLK_R` rise or fall;
* the counters advance on those enables;
* the clear by f is synchronous.

Measured in oscillator cycles the behaviour is the same, and synthesis sees
no derived clocks. `CLK_R` and `CLK_latch` are still available as signals for
observation.

* `in` goes into the combinational f without a synchronizer, as in the
  original circuit. This keeps the first sampling edge exactly 4 cycles after
  f rises. For a line from a pad, add a two-flop synchronizer. The sampling
  point then moves about 2 oscillator cycles later, a quarter bit, which
  narrows the mismatch limits above.
* Every register has an asynchronous active-LOW reset `rst_n`. The receiver
  also recovers by itself from any counter state: f ends within one frame
  time. Hold reset across at least one edge of each clock.
* The transmitter runs on `tx_clk` and the receivers on `rx_clk8`. Their only
  connection is the serial line.

## Where this RTL departs from, or goes beyond, the original design

* **Length of f in the generalized receiver.** The stated duration,
  12 + 1.5 bit periods, is implemented (F_END = 14). The closed-form
  expression printed with it decodes the all-ones counter state. That form
  corresponds to F_END = 15 (14.5 bit periods) and also works with 16-bit
  frames. Set the `F_END` parameter of `gen_receiver` to 15 to use it.
* **Generalized register widths.** The original generalized circuit is drawn
  with a 4-bit shift register and a 4-to-16 decoder. Here the shift register and the latch are
  12 bits wide, so frames with up to 12 data bits can be received.
* **Quad D latch.** It is modelled as an edge-triggered register loaded on the
  rising edge of `CLK_latch`, not a transparent latch.
* **Choices the original leaves open.** These include:
  * the bit order (LSB first);
  * encoder priority (highest index);
  * free-running framing in the P/S converter;
  * the host register interface;
  * the right alignment of generalized data;
  * reset values;
  * active-HIGH decoder outputs.
* **Not modelled.** The gate-level structure and propagation delays of the
  discrete implementation are not modelled; the RTL reproduces the logic
  functions only. The 8x oscillator, the switches, the LEDs and the host
  processor are outside the RTL, and their signals are ports.

## Modules

| File | Contents |
|------|----------|
| `rtl/async_link_pkg.sv` | shared sizes: OSR = 8, frame and data widths, `f_end_count()` |
| `rtl/transceiver_top.sv` | both links, serial lines brought out |
| `rtl/transmitter.sv` | switches, encoder, start bit, P/S (link A) |
| `rtl/priority_encoder.sv` | 16-to-4 priority encoder, active-LOW inputs |
| `rtl/piso.sv` | parallel-to-serial converter |
| `rtl/gen_transmitter.sv` | 16-bit frame builder with n data bits (link B) |
| `rtl/receiver.sv` | link A receiver |
| `rtl/gen_receiver.sv` | link B receiver |
| `rtl/comb_logic.sv` | f and its counter |
| `rtl/sampling_clock_gen.sv` | mod-8 divider, `CLK_R` and its edge enables |
| `rtl/sipo.sv` | serial-to-parallel shift register |
| `rtl/data_latch_fixed.sv` | up counter, state decode, output register |
| `rtl/data_latch_prog.sv` | n+1 register, down counter, aligned output register |
| `rtl/decoder_4to16.sv` | one-hot decoder |

Parameters default to the sizes above; widths such as `DATA_BITS`, `W`,
`OSR` and `F_END` can be changed per instance. `OSR` must be a power of two.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. For
example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_transceiver_top \
        rtl/async_link_pkg.sv rtl/*.sv tb/tb_transceiver_top.sv
    ./obj_dir/Vtb_transceiver_top

Name the package first, or give `-y rtl` so that Verilator finds the modules
by name.

What the testbenches check:

* **`tb_transceiver_top`** runs both links at full size. The transmitter clock
  is 0.75 % slow and has arbitrary phase. The test covers:
  * single and multiple pressed switches, and switch 15;
  * back-to-back frames, and the output held during idle time;
  * n from 1 to 12 on link B.
  Each of these situations is counted and must occur.
* **`tb_receiver`** and **`tb_gen_receiver`** drive the line from a bit-level
  model with up to ±3 % (link A) and ±1.5 % (link B) rate error. They check
  the cycle positions in the table above: f length, `CLK_R` edges and latch
  cycle. They also check the received data, glitch rejection, and that no
  frame is lost or extra.
* **`tb_comb_logic`** compares f with the truth table on every cycle.
* The remaining testbenches check their block against a reference model.
