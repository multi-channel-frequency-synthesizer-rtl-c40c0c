# Multi-channel square and sine synthesizer on one shared phase accumulator

A direct digital synthesizer normally spends one phase accumulator per output.
This design serves several outputs from a single accumulator adder by time
multiplexing: a counter steps through the channels, one per clock, and each
channel keeps its own phase in a latch. The most significant bit of a
channel's phase is a square wave whose frequency is set by that channel's
control word. All channels run from one reference clock, so they drift
together if the clock drifts.

On top of the four-channel square synthesizer sits a two-channel sine
synthesizer front end. Each sine channel uses two square channels, one at 2f
and one at 4f. A small circuit of three toggle flip-flops and a NAND gate
turns them into three squares at f, shifted by +45, 0 and -45 degrees. Summed
with weights 1 : sqrt(2) : 1, these squares cancel the 3rd and 5th harmonics.
A low-order analog filter can then produce a clean sine with no sine ROM and
no DAC. The summing amplifier and the filter are analog, so they are not part
of this RTL.

Default configuration:

| item | value |
|---|---|
| square channels | 4 |
| accumulator length N | 25 bits |
| adder | 13-bit low stage + 12-bit high stage, pipelined |
| clock | 40 MHz (each channel is updated at 10 MHz) |
| frequency resolution | 10 MHz / 2^25 = 0.298 Hz |
| output range | 0 to 5 MHz (w up to 2^24) |
| sine channels | 2 (square channels 0+1 and 2+3) |

## The time-multiplexed accumulator (`mc_square_synth`)

Each channel c computes `s(n) = s(n-1) + w_c`, but only in its own slot, once
every CHANNELS clocks. Its square output therefore has the average frequency

    F_c = w_c * F_clk / (CHANNELS * 2^N)

To keep the same resolution and range as a single-channel accumulator, the
clock must rise in proportion to the channel count. That is why the
four-channel build runs at 40 MHz.

Data path, all selected by one counter (`chan_counter`):

* the word multiplexer (`chan_mux`) puts `ctrl_word[sel]` on the adder;
* the feedback multiplexers (`chan_mux`, once per adder half) return the
  channel's latched phase;
* the adder (`pipelined_adder`) adds the two;
* the demultiplexer and latches (`channel_latches`) write the sum back into
  the channel's latch and hold all the others.

`CHANNELS = 1` reduces this to a plain accumulator: an adder followed by a
register whose output is fed back.

### Why the two adder halves are a cycle apart

The 25-bit adder is split into a 13-bit low stage and a 12-bit high stage, with
the carry registered between them. This is the part of the design that takes
the most care. The schedule is:

| cycle | low stage (13 bits) | high stage (12 bits) |
|---|---|---|
| t | channel `sel`: low latch + low word, carry into register | channel `sel_d` = the channel of cycle t-1 |
| t+1 | next channel | channel `sel`, using the carry and word-high bits registered at t |

The high stage reads its operand from the latch in cycle t+1, not from a
register loaded in cycle t. So a channel's high half is always read after its
last write, even when the same channel comes round in the next cycle
(CHANNELS = 1). The schedule therefore works for any channel count. The high
half of every phase lags its low half by one clock. `phase[c]` shows both
halves as they are, so for one clock after a low update it holds the new low
half next to the old high half.

### Frame alignment

Channels are written in different cycles, so two outputs that belong together
never change in the same clock. In the synthesizer channel 0 is written first.
When the 2f wave (channel 0) rises, the 4f wave (channel 1) wraps and falls
one clock later. For that one clock both are high, which would pulse the NAND
gate. `mc_square_synth` therefore provides `frame`. It is high in the cycles
where every channel's high half has had the same number of updates, which is
the cycle after the last channel's high half was written
(`sel_d == 0`). The phase shifters sample only then.

## Square-wave phase shifter (`square_phase_shifter`)

Let the 2f square be high in the second half of each of its periods, and the
4f square likewise. Over one period T of f, with both accumulators starting
at zero:

| wave | rising edges |
|---|---|
| 2f | T/4, 3T/4 |
| NAND(2f, 4f) falls (4f rises while 2f is high) | 3T/8, 7T/8 |
| 2f falls | T/2, T |

Each of the three toggle flip-flops divides one of these edge streams by two:

* `out_lead` toggles on 2f rising edges: first rise at T/4 (+45 degrees);
* `out_mid` toggles on NAND falling edges: first rise at 3T/8 (0 degrees);
* `out_lag` toggles on 2f falling edges: first rise at T/2 (-45 degrees).

For harmonic k, the weighted sum has the gain `sqrt(2) + 2 cos(k*pi/4)`. This
is 2*sqrt(2) for k = 1 and 7, and zero for k = 3 and 5. The first harmonic
left after the adder is therefore the 7th, at 1/7 of the fundamental
(-17 dB).

The flip-flops are not clocked by the waves. They run on the system clock,
and on each `sample` they compare the new input values with the previous
sample and toggle on the edges they see. All three outputs change one clock
after the frame that shows the edge. Their timing resolution is one frame
(4 clocks = 100 ns at 40 MHz). Reset clears the flip-flops, so the outputs
start low and rise in the order lead, mid, lag.

## Two-channel sine front end (`sine_synth_2ch`, the top)

Sine channel k uses square channel 2k at 2f and square channel 2k+1 at 4f:

    w(2k)   = 2f * 2^25 / 10 MHz
    w(2k+1) = 2 * w(2k)        (or 2 * w(2k) + 1)

For example, 10 kHz needs the words 67108 and 134217, and 1 kHz needs 6710 and
13421. The 4f wave should never wrap later than the 2f wave rises, so round
w(2k+1) up, never down. A 4f word a little too large makes the 4f wave drift
ahead slowly. The overlap it leaves is removed by frame sampling. A 4f word
that is too small can let the two waves overlap across a frame boundary.

To switch frequency, change both words of a sine channel in the last slot of a
frame (while `frame_slot` is CHANNELS-1), so both channels take the new words
in the same frame. The latches are never cleared, so the phase stays
continuous across the switch.

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 40 MHz clock |
| `rst_n` | in | 1 | asynchronous, active-low reset; all phases and flip-flops to 0 |
| `ctrl_word` | in | 25 x 4 | frequency words of square channels 0..3 |
| `sq_out` | out | 4 | square outputs (phase MSBs) |
| `shift_lead`, `shift_mid`, `shift_lag` | out | 2 each | +45 / 0 / -45 degree squares of each sine channel |
| `frame_slot` | out | 2 | channel counter; retune a sine channel while it is 3 |

Outside this RTL, each sine channel needs:

* an op-amp summer, weighting lead : mid : lag as 1 : sqrt(2) : 1;
* a tunable low-pass filter (a second-order Sallen-Key filter is suitable),
  whose cutoff follows the frequency word through a DAC and a
  voltage-controlled resistor.

The word-to-cutoff mapping is application specific and is not included.

## What is this design's own choice

The overall structure is that of the published architecture: one
multiplexed adder, a counter, per-channel latches, MSB outputs, a 13 + 12
pipelined adder, three toggle flip-flops with a NAND gate, and channel words
at 2f and 4f. The following are the design's own choices:

* the reset (asynchronous, active low) and the counter's reset value;
* the high-half-one-cycle-later schedule of the pipelined adder, and the
  `frame` signal it implies;
* edge-triggered registers as the channel "latches";
* which edge of which signal each flip-flop toggles on (chosen so that the
  phases come out as -45, 0 and +45 degrees);
* sampling the flip-flop inputs on the system clock at `frame`, instead of
  clocking the flip-flops with the waves;
* control words as parallel input ports.

No timing closure was done. The 40 MHz figure belongs to the reference FPGA
implementation and was not checked for this RTL.

## Files

| file | content |
|---|---|
| `rtl/synth_pkg.sv` | shared constants (25, 13, 4 channels, 2 sine channels) and `sel_width()` |
| `rtl/chan_counter.sv` | modulo-CHANNELS slot counter |
| `rtl/chan_mux.sv` | N-to-1 channel multiplexer |
| `rtl/pipelined_adder.sv` | 13 + 12 bit two-stage adder |
| `rtl/channel_latches.sv` | write demultiplexer and per-channel phase registers |
| `rtl/mc_square_synth.sv` | the multi-channel square synthesizer |
| `rtl/square_phase_shifter.sv` | +45/0/-45 degree generator |
| `rtl/sine_synth_2ch.sv` | top: 4 square channels, 2 phase shifters |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/mc_synth_harness.sv` | reference-model checker used by `tb_mc_square_synth` |

## Verification

Every testbench checks the design against values it works out on its own.
Each ends by printing `TB_RESULT checks=N failures=M`.

* `tb_mc_square_synth` runs 1, 2, 4 and 8 channels at the full 25-bit width.
  After every clock it compares every channel's phase, square output, frame
  flag and slot with a full-width reference accumulator, while it changes the
  words at random. It then counts output periods over 3000 frames against
  `floor((K*w + 2^24) / 2^25)`.
* `tb_square_workloads` runs the default four-channel synthesizer at 156 kHz,
  at the 5 MHz top of the range, at the one-LSB resolution step and at DC. It
  checks edge counts and final phases.
* `tb_square_phase_shifter` feeds ideal 2f/4f squares and checks all three
  outputs sample by sample. It also checks that a masked overlap does not
  toggle anything.
* `tb_sine_synth_2ch` runs the top at its default size. Sine channels are set
  to 10 kHz and 1 kHz, and it checks:
  * the periods of the outputs, against 4 * 2^26 / w clocks;
  * that the lead and lag outputs sit 45 degrees from mid;
  * that the 3rd and 5th harmonics of the 1 : sqrt(2) : 1 sum are below 2 % of
    the fundamental, while the 7th is about 1/7 of it;
  * a continuous-phase switch from 10 kHz to 40 kHz.

  It also counts frames, carries, wraps, toggles, hidden overlaps and
  switches, and fails if any of them never happened.

Simulate one testbench with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/synth_pkg.sv tb/tb_sine_synth_2ch.sv --top-module tb_sine_synth_2ch
    ./obj_dir/Vtb_sine_synth_2ch

The testbenches initialise everything they read and use only `$urandom`, so
they also run on two-state simulators. `tb_sine_synth_2ch` simulates 3 ms of
the 40 MHz clock in well under a second.
