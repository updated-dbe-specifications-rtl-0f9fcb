# VLBI digital back end: two 512 MHz IFs to two VSI ports

This design is the digital back end (DBE) of a VLBI receiver. Two real IF
signals, each 512 MHz wide and sampled at 1024 Ms/s with 8 bits, are each cut
by a polyphase filter bank into narrow channels. Each channel is scaled by its
own gain and reduced to 2-bit samples. Sixteen channels then go to each of two
VSI ports, the 32-bit-wide parallel interface a VLBI recorder such as a Mark 5
reads. A one-pulse-per-second tick, locked once to an external reference and
then counted from the sample clock, ties everything to time. It frames the
filter banks, switches modes and gain tables, restarts the test pattern, and
marks the output word that carries the sample taken on the second.

| mode | filter banks | VSI1 gets | VSI2 gets | VSI clock | aggregate |
|---|---|---|---|---|---|
| 1 | IF1: 32 x 16 MHz | IF1 channels 0-15 | IF1 channels 16-31 | 32 MHz | 2048 Mb/s |
| 2 | IF1, IF2: 32 x 16 MHz | IF1 channels 0-15 | IF2 channels 0-15 | 32 MHz | 2048 Mb/s |
| 3 | IF1, IF2: 16 x 32 MHz | IF1 channels 0-15 | IF2 channels 0-15 | 64 MHz | 4096 Mb/s |

## Signal flow

```
 ext_pps --> pps_gen --int_pps--+-------------------+-------------------------+
 ctl bus --> dbe_ctrl (arm, mode, gains, TVG)       |                         |
                                |                   v                         v
 if1_data --> pfb (IF1) --y--> chan_gain (IF1) --codes--+            pps_delay A -> pps_delay B
 if2_data --> pfb (IF2) --y--> chan_gain (IF2) --codes--+--> vsi_out (chan_select, TVG mux)
                                                  tvg ----^     --> vsi1_data, vsi2_data,
                                                                    vsi_clk, vsi_pps, vsi_stb
```

Everything runs on one clock, `clk`, which is the 1024 MHz sample clock: each
filter bank takes one sample per clock. The samplers themselves (8-bit
converters) are outside the design; their outputs are the `if1_data` and
`if2_data` ports, as two's complement values. The host's serial link is also
outside the design. The commands it carries arrive on a small register bus
(`ctl_we`, `ctl_addr`, `ctl_wdata`).

## Time: the internal 1PPS and what it controls

This is the part of the design that most needs care. The rules it follows:

* **Synchronisation.** `pps_gen` does nothing until it is armed (register
  `ARM`). The next rising edge of `ext_pps` then starts it. That edge passes a
  two-flop synchroniser and an edge detector, so the first internal tick
  `int_pps` comes 3 clocks after it. From then on a 30-bit counter produces a
  tick every `PERIOD` = 1,024,000,000 clocks exactly. `ext_pps` may be removed.
  A wide external pulse gives only one tick. Arming again while running moves
  the second to the next external edge; until that edge, ticks continue from
  the old count.
* **Framing.** The sample present in the cycle of `int_pps` becomes sample 0
  of a filter-bank block. Because 1,024,000,000 is a multiple of both block
  lengths (32 and 16), the block framing is identical every second. It also
  comes out the same after any reset, since the first tick re-establishes it.
* **Marking.** The tick is not carried through the arithmetic. It runs down its
  own delay line (`pps_delay`) whose length matches the data latency. At the
  gain stage it coincides with channel 0 of the block that began on the
  second. At the output it coincides with that block's VSI word, which is
  flagged by `vsi_pps` for the whole word. With M channels per block
  (32, or 16 in mode 3), the latency from the tick to `vsi_pps` is
  **3M + 3 clocks**:

  | stage | clocks after the tick |
  |---|---|
  | last sample of the tick block enters the bank | M - 1 |
  | polyphase sums (two per clock) | M ... 2M - 1 |
  | channel 0 leaves the bank (`y_valid`) | 2M + 1 |
  | channel M-1 leaves the bank (`y_last`) | 3M |
  | block of 2-bit codes ready | 3M + 2 |
  | VSI word with `vsi_pps` | 3M + 3 |

  The two tick delays are 2M+1 (to the gain stage) and M+1 (on to the word).
  Their taps follow the channel width in force.
* **Changes on the second.** Three things take effect only on a tick:
  * A new operating mode (register `MODE`). The filter banks switch width on
    the input tick. The VSI stage switches channel routing and clock rate on
    the marked word. The blocks that were in flight when the width changed are
    dropped, so a mode change costs up to two words of output.
  * A committed gain table (register `COMMIT`). It is swapped in on exactly the
    block that starts on the second.
  * The test vector sequence. It restarts on the marked word.

## Filter bank (`pfb`)

The bank is a critically sampled, cosine-modulated (pseudo-QMF) filter bank.
With M channels and a prototype low-pass filter p of length L = 2·M·8:

    y_k[m] = sum_{n<L} p[n] · cos((π/M)(k+½)(n-(L-1)/2) + (-1)^k π/4) · x[mM-n]

Channel k covers k·512/M to (k+1)·512/M MHz. It comes out as one real sample
every M input samples (32 Ms/s for 16 MHz channels, 64 Ms/s for 32 MHz), which
is the Nyquist rate for its band. Odd channels come out spectrally inverted, as
bandpass sampling leaves them; the design does not flip them back.

The prototype is a sinc with its cutoff at half the channel spacing, shaped by
a Blackman window. Its coefficients, and the cosine terms, are computed at
elaboration from the functions in `dbe_pkg` and rounded to 18 bits. In
simulation a tone at the centre of channel 5 leaves at least 58 dB less power
in every channel two or more channels away.

The hardware uses the usual polyphase decomposition. Since the cosine changes
sign every 2M samples, the sum factors into:

1. 2M partial sums u[j] = Σ_t (-1)^t p[j+2Mt] x[mM-j-2Mt], t = 0..7. These are
   formed two per clock (16 multipliers) from a snapshot of the 512-sample
   delay line taken at the end of each block.
2. y_k = Σ_j c_k[j] u[j]. This is formed one channel per clock (64
   multipliers) from the other half of a ping-pong buffer.

Both stages take exactly M clocks, so the bank keeps pace with one sample per
clock. Nothing is rounded before the final step, which is a shift by 2^-30
with saturation to 18 bits. The output therefore equals the direct
convolution bit for bit, and the testbenches check exactly that. Both channel
widths (the 512-tap and the 256-tap prototype) exist in one bank and are
selected by `wide`.

## Gain and 2-bit coding (`chan_gain`)

Each channel sample y is multiplied by the gain of its channel. Gains are
unsigned Q8.8, so 256 means 1.0, and every gain resets to 1.0. The result
v = (y·g) >> 8 is coded against a fixed threshold T = 2048 into the VLBA
offset-binary code:

| v | v ≤ -T | -T < v < 0 | 0 ≤ v < T | v ≥ T |
|---|---|---|---|---|
| S M | 0 0 | 0 1 | 1 0 | 1 1 |

The host chooses the gains from the state counts it sees at the recorder, so
that each channel's rms sits where it wants relative to T. Writes go to a
shadow table. A commit makes the whole table active at the next tick, so the
coefficients change on a known sample.

## VSI output (`vsi_out`, `chan_select`, `tvg`)

VSI channel c uses bit streams 2c (sign S) and 2c+1 (magnitude M). A new word
appears every M sample clocks, and `vsi_stb` marks its first clock.
`vsi_clk` has one period per word: it is low for the first half and high for
the second, so a receiver sampling on its rising edge sees stable data.

Each port can carry test vectors instead of data (register `TVG`). The switch
can be made at any time and takes effect on the next word. The test vector
generator steps once per word and restarts from its seed on the marked word.
Its pattern is a 32-bit maximal-length LFSR (x^32 + x^22 + x^2 + x + 1,
seed all ones). It stands in for the VSI-H test pattern, which is defined in
the VSI-H standard and not reproduced here. A recorder that checks the VSI-H
pattern will therefore report errors; the timing and restart behaviour are as
VSI-H describes.

## Control registers (`dbe_ctrl`)

Writes take effect one clock after the write.

| address | name | data |
|---|---|---|
| 0x00 | MODE | [1:0] = 1, 2 or 3; 0 is ignored; applied at the next tick |
| 0x01 | ARM | any value; arms the 1PPS generator for the next external edge |
| 0x02 | TVG | [0] test vectors on VSI1, [1] on VSI2 |
| 0x03 | COMMIT | [0] IF1 table, [1] IF2 table; swapped in on the next tick |
| 0x40-0x5F | GAIN1 | gain of IF1 channel addr[4:0], Q8.8 |
| 0x60-0x7F | GAIN2 | gain of IF2 channel addr[4:0], Q8.8 |

Outputs of the top also report `pps_armed`, `pps_running`, `gain_pending`
(a committed table that is still waiting for its tick) and `mode`.

## What is specified and what is chosen here

These come from the specification the design implements:

* the sample rate, depth and 1PPS period;
* the three modes, the channel counts and rates, and the channel routing;
* the 2-bit code and its placement on the VSI streams;
* arming by command and triggering from the external pulse;
* marking the tick sample by a parallel tick pipeline;
* swapping the gain table on the tick;
* test vectors that restart on the tick, run at the VSI clock and can be
  switched in per port.

These are this design's own choices:

* **Clocking.** One sample per clock at 1024 MHz. A real FPGA would take the
  samples two (or more) at a time on a 512 MHz or slower clock, and the filter
  bank would need a matching parallel structure. That demultiplexed interface
  is not modelled.
* **Filter bank.** The structure, prototype, tap count (8 per branch), widths
  and scaling. The specification only asks for roughly 50-60 dB rejection.
* **Gain and threshold.** The Q8.8 gain format and the threshold value. The
  specification leaves the threshold to be specified.
* **Control.** The register map and the parallel bus that stands in for the
  serial command link. Modes are applied on the tick and can be changed at
  run time, not stored in a PROM.
* **Test pattern and VSI clock phase.** The test pattern (see above) and the
  VSI clock phase. Both are defined by VSI documents outside this design.

## Files

| file | contents |
|---|---|
| `rtl/dbe_pkg.sv` | sizes, mode enum, code type, coefficient and quantizer functions |
| `rtl/dbe_top.sv` | top level |
| `rtl/pps_gen.sv` | internal 1PPS generator |
| `rtl/pps_delay.sv` | tick delay line with selectable length |
| `rtl/pfb.sv` | polyphase filter bank, 32 or 16 channels |
| `rtl/chan_gain.sv` | per-channel gain, shadow table, 2-bit coding |
| `rtl/chan_select.sv` | mode routing and bit-stream mapping |
| `rtl/tvg.sv` | test vector generator |
| `rtl/vsi_out.sv` | VSI registers, TVG substitution, VSI clock and 1PPS |
| `rtl/dbe_ctrl.sv` | control registers |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/dbe_env.sv` | end-to-end environment used by the two top-level testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and exits. Always put the
package first on the command line. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/dbe_pkg.sv rtl/pfb.sv tb/pfb_tb.sv --top-module pfb_tb
./obj_dir/Vpfb_tb

verilator --binary --timing --assert -Wno-fatal rtl/dbe_pkg.sv rtl/*.sv tb/dbe_env.sv tb/dbe_top_tb.sv --top-module dbe_top_tb
./obj_dir/Vdbe_top_tb
```

(When `rtl/*.sv` also matches the package, verilator reads it once; listing it
first only fixes the order.)

What the testbenches establish:

* `pfb_tb` compares every output of the filter bank with a direct-form
  convolution, in both channel widths, including the output cycle of every
  channel. It also measures the far-channel rejection.
* `dbe_top_tb` runs the whole design with a 3200-clock "second". It covers
  synchronisation, periodic ticks, modes 1 -> 2 -> 3 -> 1, two gain-table
  commits, test vectors on each port, and a re-arm that moves the second.
  Every VSI word is checked bit for bit against a reference computed from
  first principles, and `vsi_pps` is checked on the right word at 3M+3 clocks.
* `dbe_top_full_tb` keeps every parameter at its default and checks
  synchronisation and the first 60 words of the second. A full second
  (1,024,000,000 clocks) is beyond simulation time here, so the second tick at
  the default period is not simulated; the period logic is checked at short
  periods.

## Limits

* The design is specified at the sample rate. See the clocking point above
  before targeting an FPGA.
* The IF may occupy 0-512 MHz or 512-1024 MHz. In the second case the band
  arrives mirrored after sampling: channel k then holds what is channel M-1-k
  of the IF, itself inverted. The design does not reorder or flip channels for
  this case.
* Words output while the channel width changes (at most two per change) are
  dropped.
* The filter bank's parallel multipliers (16 + 64 per IF) are written as plain
  arithmetic. Mapping them onto DSP blocks, and pipelining them, is left to
  synthesis or to a later revision.
