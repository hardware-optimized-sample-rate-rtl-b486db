# Multichannel fractional sample rate converter (bandlimited interpolation)

A software-defined-radio baseband runs its converters from one fixed,
low-jitter master clock, while every radio standard wants its own sample rate.
Somewhere between the A/D and D/A converters and the baseband processing, each stream
must be resampled by an arbitrary, non-integer ratio that software sets with
1 Hz resolution between 3 MHz and 61.44 MHz. This RTL does that resampling for
up to eight complex channels (at most four receive and four transmit), which
take turns on one shared datapath. It uses as few multipliers as it can.

The method is *bandlimited interpolation*. A windowed-sinc low-pass prototype
`g(t)` is stored oversampled `M` times (default `M = 8`), split into `M`
polyphase filters of `N_TAPS = 19` taps each. An output sample almost never falls
exactly on one of the `M` stored phases. So two neighbouring phases are run as
two FIRs in parallel, and their results are blended linearly. Each output
therefore costs `2 x 19` multiplications per component, plus one for the blend.
Each component (real, imaginary) has its own datapath, so the design has
`4 x 19 + 2 = 78` multipliers in all.

```
             +-------------------- shared ---------------------+
 memory ---> | Load_Coefficients -> Coefficient Select <- IPC   |
 config ---> | Control    Channel scheduler    Time Generation  |
             +----------------------------+--------------------+
                      | coefs1/coefs2, alpha, shift, swap, ctx_*
             +--------v-------------------------------------+
 in_re ----> | Registerbank -> FIR 1 \                      |
             |      (2 sets) -> FIR 2 -> Output Calculation | --> out_re
             | Ram_Connection <-> local RAM (contexts)      |
             +----------------------------------------------+
 in_im ----> (identical processing part for the imaginary component) --> out_im
```

## The interpolation formula

Three time grids are involved:

| grid | spacing | meaning |
|---|---|---|
| input samples | `T1` | one per input sample |
| output samples | `T2` | one per output sample, set per channel |
| prototype taps | `T3 = T1 / M` | spacing of the stored filter samples |

Let input sample `x[n]` sit at time `(n+1)*T1`. Let `tin` be the time of the
newest sample in the registerbank, `x[n0]`, and `tout` the time of the next
output. Let `phase = tout - tin`, which lies in `[0, T1)`. Write `phase / T3 = l + alpha`,
with integer `l` in `0..M-1` and fraction `alpha` in `[0,1)`. With
`h_l[j] = g((j - C)*M*T3 + l*T3)` for polyphase filter `l` (`C = 9` is the centre
tap), the output is

```
y = (1 - alpha) * SUM_j h_l[j]   * x[n0 - j]
  +      alpha  * SUM_j h_l+1[j] * x[n0 - j]          j = 0 .. N_TAPS-1
```

This is the true sum `SUM_j g(phase + (j - C)*T1) * x[n0 - j]`, with each
prototype value taken by linear interpolation between the two stored
neighbours. The output belongs to time `tout - C*T1`, so the converter delays
the signal by nine input samples.

`output_calculation` evaluates the blend as `y1 + alpha*(y2 - y1)`. This is the
same value computed with a single multiplier.

### The wrap case: two hard-wired coefficients

For `l = M-1` the second filter would be `h_M`. That is polyphase filter 0
applied to the samples shifted by one: `h_M[j] = h_0[j+1]`. Shifting the
sample vector for just one FIR would mean a second set of tap wires. The design
uses a property of the prototype instead: a sinc is zero at every multiple of
`T1` except the centre. So filter 0 is a single `1.0` at tap `C` and zeros
elsewhere. Shifting it means moving that `1.0` to tap `C-1`.
`coefficient_select` therefore passes filter 0 through with two values
overridden: tap `C` is forced to 0 and tap `C-1` to `1.0`.

This holds only if the loaded filter 0 really is a unit impulse at the centre.
That is the case for any windowed sinc whose zero crossings fall on the input
grid. A coefficient set that violates it gives wrong outputs in the wrap case.

## Time Generation: 70-bit times

Times are 70-bit unsigned numbers. The unit `T3` is `2^FRAC_W` LSB
(`FRAC_W = 60`), so `T1 = M * 2^60 = 2^63`. With these numbers, `l` is
`phase[62:60]` and `alpha` is `phase[59:44]`, and `interpolation_control`
takes both as plain bit fields. Ten integer bits are left, so `T2` can be up
to 1024 `T3`, or 128 input periods. The largest ratio needed
(61.44 MHz to 3 MHz, 20.48) needs `T2 = 163.84 T3`. The 60 fraction bits give a
frequency resolution far finer than 1 Hz.

Every clock, `time_generation` does exactly one of two things for the active
channel:

* `tout - tin >= T1`: the next input sample is needed. It is taken if offered
  (`shift`, `tin += T1`); otherwise the converter waits.
* otherwise it issues an output at `phase = tout - tin` (`issue`, `tout += T2`).

Upsampling (`T2 < T1`) and downsampling (`T2 > T1`) follow the same rule. Only
the mix of shifts and issues changes. Each channel keeps its own
`tin` and `tout`. Only their difference matters, so they may wrap around.

To program a channel, write `T2 = T1 * F_in / F_out = (F_in << 63) / F_out`.
For example, 61.44 MHz to 61.439999 MHz gives
`T2 = (61440000 << 63) / 61439999`.

**Start-up.** On start every registerbank is cleared, `tin = 0`, and
`tout = N_TAPS * T1`. So each channel first takes 19 input samples and
delivers its first output only once its registerbank is full. There is no
ramp-up from zeros.

## Processing parts: datapath and formats

`processing_part` is instantiated twice, once for the real and once for the
imaginary component. Both instances receive the same control signals:

| block | function | format |
|---|---|---|
| `registerbank` | last 19 samples, newest in `taps[0]`; second (shadow) set for context switching | samples Q1.15 |
| `fir_filter` x2 | 19 parallel products, summed at full precision, registered | coefficients Q2.14, sum 37 bit |
| `output_calculation` | `y1 + alpha*(y2-y1)`, round half up, saturate, registered | alpha Q0.16, output Q1.15 |
| `ram_connection` + `local_ram` | moves shadow words to and from a 256 x 16 RAM (8 channels x 32 words) | |

Coefficients use Q2.14 so that the exact `1.0` of filter 0 fits.

**Pipeline and timing.** Time Generation decides in clock `t`. In the same
clock, IPC and Coefficient Select derive `l`, `alpha` and both coefficient
sets, and the FIRs compute from the registerbank. The FIR sums are registered at
the end of `t`. Output Calculation is registered at the end of `t+1`.
So an output appears two clocks after it is issued. Throughput is one event
(input or output) per clock. The whole pipeline advances on
`en = !(output valid && !output ready)`: a refused output freezes everything,
including Time Generation.

## Channels and context switching

Channels `0 .. NUM_CH-1` run in turn. Each runs for a fixed number of output
samples (`SWITCH`). A channel's state is its registerbank contents (its times
stay in Time Generation's per-channel arrays), and the channels must share one
datapath without stopping it. That is done with two register sets per
registerbank:

```
 active set : ch1 running            | ch2 running            | ch3 ...
 shadow set : store ch0, load ch2    | store ch1, load ch3    | ...
                                     ^ swap (0 clocks)
```

While channel `n` runs, `channel_scheduler` does two things through
`ram_connection`, one word per clock:

1. It writes the shadow set (channel `n-1`) into the local RAM.
2. It fills the shadow set with channel `n+1`.

Both parts run in parallel, so they take the same orders. A transfer takes
`19 + 19 + 1 = 39` clocks. When the slot's last output is issued and the load
has finished, `switch_now` swaps the two sets and changes the channel in the
same clock. The switch therefore costs no cycle. If the slot ends before the
load has finished, the channel pauses until it has. A channel that has never
been stored is loaded as zeros.

Outputs still in the pipeline carry their channel number and direction, so
they leave correctly after a switch.

## Streams

There is one valid/ready input stream and one output stream per direction:
`rx_*` is radio to platform, `tx_*` is the reverse. The active channel's
direction bit selects the input stream that is read, and `in_chan` tells the
source which channel is being requested. Each output leaves on the stream of
its channel's direction, tagged with `out_chan`. An assertion checks the limit
of four channels per direction.

## Software interface (`src_control`)

| word address | register |
|---|---|
| `0x00` CTRL | bit 0 enable (a 0-to-1 write restarts all channels); bit 1 write 1 to load the coefficients |
| `0x01` NUM_CH | channels in the schedule, 1..8 |
| `0x02` SWITCH | outputs per slot, at least 1 (at least ~39 clocks per slot avoids waiting) |
| `0x03` COEFBASE | memory address of the coefficient table (`word l*19 + j` = tap `j` of filter `l`) |
| `0x04` STATUS | bit 0 coefficients loaded, bit 1 running, bits 8+ active channel |
| `0x10+4c+0/1/2` | `T2` of channel `c`, bits 31:0, 63:32, 69:64 |
| `0x10+4c+3` | direction of channel `c` (0 RX, 1 TX) |

The sequence is:

1. Write COEFBASE, then write 2 to CTRL.
2. Wait until STATUS bit 0 is set. The load takes 153 clocks from a memory with
   one clock of read latency.
3. Program NUM_CH, SWITCH, and each channel's `T2` and direction.
4. Write 1 to CTRL.

All channels share one coefficient set. Reload it only while the converter
is disabled.

## Files

| file | content |
|---|---|
| `rtl/src_pkg.sv` | sizes, formats, direction and transfer enums |
| `rtl/src_top.sv` | the converter, top level |
| `rtl/src_control.sv` | register bank |
| `rtl/load_coefficients.sv` | coefficient fetch into 8 x 19 registers |
| `rtl/interpolation_control.sv` | `l`, `alpha`, wrap flag |
| `rtl/coefficient_select.sv` | coefficient sets for FIR 1 / FIR 2, hard-wired wrap values |
| `rtl/time_generation.sv` | 70-bit times, shift/issue decision, stall |
| `rtl/channel_scheduler.sv` | slots, context store/load orders, switch |
| `rtl/processing_part.sv` | one component's datapath |
| `rtl/registerbank.sv`, `rtl/fir_filter.sv`, `rtl/output_calculation.sv`, `rtl/ram_connection.sv`, `rtl/local_ram.sv` | its parts |
| `tb/src_ref_pkg.sv` | reference model: Kaiser-windowed sinc (beta 10 by default), test signals, expected outputs from absolute times |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_src_workloads`, `tb_src_multitone` and `tb_src_kaiser_sweep` |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=F`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/src_pkg.sv tb/src_ref_pkg.sv \
    tb/tb_src_top.sv --top-module tb_src_top -Mdir obj_top
./obj_top/Vtb_src_top
```

Replace `tb_src_top` with any other `tb_*` module. Every testbench uses the
default sizes and runs in seconds.

* `tb_src_top` is the end-to-end run. It loads the coefficients over the bus
  and runs four channels: up 1.45 and down 4.3 on RX, up 2 and down 5 on TX.
  Inputs and output readiness are withheld at random. About 1,200 complex output
  samples are compared bit for bit with the reference. It also checks:
  * the two-clock latency;
  * no lost clocks;
  * that each of these happened at least once: input stalls, output stalls,
    switches, stores, restores, zero fills, waits for a load, the wrap case,
    and both directions.
* `tb_src_workloads` fills all eight channel slots with pure tones at these
  ratios:
  * up 1.45, 2, 2.5 and 20.48 (3 MHz to 61.44 MHz);
  * down 4.3, 5 and 20.48;
  * a 1 Hz offset at 61.44 MHz.

  It checks every output bit for bit and measures the SINR against the ideal
  tone. With the test coefficients and a tone at 5 % of the lower rate:

  | conversion | SINR |
  |---|---|
  | up 1.45 / 2 / 2.5 | 71.6 / 76.7 / 71.9 dB |
  | up 3 to 61.44 MHz | 71.8 dB |
  | down 4.3 / 5 | 80.1 / 92.0 dB |
  | down 61.44 to 3 MHz | 78.2 dB |
  | 1 Hz offset | 92.7 dB |

  The 92 dB figures come from ratios where `alpha` stays near zero.
* `tb_src_multitone` runs five channels with a four-tone signal,
  `1/4 sin(w) + sin(w/3) + sin(w/2) + cos(w)`. The imaginary part is the same
  sum with every term a quarter period later, and the highest tone sits at
  5 % of the lower rate. It also checks every output bit for bit:

  | conversion | SINR |
  |---|---|
  | up 1.45 / 2 / 2.5 | 75.3 / 80.0 / 74.5 dB |
  | down 4.3 / 5 | 78.9 / 91.5 dB |

  The original architecture reports 80.1, 86, 73.8 and 74 dB for up 1.45,
  up 2, down 4.3 and down 5 with a signal of this form. Its coefficients and
  signal frequencies are not known, so these figures are not directly
  comparable.
* `tb_src_kaiser_sweep` recomputes and reloads the coefficient table for
  Kaiser windows with beta 5, 7, 10 and 14. It then runs one channel (up 1.45,
  tone at 5 % of the input rate) at 0.1 to 1.5 times full scale. Above full
  scale the input is clipped. SINR in dB:

  | beta | 0.1 | 0.5 | 1.0 | 1.2 | 1.5 |
  |---|---|---|---|---|---|
  | 5 | 60.5 | 60.8 | 60.5 | 19.5 | 12.0 |
  | 7 | 66.6 | 67.7 | 67.1 | 19.5 | 12.0 |
  | 10 | 70.8 | 72.9 | 71.7 | 19.5 | 12.0 |
  | 14 | 74.4 | 78.0 | 77.1 | 19.5 | 12.0 |

  The window, not the 16-bit arithmetic, limits these figures. Only the loaded
  coefficients change between rows, so the hardware is the same for every
  beta.

## How far to trust it, and where it departs from the original architecture

Trust:

* Every module passes its testbench, and the testbench fails when a single
  deliberate bug is put into the module.
* The reference model computes outputs from absolute times and the prototype
  definition. It shares no structure with the RTL.
* Lint reports only unused package constants and bits, and the reset being
  used both by flip-flops and by assertions.

Not verified:

* Parameters other than the defaults. `M = 16` and `32` pass lint but were
  not simulated.
* Synthesis timing: the original reached about 168 MHz on a Virtex-5.

Design choices not taken from the original:

* the fixed-point formats;
* the 60/10 split of the 70-bit time word;
* the register map and the valid/ready streams;
* the two-stage pipeline;
* the zero fill of a channel that has never run;
* the memory read port (one clock latency, no wait states).

Deliberate differences and omissions:

* **Coefficient storage.** All `8 x 19` coefficients sit in registers. The
  original also exploits a periodicity of the coefficients to store about 29 %
  fewer of them. That reduction is not built.
* **One coefficient set for all channels.** The original gives each channel
  its own parameter set but does not say whether coefficients are part of it.
* **Downsampling.** The filter runs on the input grid with a fixed cutoff,
  set by the loaded coefficients. For downsampling, either the coefficients
  must be designed for the lower output band, or the input must already be
  band-limited. The original states the up- and downsampling derivations
  differently, but for both modes it shows the input spacing as `M` filter-tap
  spacings. That is what is built.
* **Where channel state lives.** Channel times are kept in per-channel
  registers, not in the context RAMs. Only the registerbanks are swapped
  through RAM.
* **Not part of this RTL.** The surrounding preprocessor:
  * the converter FIFOs, predistortion, I/Q correction and NCO;
  * the platform shell (bus interface, DMA, microcontroller, memory
    subsystem).

  The proposed extensions are not built either: CIC pre-stages and an
  addressable registerbank.
