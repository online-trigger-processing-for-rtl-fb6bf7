# Sub-nanosecond coincidence trigger for a six-plate RPC-PET camera

A positron annihilation sends two gamma photons in opposite directions. A PET
camera built from resistive plate chambers (RPCs) — here a cube with one plate
per face — sees each photon as a fast hit signal on one plate's *time channel*.
An image needs only the photon *pairs*, so the camera should acquire data only
when two opposing plates fire at nearly the same instant. RPCs resolve time to
better than 300 ps, so the coincidence window can be a fraction of a
nanosecond, which cuts the random (accidental) coincidences and the data that
has to be stored.

This RTL is a fully digital, synchronous trigger that makes that decision in
real time on an FPGA. Each time channel is oversampled at ~3 GS/s by the
FPGA's I/O flip-flops, turning the hit signal into a stream of bits; edges are
found in that stream, every north/south pair of channels is tested for edges
within a programmable window of 1 to 4 samples (~0.33 ns to ~1.3 ns), clusters
with more than one pair are rejected, and the two channels of an accepted pair
receive a trigger pulse 22–26 ns after their hits. Apart from the sampler, the
logic is device-independent and runs at full rate with no dead time.

The structure, clock rates, channel counts, window range, 20 ns output pulses
and the 32767-count characterisation counters follow a published FPGA
implementation (Xilinx Virtex-5) of this trigger. That description gives what
each block does but not its inner workings; word layout, the edge-filter rule,
the exact window rule, the validation span and all latencies are this design's
own and are listed under *Where this design had to choose*.

## Signal path

```
            e_bit_clk[2:0] (500 MHz DDR, 3 phases)      e_word_clk (250 MHz)
                 |                                            |
 n_pads[i] --> sample_block --n_bits[i]--> edge_detect --n_e_bits[i]--+
 (3 pads)      (12-bit word / 4 ns)        (e_filter)                |
                                                                      v
 s_pads[j] --> sample_block --s_bits[j]--> edge_detect --s_e_bits[j]--> coinc_matrix
                                                                      | (cw_size)
                                                     ec_trigger[3][3] v
                                                               coinc_validation
                                                       n_coinc_o, s_coinc_o (4 ns)
                                                          |                  |
                                                   pulse_stretch      coinc_counters
                                                   n_trig_o, s_trig_o  (edges, coincidences)
```

The six plates form a **north** group (channels `n*`) and a **south** group
(`s*`) of three channels each; a coincidence always pairs one north with one
south channel. The matrix has one row per north and one column per south
channel.

## Sampling: three pads, three clock phases, one 12-bit word

This is the part that is easiest to get wrong when porting, so it is described
in full.

Each time channel enters the FPGA on **three pads** carrying the same signal.
Each pad is sampled on both edges of a 500 MHz clock (1 ns per sample), and
the three pads use three phases of that clock, 1/3 ns apart (`e_bit_clk[0]`,
`[1]`, `[2]` delayed by 0, 333 and 667 ps). Interleaved, they give one sample
every ~333 ps.

Per pad (`ddr_deser`) the rising- and falling-edge samples are shifted into a
4-bit register on every rising edge, and that register is copied on the
falling edge into a holding register. The holding register is stable from
1/3–1 ns before to 1–5/3 ns after each rising edge of `e_word_clk`, which picks
it up. `sample_block` then interleaves the pads:

```
bits_o[3*j + k] = sample j of pad k        (j = 0..3, k = 0..2)
bit 0 = oldest sample, bit 11 = newest, 333 ps apart
```

The word loaded at a word-clock edge at time W holds the samples taken from
W − 6 ns to W − 2.33 ns. Clock requirements: `e_word_clk` rises together with
every other rising edge of `e_bit_clk[0]`; phases 1 and 2 trail phase 0. The
testbench clock source `tb/tb_clkgen.sv` shows the exact relationship.

In a real device the pad flip-flops would be the vendor's input
deserializers and the phases would come from a clock manager; neither is part
of this RTL. Only `sample_block`/`ddr_deser` depend on the device.

## Edges and the noise filter (`edge_detect`)

An edge is a low-to-high transition. The filter width `e_filter` = F rejects
high pulses shorter than F samples: an edge is reported at sample t only if
sample t−1 is low and samples t … t+F−1 are high. F = 1 disables the filter;
F may be 1..12 (out-of-range values are clamped). A channel must return low
before it can produce another edge — that is the only limit on the rate, so
up to one edge every two samples (1.5 GHz) is handled.

To look up to 11 samples ahead the block judges the word it received one
cycle earlier, using the newest word as look-ahead. The output `e_bits_o` has
a 1 at each sample where an edge starts, two word clocks after the input word.

## The coincidence window (`coinc_matrix`)

Edges at sample indices a (north channel i) and b (south channel j) coincide
when

```
|a − b| ≤ cw_size − 1          cw_size = 1..4
```

| cw_size | nominal window | sample separations accepted |
|---------|----------------|-----------------------------|
| 1       | ~0.33 ns       | 0 (same sample)             |
| 2       | ~0.66 ns       | 0, 1                        |
| 3       | ~1.0 ns        | 0, 1, 2                     |
| 4       | ~1.33 ns       | 0, 1, 2, 3                  |

A pair is reported once, in `ec_trigger[i][j]` of the word that holds the
*later* edge; the last three edge bits of every channel's previous word are
kept so that pairs straddling a word boundary are found. The matrix is
registered (one word clock).

Because of sampling, a true delay d between two hits appears as either
floor(3d) or ceil(3d) samples, depending on where the hits fall on the 333 ps
grid. A 0.5 ns delay (1.5 samples) is therefore caught in about half of the
cases at cw_size 2 and always at cw_size 3. This rule was chosen because it
reproduces the published measurements (0 % detected at cw_size 1 / 0.5 ns
and cw_size 4 / 1.5 ns, only 31 % at cw_size 3 / 1 ns, 100 % at cw_size 4 /
1 ns). The
same source also calls a 0.5 ns pair "inside" a ~0.66 ns window, which would
need a rule one sample wider; to get that behaviour change `k < cw` to
`k <= cw` in `coinc_matrix.sv` (and review `CW_MAX`).

## Rejecting multiple coincidences (`coinc_validation`)

A gamma pair should fire exactly one north and one south plate. When a third
hit falls within the window the event is ambiguous and is vetoed. The rule
implemented: the matrix of a word is accepted when it holds **exactly one**
pair **and** the matrices of the word before and the word after are empty.
The neighbour check is needed because one cluster of hits can be reported in
two consecutive words (pairs are assigned to the word of their later edge).
Its side effect is that two unrelated pairs 4–8 ns apart are also rejected;
at the expected coincidence rate (~100 kHz) this is rare.

An accepted pair drives a one-cycle (4 ns) pulse on `n_coinc_o[i]` and
`s_coinc_o[j]`; `coinc_o` flags an accepted event and `veto_o` each word
that held rejected pairs. An assertion checks that an accepted event names
exactly one channel per side.

## Latency

| stage                   | word clocks | note                                   |
|-------------------------|-------------|----------------------------------------|
| sampling to `bits_o`    | —           | samples are 2.3–6 ns old at the load   |
| `edge_detect`           | 2           | one word of look-ahead + output reg    |
| `coinc_matrix`          | 1           |                                        |
| `coinc_validation`      | 2           | waits for the following word's matrix  |
| `pulse_stretch`         | 1           | output rises one cycle after `*_coinc_o` |

`n_coinc_o`/`s_coinc_o` rise 20 ns after the word-clock edge that loaded the
word, i.e. 22–26 ns after the later hit was sampled (the published design
quotes under 30 ns in simulation and 35 ns measured at the connectors,
including I/O).

## Programmable and hard-wired variants

`edge_detect`, `coinc_matrix` and the top take `PROGRAMMABLE`. With 1
(default) `e_filter` and `cw_size` are ports and may change at any time; with
0 the parameters `E_FILTER` and `CW_SIZE` are used, the ports are ignored and
synthesis removes the unused compare logic.

## Output pulses and counters

`pulse_stretch` widens each 4 ns trigger to 5 word clocks (20 ns) for the
output connectors; a new trigger restarts the count.

`coinc_counters` supports the measurement of the detected fraction: after a
`cnt_start` pulse it counts all edges of the north channels, all edges of the
south channels and all accepted coincidences, and stops all three when the
first reaches 32767 (`cnt_done`). The fraction is `coinc_cnt / n_edge_cnt`.
Several edges in one word are all counted.

## Outside this RTL

* Generation of the three clock phases and the word clock (a device clock
  manager): the clocks are inputs of `rpc_trigger_top`.
* The host link that programs `e_filter`/`cw_size` and reads the counters:
  these are plain top-level ports.
* The acquisition channels (ADCs) that the triggers are meant to start.

## Where this design had to choose

* 12-bit words, bit 0 oldest, pad interleaving `3*j+k` (derived from three
  pads, DDR at 500 MHz and a 250 MHz word clock).
* Filter rule (high run of at least F samples), high pulses only, F ≤ 12.
* Window rule `|a−b| ≤ cw_size−1`, pair assigned to the word of its later
  edge; cw_size 0 is treated as 1, above 4 as 4.
* Validation over three consecutive words, as above.
* Synchronous active-low reset on `e_word_clk`; after reset the inputs are
  taken as high so that a line already high gives no edge. The pad-side
  flip-flops are not reset and flush within one word.
* Counters sum over the channels of each side and saturate at 32767.

## Verification

Every module has a self-checking testbench in `tb/` that compares against a
reference model written independently of the RTL and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_sample_block`     | a random waveform with 1–7 sample runs; every bit of every word against ideal sampling |
| `tb_edge_detect`      | random run lengths, F = 1, 2, 3, 5, 12 switched at run time, plus a hard-wired F = 3 instance |
| `tb_coinc_matrix`     | random edges on all six channels, cw_size 1–4, hard-wired instance, pairs across word boundaries |
| `tb_coinc_validation` | directed single/double/split pairs, all nine positions, random matrices |
| `tb_pulse_stretch`    | 5-cycle width, retriggering, independent lines |
| `tb_coinc_counters`   | full 15-bit run to 32767, simultaneous stop, restart |
| `tb_rpc_trigger_top`  | whole design at default size: 160 slots of hits with picosecond timing and run-time changes of cw_size/e_filter; checks channel, exact cycle and < 30 ns latency of every trigger, veto count, stretched pulse width, counter values, then drives the counters to their stop with 500 MHz square waves on all channels. It fails unless accepted, out-of-window, vetoed, filtered and boundary-straddling coincidences, setting changes, stretched pulses and the counter stop all occurred |
| `tb_hardwired_top`    | a hard-wired build (`PROGRAMMABLE = 0`, CW_SIZE 3, E_FILTER 2, ports tied to other values) against a programmable build set to the same values through its ports: every output equal in every cycle under random hits |
| `tb_table1_workload`  | the square-wave measurement: a 9.990 MHz wave on one north and one south channel, the south copy delayed, counters run to 32767 for eight window/delay pairs (about 1.5 minutes of simulation) |

Results of the square-wave measurement (noise-free):

| cw_size | delay  | detected |
|---------|--------|----------|
| 1       | 0      | 100 %    |
| 1       | 0.5 ns | 0 %      |
| 2       | 0.5 ns | 50 %     |
| 2       | 1.0 ns | 0 %      |
| 3       | 0.5 ns | 100 %    |
| 3       | 1.0 ns | 0 %      |
| 4       | 1.0 ns | 100 %    |
| 4       | 1.5 ns | 0 %      |

The published hardware measured the same 100 % / 0 % pattern, with partial
values (e.g. 68.6 % at cw_size 2 / 0.5 ns, 31 % at cw_size 3 / 1 ns) caused by
noise and routing skew that a simulation does not have.

Not verified: timing closure at 250 MHz / 500 MHz on a real device, and the
behaviour of the pad flip-flops under metastability.

## Simulating

Verilator 5 with timing support; run from the directory above `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal rtl/trig_pkg.sv -y rtl -y tb \
    tb/tb_rpc_trigger_top.sv --top-module tb_rpc_trigger_top
./obj_dir/Vtb_rpc_trigger_top
```

Replace the testbench name for the others. Testbenches that use the sampler
use `timescale 1ps/1ps`; the package is listed first because every module
imports it.

## Files

| file | contents |
|------|----------|
| `rtl/trig_pkg.sv` | shared constants (channel counts, word width, limits) and clamp functions |
| `rtl/ddr_deser.sv` | one pad: DDR 1:4 deserializer |
| `rtl/sample_block.sv` | three pads of one channel, interleaved 12-bit word |
| `rtl/edge_detect.sv` | edge detection with filter |
| `rtl/coinc_matrix.sv` | 3×3 coincidence matrix |
| `rtl/coinc_validation.sv` | multiple-coincidence rejection, trigger outputs |
| `rtl/pulse_stretch.sv` | 20 ns output pulses |
| `rtl/coinc_counters.sv` | edge/coincidence counters |
| `rtl/rpc_trigger_top.sv` | the complete trigger |
| `tb/tb_clkgen.sv` | three-phase bit clock and word clock for simulation |
| `tb/tb_*.sv` | testbenches listed above |
