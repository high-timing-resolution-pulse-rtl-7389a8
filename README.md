# Feature-fitting DDS pulse synthesizer

A direct digital synthesizer (DDS) running at 1 GSPS can only place a pulse edge on the 1 ns
sample grid: its waveform memory holds one period of the pulse, and each sample clock reads one
word. This design places the rising and falling edges of a trapezoidal pulse with a resolution
much finer than the sample period (100 ps or 10 ps at 1 GSPS) without computing samples on the
fly and with a very small memory.

The idea: the flat parts of a pulse carry no timing information, so only the edges are stored,
but sampled **D times more finely in amplitude** than one sample period needs. Moving an edge
earlier by a fraction `j/D` of a sample period raises every sample on that edge by `j` table
entries. A phase accumulator still sets the pulse period, as in any DDS; when a new period (or the
falling edge) begins, the phase that has already run past the edge start tells how far the edge
lies before the current sample instant, and that becomes an address offset into the edge table.
This is the *adaptive phase adjustment*: one small division per edge, then plain address stepping.

The RTL is synthesizable SystemVerilog with one output sample per clock.

## Signal flow

```
 cfg.k ─► phase_accumulator ─► waveform_state_selector ─► edge_address_generator ─► edge_memory ─► amplitude_scaler ─► dac_sample
          P, wrap               WS = rise/high/fall/low     (phase_offset_calculator)    16-bit        gain
```

| module | job |
|---|---|
| `phase_accumulator` | 32-bit phase `P += K` per sample; the carry marks a new period and leaves the overflow value `P_new` in the register |
| `waveform_state_selector` | compares `P` with `P1 < P2 < P3` to get the state: rising `[0,P1)`, high `[P1,P2)`, falling `[P2,P3)`, low `[P3, 2^32-1]` |
| `phase_offset_calculator` | `offset = round(E*D/K)`, `E` = phase past the edge start; pipelined exact division |
| `edge_address_generator` | the rising and falling address generators and the address select |
| `edge_memory` | 2048 x 16 dual-port RAM with the edge samples and the two level words |
| `amplitude_scaler` | multiplies each sample by a Q1.16 gain, saturating |
| `feature_fitting_pulse_synth` | the top: wires the chain, takes configuration, memory writes, and gives the DAC sample stream |
| `pulse_pkg` | widths, the state enum `wstate_e`, the configuration struct `pulse_cfg_t` |

The DAC, its serial link and the sample-clock generator are outside this RTL; the top gives the
sample stream (`dac_sample`, `dac_valid`) and takes `clk`.

## Placing an edge: the address arithmetic

Let `Ts` be the sample period, `Tres` the wanted resolution, `D = Ts/Tres` (10 for 100 ps, 100
for 10 ps at 1 GSPS). An edge whose 10–90 % time is `T_edge` spans `T_edge/0.8` sample periods
from 0 to full scale, and its table holds

```
N_total = floor(T_edge / (0.8 * Tres))          entries, entry a (1..N_total) = floor((a-1) * 2^16 / N_total)
```

i.e. the ramp sampled every `Tres`. For 3.2 ns edges at 100 ps that is 40 entries, spaced by
`65536/40 = 1638.4` codes.

**Rising edge.** At the first sample of a period the phase is `E = P_new`, which means the edge
started `E/K` sample periods ago. The address generator outputs

```
AR_1 = 1 + offset,   offset = round(E * D / K)       then AR_n = AR_(n-1) + D,   held at NR_total + 1 (high)
```

Each further sample is one sample period later on the ramp, hence `+D` entries.

**Falling edge.** The falling set is read downwards from the high-level word:

```
AF_1 = NF_total + 1 - offset,  offset = round((P - P2) * D / K)     then AF_n = AF_(n-1) - D,  held at 0 (low)
```

**Levels.** In the high state the address is `NR_total + 1` (the high word); in the low state it
is 0 (the low word). Because the high word sits right above the rising ramp and the
falling edge starts there with offset 0, the edge tables and the levels form one continuous
address space and no special cases are needed at the ends of an edge.

**Worked example** (16.7 ns period, 8 ns width, 3.2 ns edges, 100 ps, 12-bit values for
readability): `K = floor(2^32/16.7) = 257183670`. Period 1 starts at phase 0: rising addresses
1, 11, 21, 31 (values 0, 1024, 2048, 3072), high from `P1 = 4K`, falling from `P2 = 8K` at
addresses 41 (high), 31, 21, 11, low from `P3 = 12K`. At the 18th sample the phase wraps to
`P_new = 17K - 2^32 = 77155094`, i.e. the new period began 0.3 ns before this sample, so
`offset = round(77155094*10/K) = 3` and the rising addresses become 4, 14, 24, 34 — the ramp
0.3 ns further along. The falling edge of period 2 begins 0.3 ns before its first sample as well:
addresses 38, 28, 18, 8.

The offset is rounded, not truncated. In the example the exact quotient is 2.9999997 because
`K` is truncated; rounding gives the intended 3, and in general keeps every edge within half a
resolution step of its ideal position. The testbench measures this: interpolated 50 % crossings
of all output edges are within `0.5/D` sample periods of the ideal pulse.

## Memory layout

```
rising set:   0: low (0)  |  1..NR_total: rising ramp  |  NR_total+1: high (65535)
falling set:  fall_base + 0: low  |  fall_base + 1..NF_total: ramp  |  fall_base + NF_total+1: high
```

With equal rise and fall times one set serves both edges (`fall_base = 0`, `NF_total =
NR_total`). With unequal edges, load a second set, ascending like the first, above the rising
one (for example `fall_base = NR_total + 2`). The 2048-word memory (one 36 Kb block RAM) holds
400 entries for 10 ps resolution of a 3.2 ns edge, or a 125-entry 10 ns edge plus a 40-entry
3.2 ns edge. An edge needs at most `2^16` entries before adjacent entries stop differing; longer
edges need a wider `ADDR_W`.

## Configuration

The host computes everything from the period `T`, pulse width `TW` (50 % to 50 %), rise and fall
times `TR`, `TF` (10–90 %), all in units of `Ts`, and writes it to `cfg` (`pulse_cfg_t`):

| field | value |
|---|---|
| `k` | `floor(2^32 * Ts / T)` |
| `phase0` | starting phase, normally 0; taken on the first clock with `run` high. It may lie in the low or high level or within the first sample of an edge, not deeper inside an edge (an assertion checks this) |
| `p1` | `TR * K / 0.8` |
| `p2` | `(TR + 1.6*TW - TF) * K / 1.6` |
| `p3` | `(TR + 1.6*TW + TF) * K / 1.6` |
| `d` | `Ts / Tres` (1..127) |
| `nr_total`, `nf_total` | `floor(TR/(0.8*Tres))`, `floor(TF/(0.8*Tres))` |
| `fall_base` | 0 or the base of the falling set |
| `gain` | amplitude, `65536` = full scale; values above saturate |

The edge memory is written through `mem_we/mem_waddr/mem_wdata` while `run` is low. Apart from
`gain` (which may change at any time) and `phase0` (only read at start), `cfg` must not change
while `run` is high: stop, reconfigure, start. An assertion in the top checks this. The period resolution follows from `K`
(32 bits, so far below 1 ps); the edge placement resolution is `Ts/D`.

## Timing

One sample per clock. After `run` rises, the first sample (the one at `phase0`) appears on
`dac_sample` with `dac_valid` high 13 clocks later (`STEP_W + 6`): 1 accumulator, 1 state
selector, 8 for the offset division (one multiply stage and 7 quotient-bit stages), 1 address,
1 memory read, 1 gain. All registers use the rising clock edge and a synchronous active-low
`rst_n`. `mon_state`, `mon_edge_start` and `mon_offset` travel with each sample for observation.

## Where this departs from, or fills in, the published description

- **Falling-edge offset.** The published algorithm derives both edges' offsets from the
  overflow value `P_new`. That is exact only when `P2` is a whole multiple of `K`, as in its
  example. Here the falling offset is computed from `P - P2` at the first falling sample, which
  equals the published rule in that case and also places the falling edge correctly otherwise
  (for instance the 10 ns rise / 3.2 ns fall setting, where `P2 = 29.25K`).
- **Falling-edge start in the worked example.** The published prose puts the falling edge of the
  example at 9 ns, but its formula for `P2` gives 8 ns, which matches the 8 ns pulse width
  and the later part of the same example. The formula is used.
- **Offset rounding** (see above) and the exact pipelined divider are this design's choices.
  The published design states only the formula.
- **Clocking.** The published design advances the accumulator on the falling clock edge and
  reads addresses on the rising edge. Here all stages use the rising edge and are separated by
  registers. The output sequence is the same, only delayed.
- **Sample rate.** A real 1 GSPS FPGA implementation would emit several samples per fabric clock to
  the DAC link. That arrangement is not described and is not built; this RTL produces one sample
  per clock and models the sample sequence exactly.
- Level words in the memory, the falling-set base address, the gain format, saturation, start
  and stop behaviour, and the 2048-word depth are this design's own choices.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that prints
`TB_RESULT checks=N failures=M`:

- `tb_phase_accumulator`: phase sequence against 64-bit arithmetic, wrap flags, start latency.
- `tb_waveform_state_selector`: random and boundary phases against the threshold rule.
- `tb_phase_offset_calculator`: 12 000 random divisions against `(E*D + K/2)/K`, including the
  worked example (offset 3).
- `tb_edge_address_generator`: every address against the closed forms above, for 100 ps, 10 ps,
  unequal edges and a random start phase.
- `tb_edge_memory`, `tb_amplitude_scaler`: contents, read latency, read-during-write, gain steps
  and saturation.
- `tb_feature_fitting_pulse_synth`: the whole design at its default sizes. It acts as the host,
  computes the tables and parameters, and runs the settings the design was evaluated with: 16.7 ns
  period at 100 ps and at 1 ns resolution, starts from phases in the low and high levels, period
  steps of 100 ps from 16.0 to 16.3 ns and from 18.4 to 19.4 ns, steps of 10 ps from 18.40 to
  18.50 ns, 10 ns / 3.2 ns and 3.2 ns / 8 ns edges with separate sets, amplitude steps from 50 %
  to 100 %, and sample periods of 1, 2, 5 and 10 ns for a 100.3 ns pulse. It checks every sample,
  the latency and the edge crossing times. It also counts overflows, non-zero rising and falling
  offsets, clamping at the high level, separate-set use, scaling and all four states, and fails if
  any of them never occurs. It runs in a few seconds.

Not covered: analog behaviour (DAC, jitter, noise), and configuration changes while running.

## Simulating

With Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv rtl/pulse_pkg.sv \
          tb/tb_feature_fitting_pulse_synth.sv --top-module tb_feature_fitting_pulse_synth
./obj_dir/Vtb_feature_fitting_pulse_synth
```

Replace the testbench name to run a unit test. To change a size, edit `pulse_pkg`: `ADDR_W` for
deeper tables, `STEP_W` for finer resolution (`D` up to `2^STEP_W - 1`; the latency grows by one
clock per bit), `DAC_W` for another DAC.
