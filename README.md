# Delay-line power sensor and AES S-box victim for remote side-channel analysis on FPGAs

When several users share one FPGA, they also share its power distribution
network. A circuit that switches a lot pulls the core supply down for a few
nanoseconds, and every gate on the die becomes slightly slower. A user who
can place ordinary logic next to someone else's circuit can therefore build a
voltage sensor out of LUTs, carry chains and latches, sample it every clock,
and run a correlation power analysis (CPA) on the samples exactly as if an
oscilloscope were attached to the board. No physical access is needed.

This repository holds SystemVerilog for such a measurement system:

* **`tdl_sensor`**, a time-to-digital style sensor. The sensor clock is sent
  down four parallel carry-chain delay lines of 64 taps each; 256 latches
  record how far the clock's high level got in half a period; a 6-stage
  ones-counter/adder tree turns that into a 9-bit sample every clock
  (200 MHz).
* **`cua_sbox`**, the victim ("circuit under analysis"): the first two steps
  of AES for one byte. An 8-bit counter offers a new plaintext every 8 clocks,
  it is XORed with a fixed key byte and sent through the AES S-box, and the
  result is written into 16 copies of an 8-bit register (128 flip-flops) so
  that its switching is large enough to be seen (40 MHz).
* **`rsca_top`**, the two side by side, as they are placed on a Zynq-7020 in
  the experiments this design reproduces. The processing system that supplies
  the clocks, the logic analyzer that stores the samples, and the virtual I/O
  that issues the trigger are vendor IP and are ports of the top.

The end-to-end testbench closes the loop: with a simple model of the supply
droop it records one trace per plaintext and recovers the key byte (85) from
the sensor samples with CPA.

## How the sensor turns a voltage into a number

This is the part of the design that is easiest to misread, because the clock
is both the clock and the measured signal.

```
            +-------------------+    +--- line 0: 64 carry taps ---+
 clk ------>| 12 LUT buffers    |----+--- line 1: 64 carry taps ---+--> taps[255:0]
   |        | (initial delay)   |    +--- line 2: 64 carry taps ---+        |
   |        +-------------------+    +--- line 3: 64 carry taps ---+        v
   |                                                          +----------------------+
   +--(enable, transparent while clk = 1)-------------------->| 256 latches          |
   |                                                          +----------------------+
   |                                                                     | 256
   |                                                          +----------------------+
   +--(rising edge)------------------------------------------>| ones-counter + adder |
                                                              | tree, 6 stages       |--> sample[8:0]
                                                              +----------------------+
```

One sensor period (5 ns at 200 MHz):

1. The clock rises. The rising edge enters the initial delay (12 LUTs, about
   2.16 ns in the model) and then races along the four carry chains, one tap
   every ~10 ps.
2. While the clock is high, the latches are transparent and follow the taps.
3. The clock falls after 2.5 ns. The latches close and keep a thermometer
   pattern per line: taps the rising edge has already passed read 1, the rest
   read 0. With the model's delays about 40 of the 64 taps of each line are
   reached, so the sample sits near 167 out of 256.
4. During the low phase the pattern is held. At the next rising edge the first
   counter stage registers it, and six rising edges after the falling edge the
   count appears on `sample`.

If the supply drops, the LUTs and carry cells slow down, the edge gets less
far in 2.5 ns, and the sample falls. In the model a 0.1 % slowdown of all
primitives lowers the sample by about one count; the sample is therefore
*negatively* correlated with the victim's activity.

The initial delay exists only to spend most of the half period in cheap, slow
LUTs, so that the fine carry taps, which are few, cover the interesting part.
Its length must be tuned to the clock frequency and the placement; 12 LUTs is
the length used at 200 MHz.

### Bubbles and why the sensor counts ones

Carry taps are not perfectly uniform, and each tap reaches its latch through a
wire of its own. A later tap can therefore switch before an earlier one, and a
latched line can read `1…110100…0` instead of `1…111100…0`. A priority
encoder that looks for the first 0 would report the position of the bubble and
skip output codes. Counting the ones gives the same value as the corrected
pattern and never skips codes, and it adds the four lines into one number
with four times the resolution of a single line. The behavioural line model
reproduces bubbles on purpose (wire spread up to 24 ps against a 10 ps tap
step); the sensor testbench sees them in about one pattern in five and checks
that the sample is still exactly the number of ones.

### Counter pipeline

`ones_counter_adder_tree` counts ones in 32 groups of 8 bits (stage 1), then
adds pairs in five more registered stages: 32 → 16 → 8 → 4 → 2 → 1. That is
six stages in all and a 9-bit result (0…256), one result per clock, latency
six clocks. For other sizes the depth is `1 + log2(N_IN / GROUP)`; `N_IN /
GROUP` must be a power of two.

### Latch timing and the hold margin

The latches and the first counter stage use the same clock. In the device the
latches reopen at the rising edge but their outputs move only after their
propagation delay, so the counter register, clocked by the same edge, still
captures the held pattern. A zero-delay simulation has no such margin, so
`tdl_sensor` routes the latch enable through `clock_route_model`, a 100 ps
transport delay. This shifts the sampling window by the same 100 ps for all
taps and otherwise changes nothing.

## The victim circuit

`cua_sbox` computes `S(plaintext ^ KEY)`:

* `pt_counter`: a 3-bit prescaler counts enabled clocks; every 8th clock the
  8-bit plaintext steps by one (255 wraps to 0). `clk_en` low freezes both.
  `pt_step` marks the clock whose edge loads the next plaintext.
* AddRoundKey: XOR with `KEY` (8'd85).
* `aes_sbox`: the standard AES S-box, computed rather than tabulated: the
  inverse in GF(2^8) as `a^254` by square-and-multiply, then the affine map
  with constant 0x63.
* 16 registers of 8 bits, all loaded on every rising edge with the S-box
  output and cleared by `rst_n`. They carry `keep`/`dont_touch` attributes so
  synthesis does not merge them, and they are outputs of the top for the same
  reason.

Because the registers are reloaded every clock with the same value for 8
clocks, the victim's data-dependent switching happens once per plaintext,
one clock after the plaintext changes.

## The system top

`rsca_top` instantiates the sensor and the victim with independent clocks:

| port | dir | width | meaning |
|---|---|---|---|
| `clk_sensor` | in | 1 | sensor clock, 200 MHz |
| `clk_cua` | in | 1 | victim clock, 40 MHz |
| `rst_n` | in | 1 | asynchronous active-low reset of the victim |
| `trigger` | in | 1 | starts the victim's plaintext counter (`clk_cua` domain) |
| `droop` | in | 10 | simulation only: slowdown of the delay primitives in 0.01 % steps; tie to 0 for synthesis |
| `sample` | out | 9 | sensor sample (`clk_sensor` domain), to the trace recorder |
| `trace_trigger` | out | 1 | the trigger, recorded next to the samples |
| `plaintext` | out | 8 | current plaintext |
| `pt_step` | out | 1 | next edge of `clk_cua` loads a new plaintext |
| `cua_regs` | out | 16×8 | the victim's output registers |

In the hardware setup the two clocks come from the Zynq processing system,
the trigger from a virtual-I/O core, and `sample` and `trace_trigger` go to
an integrated logic analyzer that fills block RAM and is read over JTAG. Those
cores are not part of this RTL. Sampling on the other half of the clock cycle,
which the experiments also use, needs only a 180° shifted `clk_sensor`.

## What synthesizes and what is a model

| module | kind | notes |
|---|---|---|
| `rsca_pkg` | package | sizes, key byte, `sample_t`, `byte_t`, `droop_t` |
| `rsca_top` | structural | top level |
| `tdl_sensor` | structural | contains the delay models below |
| `lut_initial_delay` | behavioural model | 12 × 180 ps transport delays, 0–10 ps edge jitter |
| `carry4_tdl` | behavioural model | 64 taps, 10 ps per tap, 0–24 ps wire spread, per-line seed |
| `clock_route_model` | behavioural model | 100 ps latch-enable route |
| `tdl_latch_bank` | RTL (latches) | 256 transparent-high latches |
| `ones_counter_adder_tree` | RTL | 6-stage popcount |
| `cua_sbox`, `pt_counter`, `aes_sbox` | RTL | victim |

The whole top passes through a synthesis tool; the delay models then reduce
to plain wires (delays are ignored), so the result shows the flip-flop and
latch budget but not the timing: about 670 flip-flop bits (535 of them in the
adder tree, 128 in the victim registers) and 256 latch bits for the whole top. The delay lines have no logic function, only
timing, so they are written as
timing models with `#` delays and a `droop` input. To build the sensor on a
7-series FPGA, replace `lut_initial_delay` by 12 LUT1/LUT6 buffer instances
and each `carry4_tdl` by a chain of 16 CARRY4 primitives whose `CO` outputs
are the taps, drop `clock_route_model`, keep everything with placement
constraints (the published sensor occupies 17 × 2 CLBs for the delay lines),
and mark the chains `dont_touch`. Expect to retune the number of LUTs so that
the falling edge lands in the middle of the carry chains.

All model delays (180 ps per LUT, 10 ps per carry tap, the 0–24 ps wire
spread, 0/3/6/9 ps offsets between the four lines, 100 ps enable route) and
the linear law "every delay grows by droop/10000" and a random 0–10 ps jitter
on each edge leaving the initial delay are estimates, not measured
values. They set the operating point (sample ≈ 167 at no droop, ≈ 1 count per
0.1 % slowdown) and can be changed through the parameters of the two models.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_INIT_LUT` | 12 | top, sensor | LUTs in the initial delay |
| `N_TDL` | 4 | top, sensor | parallel delay lines |
| `TAPS_PER_TDL` | 64 | top, sensor | taps per line (16 CARRY4) |
| `SAMPLE_W` | 9 | top, sensor | `$clog2(N_TDL*TAPS_PER_TDL+1)` |
| `KEY` | 8'd85 | top, victim | key byte |
| `N_COPIES` | 16 | top, victim | copies of the S-box register |
| `PT_PERIOD` | 8 | victim | clocks per plaintext |
| `GROUP` | 8 | counter | bits per first-stage ones-counter |
| `LUT_PS`, `JITTER_PS`, `TAP_PS`, `SKEW_PS`, `OFFSET_PS`, `SEED`, `ROUTE_PS` | see above | models | model timing |

The two delay-line models use `timeunit 1fs` and integer delays so that
the droop steps stay exact; `clock_route_model` uses 1 ns / 1 ps.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. With
Verilator 5 (timing support is required for the delay models):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/rsca_pkg.sv tb/tb_rsca_top.sv --top-module tb_rsca_top
./obj_dir/Vtb_rsca_top
```

Replace `tb_rsca_top` by any other testbench name. The warnings Verilator
prints are about the dynamic `#` delays of the models and the latch idiom.

| testbench | what it checks |
|---|---|
| `tb_aes_sbox` | all 256 inputs against exp/log-table reference, published first row, bijectivity |
| `tb_pt_counter` | step every 8 enabled clocks, +1, wrap, hold while disabled, step pulse, reset |
| `tb_cua_sbox` | registers = S(p ^ 0x55) one clock after p, copies equal, all 256 plaintexts, reset, hold |
| `tb_tdl_latch_bank` | transparent while high, holds while low |
| `tb_ones_counter_adder_tree` | exact count after exactly 6 clocks, one per clock, thermometer/bubble/random words |
| `tb_lut_initial_delay` | edge delay = 12 × 180 ps × (1 + droop/10000), plus 0–10 ps jitter |
| `tb_carry4_tdl` | per-tap switching window, slowdown with droop, out-of-order taps |
| `tb_tdl_sensor` | sample = ones in the held pattern 6 clocks later, sample falls with droop, bubbles occur |
| `tb_rsca_top` | full system at default parameters, see below |

`tb_rsca_top` runs the top with no parameter overrides. A droop model in the
testbench slows the delay lines by 0.0125 % per set bit in the 128 victim
registers, plus 0–0.2 % of random noise. It records 256 traces of 40 samples
(8 victim clocks × 5 sensor clocks), one per plaintext, pausing the trigger
once in the middle, and then runs CPA with the Hamming weight of
`S(p ^ guess)` for all 256 guesses and all 40 columns. It does this twice:
with the sensor clock as generated, and again after shifting it by half a
period (180°) so that the samples come from the other half of the clock
cycle. Both runs recover key 85 with a correlation of about −0.9 against
about 0.5 at most for any wrong guess, a ratio of about 1.8–1.9 between the
best right and best wrong correlation. In each run the sample histogram must
span a range of values with no two neighbouring empty values; a single rare
value in the tails may be missing from a finite acquisition.
It also checks every sample against the latched pattern (about 20,000
samples, several thousand of them with bubbles), the victim registers against
a reference S-box, and that reset, the trigger stall, the plaintext wrap,
bubble correction and the phase shift each happened. It simulates about
104 µs in about 2.5 minutes.

The droop model is deliberately simple: it says that more set bits mean more
current and a slower sensor, which is the physical effect the whole approach
relies on. It does not model distance, direction, clock regions or the
delay with which a drop travels across the die; those are properties of a
particular chip and placement, not of this RTL.

## Design choices not fixed by the published description

* Initial-delay, tap, wire and route delays of the models (see above).
* The group size (8) and the pipeline split of the ones-counter; the
  published information is the function, the six-stage depth and the 9-bit
  output.
* Asynchronous active-low reset for the plaintext counter and the victim
  registers; the counter's prescaler and its holding while the enable is low.
* Key byte 85 read as decimal (0x55).
* Victim registers brought out as ports; `pt_step` output.
* No reset in the sensor: its pipeline refills within six clocks.
* The latch idiom (`always_latch` with a non-blocking assignment).

## Limits

* The sensor's analog behaviour is only as good as the delay model. The RTL
  says nothing about the achievable sensitivity on silicon, which depends on
  placement relative to the victim, power rails, clock regions and other
  circuits on the die.
* No trace storage or readout is included; `sample` must be recorded by a
  logic analyzer core or a FIFO of your own.
* Only the S-box victim is included, not a full AES core.
