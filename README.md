# Multi-mode ring oscillator TRNG for FPGAs

This is a true random number generator (TRNG) for FPGAs. Its randomness comes from
the timing jitter of a ring oscillator that runs in a *multi-mode* state: not one
edge circulates in the ring, but several. The design follows the multi-mode RO TRNG
presented by M. Grujić (imec-COSIC, KU Leuven, 2019) for a Xilinx Spartan-6.

Each random bit is made the same way:

1. Reset the ring.
2. Let it run for a fixed time, so that independent white noise builds up in the
   spacing between two consecutive edges.
3. Measure that spacing with two carry-chain delay lines of about 20 ps per tap.
4. Keep only the least significant bit of the measurement.

An optional linear-code post-processor halves the bit rate and reduces the bias.

| Figure (defaults) | Value |
|---|---|
| ring mode n (edges in the ring) | 3 |
| stages between edges w | 2 |
| ring cycles per bit m | 18 (73.575 ns of running) |
| jitter of the measured pulse | σ ≈ 19.7 ps (19.5 ps measured in the model) |
| delay lines | 2 × 40 taps (2 × 10 CARRY4), ≈ 20 ps per tap |
| raw bit rate | 12.5 Mb/s at a 200 MHz clock (one bit per 16 cycles) |
| after post-processing | 6.25 Mb/s (one 8-bit word per 256 cycles) |
| estimated Shannon entropy | 0.997 bit per raw bit (design target) |

## Where the entropy comes from

### The ring

The ring has `n·w = 6` stages. While it is held in reset, its stages hold a pattern
that contains exactly `n = 3` pending transitions ("edges"), `w = 2` stages apart.
Stages 0, 2 and 4 are the edge-inserting stages. When the reset is released, all
three edges start to travel round the ring at once. A tap therefore sees one edge
every `w · d_stage = 1.35 ns`. Its output toggles at `(2j+1) · 675 ps` after the
release.

Each stage adds an independent Gaussian delay error. Its variance is the jitter
strength times the stage delay: `2.7 fs × 675 ps`, so σ ≈ 1.35 ps per stage. An edge
that has passed `k` stages carries `k` such errors. Two *different* edges have
independent errors.

### The virtual pulse

The measured quantity is the time between two consecutive edges, which is
nominally `w · d_stage`. Call it the *virtual pulse*. After `m` ring cycles
(`m·n` edges past a tap), each of the two edges has travelled about `w·m·n`
stages. The variance of the pulse width is then

    σ²_pulse = (σ²/t) · d_stage · (2·w·m·n − n − 2·w·(m mod 2))

With m = 18 this gives 19.7 ps. The 55th toggle of a tap (j = 54) falls at
`109 × 675 ps = 73.575 ns`. In `mmro_tb`, 400 simulated runs measure the pulse
at exactly that toggle and find σ = 19.5 ps.

To get a larger σ, run the ring for longer. Each extra cycle costs about 4 ns:

    m ≥ (σ²_pulse + (σ²/t)·d_stage·n) / (2·w·(σ²/t)·d_stage·n)

| σ target | m needed | `RUN_CYCLES` at 5 ns |
|---|---|---|
| 10 ps | 6 | 5 |
| 20 ps | 20 | 17 |
| 40 ps | 74 | 61 |

The defaults use m = 18 (19.7 ps), the point chosen for 0.997 bit of entropy per raw
bit. Two testbenches check the other rows:

- `mmro_jitter_sweep_tb` checks the ring model against the formula at m = 6, 18, 20
  and 74.
- `trng_top_jitter_tb` runs the whole TRNG with `RUN_CYCLES` = 5, 17 and 61. It
  checks that the measured position spread follows the expected σ (0.8, 1.2 and
  2.0 taps).

### Two taps, two lines, one bit

Both edges of the pulse are observed at the same moment:

- **Tap A** is the output of stage 0.
- **Tap B** is the output of stage `n·w − w = 4`.

The two taps toggle at the same nominal times, but each toggle is caused by a
different edge: B always sees the edge that follows A's. Each tap drives its own
40-tap carry chain. At the capture edge, each chain holds a step (`…000111…`) whose
position is the time of its edge, in units of about 20 ps.

Each coding line reduces its 40 captured bits to their XOR. For a clean step this is
the LSB of the step position. A "bubble" near the step flips a pair of bits, so it
does not change the parity. The raw bit is

    raw = parity(A) ^ parity(B)  =  LSB(posA − posB)

This is the LSB of the pulse width, quantised in carry delays. Slow global
disturbances, such as supply noise or temperature, move both edges alike and
cancel in the difference.

The pulse's σ of about 20 ps is about one carry delay, so that LSB is close to
uniform. In the end-to-end test, the spread of `posA − posB` is about 1.0 tap and
the raw bits are balanced.

The ring is reset before every bit, so jitter never carries over from one bit to
the next.

## One generation, cycle by cycle

`trng_ctrl` runs a three-state machine (`ST_IDLE`, `ST_RESET`, `ST_RUN`). At the
defaults (5 ns clock) one generation is:

```
cycle        0    1 ... 15   16 (= next 0)
ro_en        0    1 ... 1    0
sample       0    0 ... 1    0        (high in the last run cycle)
capture                     ^  clock edge 15 after ro_en rose = 75 ns
raw_valid                        1    (parity bits valid from here)
```

- `ro_en` comes straight from a flip-flop.
- The capture happens on the same edge that stops the ring. That edge is
  `RUN_CYCLES` periods after the ring started: 75 ns, after the 73.575 ns the
  measured edge needs.
- In the delay-line model, the routing delay (1025 ps) puts the nominal edge at the
  middle tap at that moment. On silicon, placement does the same job.

Dropping `enable` aborts a run at once, with no sample. Two assertions in
`trng_ctrl` check the timing:

- a capture only happens while the ring runs;
- the ring ran exactly `RUN_CYCLES` cycles before each capture.

## Post-processing: linear code [16,8,5]

`lc_postproc` collects 16 raw bits. The first 8 form X1 (first bit in bit 0); the
next 8 form X2. It outputs

    L = X1 ^ rotl(X1,1) ^ rotl(X1,2) ^ rotl(X1,4) ^ X2

The shifts are 8-bit **rotations**. With rotations, every nonzero XOR of output
bits covers at least 5 input bits: the code has minimum distance 5. An input bias ε
therefore becomes at most `2⁴·ε⁵`. One stage of XOR pairing, which has the same
2:1 rate, gives `2·ε²`.

With plain truncating shifts the distance would only be 2. `lc_postproc_tb` measures
the distance from the block itself.

## Blocks and files

All files are in `rtl/` and `tb/`, one module or package per file.

| Module | Kind | What it is |
|---|---|---|
| `trng_top` | top (includes models) | ring + 2 delay lines + `trng_core` |
| `trng_core` | synthesizable | controller, two coding lines, XOR, post-processor |
| `trng_ctrl` | synthesizable | reset / run / sample sequencer |
| `coding_line` | synthesizable | 40 capture FFs + parity encoder |
| `lc_postproc` | synthesizable | [16,8,5] linear-code compressor |
| `mmro` | behavioural model | multi-mode ring oscillator with Gaussian stage jitter |
| `carry_delay_line` | behavioural model | 40-tap carry chain with routing delay |
| `trng_pkg` | package | default sizes and the controller's state type |

`mmro` and `carry_delay_line` cannot be RTL. On an FPGA they are hand-placed LUTs
and CARRY4 primitives whose analog delays are the whole point. The models use `#`
delays at 1 fs precision and `$urandom`. `trng_core` is the part to synthesize:
connect its `ro_en` to your ring and its `taps_a`/`taps_b` to your carry chains.

Top-level ports of `trng_top` (and `trng_core`), with `rst_n` synchronous and
active low:

- `enable`: start or stop generation.
- `raw_bit`, `raw_valid`: one raw bit, valid for one cycle.
- `rnd_word[7:0]`, `rnd_valid`: one post-processed word, valid for one cycle.
- `code_a`, `code_b`: the last delay-line snapshots, for on-line health tests or
  for characterising the source.

Parameters (defaults in `trng_pkg`): `N_MODE`, `W`, `TAPS`, `RUN_CYCLES`,
`RST_CYCLES`. `trng_top` also has `CLK_PERIOD_PS`, `D_STAGE_PS` and `D_CARRY_PS`. It
derives the routing delay in front of the delay lines from them, so that the last
edge that can fit sits at the middle tap at the capture:

    j     = floor((RUN_CYCLES·T_clk − TAPS/2·d_carry − d_stage) / (w·d_stage))
    route = RUN_CYCLES·T_clk − (1 + j·w)·d_stage − TAPS/2·d_carry

At the defaults this gives j = 54 and a route of 1025 ps. The ring model also has
`JIT_FS`.

## Simulating

Every testbench is self-checking. Each one prints `TB_RESULT checks=N failures=M`
and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/trng_pkg.sv tb/trng_top_tb.sv --top-module trng_top_tb
./obj_dir/Vtrng_top_tb
```

Replace `trng_top_tb` with `mmro_tb`, `carry_delay_line_tb`, `coding_line_tb`,
`trng_ctrl_tb`, `lc_postproc_tb` or `trng_core_tb` for the unit tests. All of them
run in seconds. The two jitter sweeps, `mmro_jitter_sweep_tb` and
`trng_top_jitter_tb`, are run the same way; the second takes about a minute.

`trng_top_tb` runs the whole design at its default parameters for 640 generations.
It checks:

- every raw bit against the parities of the snapshots;
- every word against a reference of the linear code;
- the 16-cycle and 256-cycle rates;
- that both lines caught an edge in every snapshot;
- one aborted generation;
- the balance of the raw bits and the spread of the edge positions.

## How far to trust it, and where it departs from the original

The control logic, encoders and post-processor are fully checked in simulation. The
entropy claims rest on the ring model, which contains only the independent Gaussian
noise that the design's security argument uses. The model has no flicker noise, no
supply coupling, no edge collapse and no per-tap delay variation. Real entropy must
be established on silicon: with the snapshots on `code_a`/`code_b`, and with
AIS-31-style tests.

These parts are choices made for this implementation, not taken from the original
design:

- **Clock and cycle counts.** The original gives 12.5 Mb/s and a 73.57 ns run, but
  no clock. 200 MHz with 1 + 15 cycles matches both. A comparison table in the
  original lists 18 Mb/s; this implementation follows the 12.5 Mb/s of its
  implementation results.
- **How the two lines are combined.** This implementation uses taps `w` stages
  apart and the XOR of the parities, read from the original's "double independent
  coding lines" and its differential pulse.
- **Parity encoding.** The coding lines use the parity encoder of delay-chain TRNGs.
- **The rotation reading** of the post-processing formula (see above).
- **Interface details.** The bit order in the post-processor, `enable`/abort
  behaviour, the synchronous reset, and the exposed snapshots.
- **Delay-line model.** Uniform 20 ps carry delays, where the original calibrates
  each block separately, and the routing delay computed from the run length.

The area figure of the original (25 LUTs, 80 FFs, 20 CARRY4 without post-processing)
matches the 80 capture flip-flops here. The controller adds 11 flip-flops and the
post-processor 29.
