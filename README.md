# Racing and computing on the same LUTs: an arbiter PUF that carries leap-forward LFSRs

An arbiter PUF (physical unclonable function) sends two edges down two nominally equal
delay paths and lets an arbiter report which one arrived first. The answer depends on
manufacturing variation, so it is unique to each chip, but a 64-segment chain yields only
one bit per race and that bit is usually biased.

This design makes the same LUTs do a second job while the edges race. Each segment of the
delay chain is a LUT6_2 cell. Besides steering the two racing signals, it XORs two spare
logic inputs into the *phase* of the racing signals: both signals are inverted together,
so the race is undisturbed, but a flip-flop that samples the signal after the segment
sees whether it is in phase (0) or in antiphase (1) with the clock. Chaining segments
therefore computes running XORs, which is exactly what a leap-forward LFSR needs.

At the default size, eight 64-segment PUF chains carry four 64-bit leap-forward LFSRs.
Every clock the design gives 8 PUF response bits and 4 x 64 fresh LFSR bits. It combines
them into a 256-bit output: the LFSR words XOR the responses repeated 32 times, with
optional Von Neumann correction of the responses first.

```
              challenge[p] (64 b)                         seed, seed_load
                    |                                          |
 race_in --+--> [ race_chain p : 64 x lut6_2 ] --> puf_arbiter --> puf_resp[p] --+
           |         ^ logic_a/b        | level[63:0]                            |
           |         |                  v                                        v
           |    leap_lfsr l (owns chains 2l, 2l+1) --> lfsr_q[l] --> post_process --> out[255:0]
           +--> ... 8 chains, 4 LFSRs                  vn_corrector ----^   (vn_en)
```

## One segment: path swap plus XOR on the phase

Pin use of every LUT6_2:

| pin | use |
|-----|-----|
| I5 | tied to 1: the cell works as two LUT5s on the same five inputs |
| I4 | challenge bit |
| I3, I2 | logic inputs `logic_a`, `logic_b` |
| I1, I0 | lower and upper racing signal |
| O6, O5 | upper and lower racing signal out |

`puf_pkg::segment_init()` builds the 64-bit INIT word from these rules:

* The upper 32 bits are the lower 32 with the eight 4-bit groups in reverse order. O6 then
  computes the same function as O5 with I4, I3 and I2 inverted, so the two paths are
  identical LUT5s, and inverting the challenge gives the swap.
* In every group, INIT[4k] ^ INIT[4k+3] = 1. When both racing inputs rise, the output
  changes, so the cell passes an edge instead of holding a constant.
* Bits 4k and 4k+3 are fixed so that the output is inverted when I3 != I2. The zeros are
  at positions 0, 7, 11, 12, 16, 23, 27 and 28; the ones are at 3, 4, 8, 15, 19, 20, 24
  and 31.
* This design chooses the remaining bits, 4k+1 and 4k+2. O5 follows I1 when the challenge
  is 0 and I0 when it is 1, the keep/swap of a classic arbiter PUF.

The result is `64'hC33CA55A_A55AC33C`. `tb_lut6_2` checks the word against each rule
independently.

## From running XOR to a leap-forward LFSR

Because the phase flips in every segment whose logic inputs differ, the level after
segment *s*, sampled while the racing signal is low, is

    level[s] = XOR over segments 0..s of (logic_a ^ logic_b)

A flip-flop on `level[s]` thus gets a parity of up to 2(s+1) bits at no extra logic cost.

A W-bit LFSR `Q(i+1) = A Q(i)` that leaps W steps per clock uses `Q' = A^W Q`. Each new
state bit is the XOR of the state bits in one row of A^W. `A` is a shift matrix with the
feedback row given by `TAPS`: `q[j]' = q[j+1]`, and `q[W-1]'` is the XOR of the state bits
selected by `TAPS`. The default polynomial is x^64 + x^4 + x^3 + x + 1, which is primitive.

`puf_pkg::make_layout()` places the rows on the chains at elaboration time:

1. Rows are taken in order 0..W-1.
2. The first row on a chain puts all its bits on the chain, two per segment.
3. Every later row adds only the bits in which it differs from the previous row. The
   running XOR then equals the new row at that row's last segment.
4. The state flip-flop of row *j* samples `level` at that segment. The same 64 flip-flops
   hold the LFSR state and decode the phase.
5. A row that no longer fits on the LFSR's chains is computed with ordinary XOR gates.

Example: with W = 4 and `TAPS = 4'b1001`, the rows are:

    q0' = q0^q3
    q1' = q0^q1^q3
    q2' = q0^q1^q2^q3
    q3' = q0^q1^q2

They need exactly 4 segments:

| segment | logic inputs | tap |
|---------|--------------|-----|
| 0 | {q0, q3} | q0' |
| 1 | {q1} | q1' |
| 2 | {q2} | q2' |
| 3 | {q3} | q3' |

For the 64-bit polynomial, each LFSR owns two chains. 62 of its rows fill all 128 segments
and 2 rows are plain XOR. A polynomial with taps only at low powers keeps the rows sparse:
row j is {j, j+1, j+3, j+4} for most j, and consecutive rows differ in four bits, so two
segments per row. Other polynomials can need several hundred segments. If `TAPS` is
changed, the layout adapts, and any rows that do not fit fall back to plain XOR.

## Racing phases, the arbiter and the clock

* `race_in` is a square wave of the clock period. It rises a quarter period after the
  rising clock edge, and feeds both paths of every chain.
* LFSR state and challenges change at the rising clock edge. They must settle before
  `race_in` rises.
* An edge must cross a whole chain in under a quarter period.

At default settings, a chain takes at most 64 x 599 ps = 38.3 ns, so use a clock period of
at least about 160 ns in simulation. The testbenches use 200 ns.

The arbiter is an SR-bar latch. While either input is low, it is transparent (q = ~top).
When both inputs are high, it holds. So the first path to rise decides:

* upper path first: response 0
* lower path first: response 1

Which racing edge makes the arbiter inputs rise depends on the XOR the chain carries:

* **In phase (XOR = 0):** the inputs rise with the rising edge of `race_in`. The decision
  is held during the second quarter, and a falling-clock-edge flip-flop samples it.
* **Antiphase (XOR = 1):** the inputs rise with the falling edge of `race_in`. The latch
  still holds the decision at the next rising clock edge.

At that rising clock edge, the level of the upper input is the XOR result, and it selects
which sample becomes `response`. So the PUF answer does not depend on what the LFSR
computes. With the delay model used here, both phases give the same response for the
same challenge.

## Outputs and timing

For the race of clock *k*, the rising edge *k+1* produces:

* `lfsr_q[l]` = A^64 Q(k), or `seed[l]` if `seed_load` was set
* `puf_resp[p]`, the response of chain *p*

The output is combinational from these registers:

    out = {lfsr_q[3], ..., lfsr_q[0]} ^ {32{vn_en ? vn_bit : puf_resp}}

`vn_corrector` pairs consecutive responses of each PUF:

* 01 gives 0 and 10 gives 1 (the first bit of the pair); `vn_valid` pulses for one clock.
* 00 and 11 are dropped, and `vn_discard` pulses.

`vn_bit` holds the latest corrected bit so that every clock has a value to combine.

`out_valid` rises one clock after reset. Reset loads fixed non-zero LFSR words. Never load
an all-zero seed: the all-zero state does not change.

## Files

| file | role |
|------|------|
| `rtl/puf_pkg.sv` | INIT word, leap-matrix rows, chain layout, delay model |
| `rtl/lut6_2.sv` | behavioural LUT6_2 with one delay per output (not synthesizable) |
| `rtl/race_chain.sv` | N segments: racing paths, levels, path ends |
| `rtl/puf_arbiter.sv` | SR-bar latch and the two capture flip-flops |
| `rtl/arbiter_puf.sv` | chain + arbiter |
| `rtl/leap_lfsr.sv` | LFSR state, logic-input wiring and taps from the layout |
| `rtl/vn_corrector.sv` | Von Neumann correctors |
| `rtl/post_process.sv` | XOR combine, raw/corrected select |
| `rtl/race_compute_puf.sv` | top: 8 PUFs, 4 LFSRs, corrector, combine |

Top parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 64 | segments per chain, LFSR width |
| `N_PUF` | 8 | chains |
| `N_LFSR` | 4 | LFSRs (each owns `N_PUF/N_LFSR` chains) |
| `TAPS` | `64'h1B` | LFSR feedback taps |
| `DEVICE_SEED` | `32'h12345678` | picks the delays, i.e. which simulated chip this is |
| `BASE_PS`, `SPREAD_PS` | 500, 100 | LUT delay = base + hashed offset in [0, spread) |

## Simulating

Everything is plain SystemVerilog, and Verilator 5 runs it. Because of the LUT delays,
`--timing` is required. From the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --top-module tb_race_compute_puf \
        -y rtl -y tb +libext+.sv rtl/puf_pkg.sv tb/tb_race_compute_puf.sv
    ./obj_dir/Vtb_race_compute_puf

Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_lut6_2` | INIT rules; path keep/swap; phase inversion; LUT6 mode; delays |
| `tb_race_chain` | arrival time of each path end = sum of the selected segment delays; levels = running XOR |
| `tb_puf_arbiter` | decisions for both arrival orders in both racing phases |
| `tb_arbiter_puf` | responses against the path-delay model over 400 random challenges, both phases |
| `tb_leap_lfsr` | the 4-bit example's next-state equations and period; the 64-bit LFSR against 64 single shifts per clock; seed load |
| `tb_vn_corrector`, `tb_post_process` | against reference models |
| `tb_race_compute_puf` | full default size, 240 clocks, about 1 to 2 minutes |
| `tb_stream_randomness` | one 10,000-bit stream in feedback mode with correction on; frequency, block-frequency (M = 128) and runs tests at significance 0.05 |

In `tb_race_compute_puf`, every output is checked against reference models. It runs three
phases: raw responses, corrected responses, and the output fed back as the next challenge.
It counts each mechanism and fails if one never occurs: seed load, both racing phases, both
response values, corrected and dropped pairs, both modes, and plain-XOR rows. Ties are
skipped: a challenge whose two paths have exactly equal modelled delay is not checked.

## How far to trust it, and what is this design's own

* **The delays are a model.** The PUF behaviour is only as real as the hashed delays in
  `puf_pkg::lut_delay_ps`. On silicon, the delays come from the chip, and so do
  uniqueness, reliability and metastability at near-ties. Here an exact tie resolves to
  the later input change.
* **FPGA implementation needs more.** `lut6_2.sv` stands in for the vendor primitive. A
  real build needs that primitive with the computed INIT, plus placement and routing
  constraints that make the two paths symmetric. None of that is included.
* **Resource counts differ.** The published figures are 125 XOR gates and up to 125
  flip-flops per 64-bit LFSR, and 532 flip-flops and 544 LUTs in total. This design uses
  the following:
  * per LFSR: 64 state flip-flops and 128 chain segments, plus 2 rows of plain XOR
  * per PUF: two arbiter flip-flops and the latch
  * 33 flip-flops in the corrector
  * 1 output-valid flip-flop

  Only segments that end a row have a flip-flop on their output. A flip-flop after every
  LUT is not needed, because the other running XORs are never used. Power and area are not
  modelled.
* **This design's own choices:**
  * the 64-bit feedback polynomial
  * the row-by-row layout of the LFSRs on the chains
  * the free INIT bits
  * the quarter-period racing clock
  * the capture flip-flops around the latch
  * the response polarity (lower path first = 1)
  * Von Neumann pairing over consecutive clocks, with a held output bit and a mode input
  * reset values
  * the delay model

* **Not included:**
  * the stand-alone comparison designs (plain LFSRs, 256 plain arbiter PUFs, the
    non-shared version)
  * the rest of the statistical test suite, and the thousand-stream evaluation (one
    stream and three of its tests are simulated)
