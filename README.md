# Capture-power-safe logic BIST (CPS-BIST)

At-speed scan-based logic BIST applies thousands of pseudo-random vectors with
launch-on-capture (LOC) clocking: the vector is shifted in, a launch pulse (T1)
makes the circuit switch, and a capture pulse one functional clock later (T2)
stores the response. When the launch pulse makes too much of the circuit switch
at once, the IR drop in the power grid slows down the paths around the hot
region. A long sensitized path there can then miss the capture edge, and a good
chip captures a wrong value. In BIST one wrong bit corrupts the whole signature,
so the chip fails.

CPS-BIST does not try to lower the capture power. It relies on design-time
analysis that finds, for every pseudo-random vector, which captured bits are
*risky*: end points of long sensitized paths whose surroundings switch
excessively. Those bits are uncertain, just like unknown (X) values. They are
few: about 0.01 % of all response bits or less in the benchmarks the scheme was
evaluated on. Because the BIST sequence is deterministic, their positions are
known in advance. A small masking circuit forces them to 0 before they reach
the MISR. The signature is then safe whatever the hot spots capture.

This repository is synthesizable SystemVerilog for the complete BIST wrapper
with both masking options, plus self-checking testbenches.

## Structure

```
            +------+   +---------------+   +-----------------------+
  PRPG ---> | 20-> | ->| 200 scan chains| ->|  masking + compaction | -> MISR -> signature
 (20-bit)   | 200  |   |  x SCAN_LEN FF |   |  (partial or full)    |   (20-bit)
            +------+   +---------------+   +-----------------------+
          phase shifter   ^ cut_q | cut_d        ^ counter -> mask control unit
                          |  circuit under test  |
                       bist_controller: SE, scan-clock enable, PRPG/MISR/counter enables
```

| Module | Role |
|---|---|
| `cps_bist_top` | the whole BIST; the circuit under test is outside, on ports `cut_q`/`cut_d` |
| `bist_controller` | LOC sequencer: shift phases, T1/T2 pulses, enables, `done` |
| `prpg` | 20-bit LFSR, x^20 + x^17 + 1 |
| `phase_shifter` | 20 to 200 XOR network, three taps per output |
| `scan_chains` | 200 chains of mux-D scan flip-flops |
| `space_compactor` | 200 to 20 XOR compactor |
| `misr` | 20-bit MISR, x^20 + x^17 + 1 |
| `mask_counter` | slice counter (partial-mask) or vector counter (full-mask) |
| `mcu_partial`, `mcu_full` | combinational mask control units, decoding the counter against a table of risky positions |
| `mask_network` | AND gates: a line passes only where the control unit's `keep` bit is 1 |
| `cps_bist_pkg` | `mask_option_e`, controller state type, phase-shifter tap rule |

## The two masking options

`MASK_OPTION` selects one of them. Both place AND gates on the response path.
They differ in where the gates sit and in what the counter counts.

**Partial-mask (`MASK_PARTIAL`).** One AND gate per scan chain sits *before*
the compactor. It has to sit there: an X that passes an XOR compactor spoils
every output it reaches. The counter counts unloaded scan slices across the
whole test. `mcu_partial` clears the `keep` bit of exactly the chain(s) whose
bit in the current slice is risky. Only risky bits are lost, so the
fault-coverage loss is minimal. The control unit, though, holds one entry per
risky bit.

**Full-mask (`MASK_FULL`, the default).** One AND gate per compacted line sits
*after* the compactor, which means 20 gates instead of 200. The counter counts
vectors. While the response of a risky vector is being unloaded, `mcu_full`
clears all 20 `keep` bits. That vector's whole response is therefore discarded
(up to 600 bits for one risky bit), and the table needs one entry per risky
vector. This option has the smaller control unit, and the reported
fault-coverage losses of both options were small. For that reason it is the
default here.

## Timing of a test and how positions are numbered

Pulse `start` for one clock. The controller then runs `NUM_TV + 1` shift
phases of `SCAN_LEN` clocks each (SE = 1). The first phase only loads
vector 0. Each of the first `NUM_TV` phases is followed by the launch clock T1
and the capture clock T2 (SE = 0). Shift phase *v* (for *v* ≥ 1) unloads the
response of vector *v-1* into the MISR while it loads vector *v*. `done` rises
after

    (NUM_TV + 1) * SCAN_LEN + 2 * NUM_TV  clocks     (250,003 at the defaults)

and `signature` then holds the final MISR value. A new `start` from the done
state restarts the test. Shift, launch and capture are all one clock of the
same clock `clk`. The gated scan clock is modelled as a clock enable. The
first unloaded bit of a chain comes from its last flip-flop, `q[c][SCAN_LEN-1]`.

The risky-position tables are the part that connects this RTL to the analysis
tool, so the numbering matters. Suppose a risky bit is captured at T2 of
vector *v* in flip-flop `q[c][p]`, where `p = 0` is the flip-flop next to the
phase shifter. It then leaves chain *c* at slice `s = SCAN_LEN-1-p` of the
next shift phase. The partial-mask counter then reads

    k = v * SCAN_LEN + (SCAN_LEN - 1 - p)

and the table entry is `RISKY_SLICE = k`, `RISKY_CHAIN = c`. The full-mask
entry is `RISKY_TV = v`. The counters are `ceil(log2(NUM_TV*SCAN_LEN))` and
`ceil(log2(NUM_TV))` bits wide: 18 and 16 at the defaults.

The default tables are a worked example only. The partial-mask table holds
three risky bits: chain 1 at slices 117,909 and 147,625, and chain 3 at slice
83,357. The full-mask list holds the vectors that contain them: 39,303,
49,208 and 27,785. For a real circuit, generate both from your own capture
power analysis. A table with no entries is written as one entry that the
counter never reaches, for example `NUM_TV * SCAN_LEN`.

## Parameters of `cps_bist_top`

| Parameter | Default | Notes |
|---|---|---|
| `N_CHAINS` | 200 | scheme's BIST configuration |
| `SCAN_LEN` | 3 | own choice: 3 slices, as in the scheme's masking example; 430 flip-flops on 200 chains |
| `PRPG_W`, `MISR_W` | 20, 20 | scheme's BIST configuration; phase shifter 20→200, compactor 200→20 |
| `NUM_TV` | 50,000 | largest vector count evaluated |
| `MASK_OPTION` | `MASK_FULL` | see above |
| `PRPG_TAPS`, `PRPG_SEED`, `MISR_TAPS` | `20'h90000`, 1, `20'h90000` | own choice |
| `N_RISKY_BITS`, `RISKY_SLICE[]`, `RISKY_CHAIN[]` | 3 entries | partial-mask table |
| `N_RISKY_TV`, `RISKY_TV[]` | 3 entries | full-mask table |

If you change `PRPG_W` or `MISR_W`, give the matching primitive polynomial in
the taps parameters. The phase shifter needs `PRPG_W >= 4`.

## What follows the scheme and what is this design's own

Taken from the scheme: the block structure (PRPG, phase shifter, scan chains,
compactor, MISR, controller, counter, combinational mask control unit, AND-gate
mask network). Also from the scheme: the two masking options with their gate
positions, the LOC clocking with SE, and the sizes 200 / 20 / 20→200 /
200→20. The 18-bit slice counter for 50,000 vectors × 3 slices, the example
risky positions, and full-mask as the preferred option also come from it.

Chosen here, because the scheme leaves them open:

- The LFSR and MISR polynomials and the seed.
- The phase-shifter tap rule: output *i* XORs bits *a*, *a+1+(k mod 10)* and
  *a+11+(k mod 9)* (mod 20), where *a = i mod 20* and *k = i / 20*.
- The interleaved compactor grouping: output *j* is the XOR of chains
  *j, j+20, …, j+180*.
- The chain length of 3.
- One-clock shifts with no dead cycles around the SE transition.
- The counting order of slices.
- Resets and clears at `start`.
- The mask control units are written as parameter tables instead of
  generated case statements. The two are logically equivalent, and synthesis
  reduces either to a decode of the counter.

Not included:

- The circuit under test, including its X-bounding and test points. Connect
  it through `cut_q`/`cut_d`.
- The design-time capture-power-safety analysis that produces the risky
  tables. That is a software flow working from layout and power-grid data.
- Signature comparison. The signature is an output, and comparing it against
  the golden value is left to the user.
- Programmable masking from a memory, which the scheme names only as future
  work.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- The PRPG is checked against an independent LFSR, including its full period
  of 2^20-1.
- The phase shifter, compactor and AND network are checked against their
  formulas with random and one-hot inputs.
- The scan chains are checked against a reference array under random
  shift/capture/idle cycles.
- The controller is checked cycle by cycle against a schedule. It is also run
  to `done` at the default size, to confirm 250,003 clocks.
- Every counter value is applied to the mask control units.

The system-level tests use `tb/cps_bist_env.sv`. It stands in for the circuit
under test with a small nonlinear function of neighbouring flip-flops. It makes
the capture at every risky position **wrong** (inverted) at T2, and computes the
expected signature with a reference model written independently of the RTL and
free of errors. A run passes only under all of these conditions:

- The signature equals the reference.
- The test length is exact.
- The number of masked unload cycles is as predicted.
- Shift, launch, capture, risky capture, wrong capture, masking and done each
  happened at least once.

| Testbench | What runs |
|---|---|
| `tb_cps_bist_top` | both options, 40 chains × 3, 300 vectors, six risky bits (two in one slice, one in the very last slice); the same errors on a BIST whose tables never match, whose signature must come out wrong; and the masking example of the scheme: 4 chains × 3, 50,000 vectors, its three risky bits, partial-mask |
| `tb_cps_bist_full` | the default configuration unchanged: full-mask, 200 × 3, 50,000 vectors (about 3 s) |
| `tb_cps_bist_workload` | both options, 200 × 3, 10,000 vectors, with the risky-bit / risky-vector counts reported for two benchmarks of 430 flip-flops: 690 / 61 and 1,574 / 120 |

The benchmark circuits themselves are not available, so the workload runs use
the stand-in logic and generated positions. They show that the masking
hardware holds tables of that size and keeps the signature clean. They cannot
reproduce the reported fault-coverage or area figures. Larger circuits need a
larger `SCAN_LEN`; for example, 1,317 flip-flops need 7 and 99,759 need 499.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cps_bist_pkg.sv tb/tb_cps_bist_full.sv --top-module tb_cps_bist_full -o sim
./obj_dir/sim
```

Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/cps_bist_pkg.sv rtl/cps_bist_top.sv`.
The remaining warnings are intentional. `SYNCASYNCNET` appears because the
controller's assertion samples the asynchronous reset. `UNUSEDSIGNAL` appears
for the counter increment of the option that is not selected. The two
`PINCONNECTEMPTY` warnings are for the controller's `launch`/`capture`
outputs, which the top does not need.
