# A delay-fault-testable 16-bit domino adder

Fast datapath blocks such as adders are often built in compound domino logic
(CDL): dynamic gates with NMOS pull-down stacks, alternating with static
NAND/NOR gates. A resistive via or a weak transistor in such a block can slow
it down without changing its logic function. A test at full speed would catch
that. A cheap tester running at a low clock frequency gives every gate a long
evaluation phase, so it misses it.

This design makes small delay faults visible at a low test clock. The adder is
cut into three **test sections**. The first dynamic gate of each section gets
an NMOS **footer transistor**. In test mode, the footer of the section under
test is switched off a fixed, on-chip-generated delay after the rising clock
edge. If the section has not finished evaluating by then, its dynamic nodes
stay precharged and the adder produces a wrong sum. The delay fault has become
a stuck-at fault that any slow tester can see at the outputs. The window is
measured from the clock edge, not by the clock period, so the test clock can be
as slow as 170 MHz.

The RTL has two parts:

- the adder's logic and the digital DFT control, written as synthesizable
  SystemVerilog;
- behavioural models (with `#` delays) for the two things that are really
  analog: the inverter delay chain and the timing of the footered domino
  sections.

## The adder

```
 A[15:0] B[15:0]
    |       |
    +---+---+----------------------------+
        |                                |
  [pg_block]  P = A|B, G = A&B           |         section 1
        |                                |
  [carry_merge_tree]  C3 C7 C11 C15      |         section 2
        |                         [csa4 x 8]  static, carry in 0 / 1
        |                                |
  [sum_mux x 4] <-- block carry  --------+         section 3
        |
     S[15:0], cout = C15
```

- **Carry-generate.** `pg_block` forms `P[i] = A[i] | B[i]` and
  `G[i] = A[i] & B[i]`. OR-propagate is valid because only carries are
  computed from it. `carry_merge_tree` evaluates `C[i] = G[i] | P[i]·C[i-1]`
  as a binary tree. Level L merges aligned spans of 2^L bits. The carry at the
  end of each 4-bit block (C3, C7, C11, C15) is made by folding the spans
  that cover bits 0 to that block end onto `cin`, widest span first. For
  example, C11 uses the span of bits 7..0 and then the span of bits 11..8.
- **Sum-generate.** Each 4-bit block A..D has two static `csa4` adders, one
  for carry in 0 and one for carry in 1. They work in parallel with the carry
  tree. A `sum_mux` per block then picks one of the two sums, using `cin` for
  block A and C3, C7, C11 for blocks B, C, D.
- **Domino view.** The P/G gates, the block carries and the output muxes are
  dynamic gates, which are low during precharge. `adder16` ANDs each of their
  outputs with an *evaluated* flag (`eval_pg`, `eval_cm`, `eval_mux`). Tie all
  flags to 1 (or to `clk`) and you have a plain adder. The timing models
  drive them in the testable top level. The carry-select adders are static
  and are never gated.

## Test sections and the evaluation window

The critical path runs through seven CDL stages: four dynamic and three
static. The three sections are:

| section | gates | footer | nominal arrival at its end | window (arrival + 20 %) | smallest detectable fault |
|---|---|---|---|---|---|
| 1 | propagate-generate | first P/G dynamic gate | 95 ps | 114 ps | 19 ps |
| 2 | carry merge | first carry-merge dynamic gate | 175 ps | 210 ps | 35 ps |
| 3 | output muxes | mux dynamic gate | 230 ps | 276 ps | 46 ps |

What happens in one clock cycle, when section *k* is under test:

```
Clk         ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____   (170 MHz: 2.9 ns high)
Test_clk[k] ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________________________/‾‾  = footer of section k
                |<-- W_k --->|
section k       |  evaluates ... must finish here
other sections: footer = Clk, the whole high phase
```

- `Test_clk[k]` is node C (the clock, in test mode), inverted and delayed by
  W_k in the delay chain.
- Its falling edge closes the window W_k after the clock rises.
- Its rising edge comes during precharge. By then the footer is on again for
  the next evaluation.

The window W_k is 1.2 times the nominal time needed to reach the end of
section *k*. The 20 % margin absorbs process, voltage and temperature spread,
so that good parts pass. A defect that adds more than 0.2·arrival to a path
through section *k* makes that path finish after the footer has turned off.
The affected gate outputs stay low for the rest of the cycle. Everything
downstream then computes with those wrong values:

- a late P/G term can lose a block carry;
- a lost block carry makes its mux pick the carry-in-0 sum;
- a late mux leaves sum bits at 0.

Only the section under test gets the short window. The others are clocked by
the system clock and have the whole high phase. A failure can therefore be
blamed on the section under test, which helps diagnosis.

In normal mode all footers are held at VDD and never switch. The adder then
has the whole high phase of the clock, like a design without DFT. At 170 MHz
such a design would need a fault of about 2.7 ns to fail. At full speed it
still needs a fault larger than the slack to the falling clock edge: with a
300 ps high phase and a 230 ps nominal delay, that means more than 70 ps.

### Where the numbers come from

The source design reports the smallest faults its test detects (19, 35 and
46 ps for the three sections) and a 20 % window margin. It does not give the
section delays. The arrival times 95/175/230 ps are chosen so that 20 % of
each equals the reported limit. This reads each section's nominal delay as
measured from the rising clock edge to the end of that section. The windows
follow from the arrival times. Change the numbers in `dft_pkg` to describe
another process.

## Mode control

Three DC pins choose the mode (`dft_mode_decode`):

| T/N | Ctrl1 | Ctrl2 | mode | delay-chain input (node C) | footers 1 / 2 / 3 |
|---|---|---|---|---|---|
| 0 | x | x | normal | VDD | VDD / VDD / VDD |
| 1 | 0 | 0 | test section 1 | Clk | Test_clk1 / Clk / Clk |
| 1 | 0 | 1 | test section 2 | Clk | Clk / Test_clk2 / Clk |
| 1 | 1 | 0 | test section 3 | Clk | Clk / Clk / Test_clk3 |
| 1 | 1 | 1 | reserved (meant for a 32-bit adder) | Clk | Clk / Clk / Clk |

`dft_clock_mux` holds the two mux levels:

- **First level.** Feeds node C, the input of the delay chain. Holding node C
  at VDD in normal mode keeps the chain quiet. None of its nodes floats or
  toggles.
- **Second level.** One one-hot mux per footer: VDD, Clk or that section's
  tap. An assertion checks that each set of select lines is one-hot.

What the reserved code does here (no section under test) is this design's
choice.

## Modelled defects

`dft_adder16` has a port `defect[3]` of type `defect_t`, one entry per
section:

- `mask` marks the gate outputs of the section that lie on a slow path;
- `extra_ps` is the added delay.

Bit order of `mask` by section:

- section 1: bits 15:0 are P0..P15 and bits 31:16 are G0..G15;
- section 2: bits 3:0 are C3, C7, C11, C15;
- section 3: bits 15:0 are the sum bits.

These ports stand in for resistive defects injected in circuit simulation.
Tie them to zero in a product. A defect on a path also delays the start of
the next section.

## Modules

| module | kind | role |
|---|---|---|
| `dft_pkg` | package | widths, delays, windows, `dft_mode_e`, `footer_sel_t`, `defect_t` |
| `dft_adder16` | top | everything wired together |
| `adder16` | synthesizable | datapath with evaluated-flag gating |
| `pg_block`, `carry_merge_tree`, `csa4`, `sum_mux` | synthesizable | datapath parts |
| `dft_mode_decode`, `dft_clock_mux` | synthesizable | DFT control and muxes |
| `dft_delay_chain` | behavioural | inverter chain, inertial delays `TAP1/2/3_PS` |
| `cdl_section_timing` | behavioural | footered domino section timing (×3) |

### Timing at the top

- Apply `a`, `b`, `cin` and the mode pins while `clk` is low.
- `s` and `cout` settle about 230 ps after `clk` rises and hold until `clk`
  falls. Strobe them before the falling edge.
- In test mode the low phase must be longer than 276 ps, so that every
  `Test_clk` has risen again before the next evaluation.

## How far to trust it, and what differs from the original circuit

- **Logic.** The logic of the adder and of the mode decode follows the source
  design. The testbenches check it exhaustively or with thousands of random
  vectors, against independent reference models.
- **Simplified timing.** The timing is a deliberate simplification of analog
  behaviour:
  - each section has one nominal delay;
  - a gate output either completes in the window or stays precharged, with no
    partial discharge and no noise or charge sharing;
  - only one evaluation is tracked per cycle, so a defect delay must be
    shorter than the clock's high phase.
- **Not modelled.** Transistor-level features have no logic function and are
  left out: high-VTH devices in the DFT logic, C²MOS mux stages, upsized
  footers. Their cost (about 3.4 % more delay, 1.8 % more switching energy
  and a 5 to 7 % area penalty in the original) is therefore not modelled.
- **Own choices.** Things the source leaves open and this design chooses:
  - the carry-select adders use ripple carry;
  - there is a `cin` input and `cout` is C15;
  - each second-level mux offers exactly VDD, Clk and its own tap;
  - the exact tree shape of the carry-merge tree.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dft_pkg.sv tb/tb_dft_adder16.sv \
          --top tb_dft_adder16 -o sim && ./obj_dir/sim
```

Replace `dft_adder16` with any module name to run its own testbench
(`tb_pg_block`, `tb_carry_merge_tree`, `tb_csa4`, `tb_sum_mux`, `tb_adder16`,
`tb_dft_mode_decode`, `tb_dft_clock_mux`, `tb_dft_delay_chain`,
`tb_cdl_section_timing`). `-Irtl` lets Verilator find the submodules by file
name. The simulator is two-state, and every testbench initialises what it
reads.

`tb_dft_adder16` runs the top at its default size, in under a second.
Defect-free, it runs every mode at 170 MHz and at a 300 ps high phase. It then
injects ten representative defects, one at a time, spread over the three
sections as in the original defect study. For each defect it checks that:

- the defect is caught in its own section's test mode just above the
  detection limit;
- it passes just below the limit;
- it is not blamed on another section;
- it escapes in normal mode at 170 MHz.

It also checks two more things:

- a 1 GHz test clock catches exactly what the 170 MHz one does;
- at full speed in normal mode only a large defect is caught.

It prints how often each of these mechanisms ran.
