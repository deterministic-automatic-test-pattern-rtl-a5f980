# Deterministic test pattern generation for the built-in self test of a parallel adder/subtractor

A pseudo-random LFSR is a cheap source of BIST test vectors, but it needs many
vectors to reach full stuck-at coverage. This design uses a small on-chip
deterministic test pattern generator (DATPG) to replace the full LFSR run with a
handful of vectors that still detect every single stuck-at fault.

The circuit under test is a 4-bit ripple-carry adder/subtractor (A/S). Its four
bit cells are identical, so test generation needs to look at only one cell. The
DATPG fault-simulates that cell against its own stuck-at fault list. It then
reduces the 16 possible cell patterns to a minimum cover. The BIST applies the
kept patterns to the whole adder and compresses the responses into a signature.

With the default fault list, the generator keeps **3 cell patterns** in 439
clock cycles. The exhaustive LFSR run takes **1023 vectors**. On all 80
single stuck-at faults of the four cells (20 per cell), the 3 patterns give
100 % coverage. An exhaustive search over all subsets of the 16 patterns
confirms that 3 is the smallest possible set.

The design follows a 2006 master's thesis on deterministic ATPG for BIST. That
source gives the parts of the system and the order of the generation steps. It
gives almost no implementation detail, so most widths, encodings, polynomials
and the exact minimization rule are choices made here. The section
"Source versus choices made here" lists them.

## Structure

```
                       bist_top
 ┌──────────────────────────────────────────────────────────────────────┐
 │  datpg                                                               │
 │  ┌─────────────┐  pattern  ┌─────────┐  good   ┌────────────┐        │
 │  │pattern_     ├──────────►│ as_cell ├────────►│ response_  │detect  │
 │  │counter      │     │     └─────────┘         │ comparator ├──┐     │
 │  └──────▲──────┘     │     ┌─────────────┐ bad │            │  │     │
 │         │            └────►│as_cell_fault├────►└────────────┘  │     │
 │         │                  └──────▲──────┘                     │     │
 │         │   fault site / Test value│                           │     │
 │  ┌──────┴──────────────────────────┴────────────────────────┐  │     │
 │  │ datpg_ctrl: detection table, minimization                │◄─┘     │
 │  └───────────────────────────┬──────────────────────────────┘        │
 │                   kept patterns (pattern_mem, 16 x 4 bits)           │
 └──────────────────────────────┼───────────────────────────────────────┘
                                ▼
        lfsr (10 bit) ──►  bist_ctrl  ──► test inputs
                                              │
  func_a/b/m/cin ────────────────────► mux ◄──┘  (test_mode)
                                        │
                                   parallel_as (4 bit) ──► func_s/func_cout
                                        │
                                   signature_analyzer (5 bit MISR) ──► signature
```

`bist_pkg` holds the shared types: the cell pattern `cell_pat_t = {m, cin, b, a}`,
the cell response `cell_out_t = {cout, sum}`, the fault-site enum `site_e`,
the fault vector type, the statistics struct and the LFSR tap table.

## The A/S cell and its fault list

Each cell passes `b` through an XOR with the mode bit and then feeds a full
adder:

```
bx = b ^ m      p = a ^ bx      g = a & bx      h = p & cin
sum = p ^ cin   cout = g | h
```

The fault list has one stuck-at-0 and one stuck-at-1 fault on each of the ten
nets `a, b, cin, m, bx, p, sum, g, h, cout`, which makes 20 faults. Fault number
`f < 10` is net `f` stuck-at-0. Fault `f >= 10` is net `f-10` stuck-at-1. The
two halves are contiguous, so the s-a-0 and s-a-1 steps below can use a
constant mask. Faults are stem faults: forcing an input net affects every gate
that net feeds. Faults on individual fanout branches are not modelled.

`as_cell_fault` is the faulty copy. When `fault_en` is high, it replaces the net
selected by `fault_site` with the value of its `test` input. `test = 0` is the
stuck-at-0 operation and `test = 1` is the stuck-at-1 operation. When
`fault_en` is low, it behaves exactly like `as_cell`.

## How the test set is generated (datpg, datpg_ctrl)

Generation runs in three phases: detection, minimization and write-out. The
controller is one FSM with these states:
`IDLE → DET → (INIT → SCAN ⇄ PICK) × 2 → FIN → WRITE → DONE`.

**Detection (320 cycles).** For each of the 20 faults, the controller selects
the fault in the faulty cell and lets `pattern_counter` sweep patterns 0 to 15.
The fault-free cell and the faulty cell both receive the counter value, and
`response_comparator` flags any difference in the outputs. Each cycle one bit
of the detection table `det[pattern][fault]` is written. The table has 16
entries of 20 bits. The counter's `last` flag moves the controller to the next
fault.

**Minimization.** This phase has three steps, in the same order as the source's
method.

1. *s-a-0 step.* `unc` starts as the detectable stuck-at-0 faults. Each greedy
   round scans the 16 patterns, one per cycle (`SCAN`). It keeps the pattern
   that detects the most faults still in `unc`; on a tie, the lower index wins.
   In `PICK` that pattern joins `sel0` and its faults leave `unc`. Rounds repeat
   until no pattern adds coverage.
2. *s-a-1 step.* The same for the stuck-at-1 faults, giving `sel1`. This step
   is independent of step 1.
3. *Final step (`FIN`).* The union `sel0 | sel1` is pruned in index order. A
   pattern is dropped if the other patterns still in the set detect every fault
   it detects. The result is irredundant.

**Write-out.** `WRITE` stores the kept patterns in ascending order at memory
addresses 0, 1, 2 and so on. Then `DONE` rises. `stats` reports the number of
detectable faults, the sizes of `sel0` and `sel1`, and the final count.

**Run time.** Take `r0` and `r1` as the number of patterns chosen in steps 1 and
2. The number of clock edges from the edge that takes `start` to the edge that
raises `done` is

```
320 + (1 + (r0+1)*17) + (1 + (r1+1)*17) + 16 + 16
```

For the A/S cell, `r0 = 2` and `r1 = 1`, which gives 439.

The A/S cell gives:

| step  | patterns `{m cin b a}`         |
|-------|--------------------------------|
| s-a-0 | `0111` (1+1+1), `1100` (0-0, borrow in) |
| s-a-1 | `0000`                         |
| final | `0000`, `0111`, `1100`         |

For this table the final step removes nothing. The unit test of the controller
(`datpg_ctrl_tb`) uses random detection tables on which it does remove
patterns.

## Applying the test (bist_ctrl, lfsr, signature_analyzer)

`bist_start` clears the signature register, reloads the LFSR seed and switches
the adder's inputs from the functional ports to the controller (`test_mode`).
The controller then applies one vector per clock:

* **Deterministic (`bist_src = 0`).** The `n_pat` stored cell patterns are used.
  One cell pattern is spread over the whole adder: every bit of A gets the
  pattern's `a`, every bit of B gets its `b`, and `m` and the carry into cell 0
  are used as they are. Cell 0 sees exactly the generated pattern. For the
  three kept patterns, the carry out of each cell equals the carry in it
  received, so every cell sees the same three patterns. The carry out of each
  cell is observed through the next cell's sum bit.
* **Pseudo-random (`bist_src = 1`).** The full 1023-state sequence of a 10-bit
  maximal LFSR (x^10+x^7+1) is used, read as `{cin, m, b[3:0], a[3:0]}`.

Each cycle the 5 response bits `{cout, s}` are folded into a 5-bit MISR
(x^5+x^3+1). The MISR shifts towards the MSB with feedback into bit 0 and XORs
the responses into all stages. After the last vector `done` rises. `pass` is
high if the signature equals `golden`. `golden` is an input: it is the
signature of a fault-free adder for the chosen source, a constant of the
design. For the default configuration the testbench computes it from
reference models.

A run of N vectors keeps `test_mode` high for N cycles. `done` rises on the
edge that ends the last of them. The run takes 3 cycles with the deterministic
patterns and 1023 with the LFSR.

## Top-level interface (bist_top)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `func_a`, `func_b` | in | W | functional operands |
| `func_m`, `func_cin` | in | 1 | 1 = subtract; drive `func_cin = func_m` for plain two's complement |
| `func_s`, `func_cout` | out | W, 1 | adder output (also during test) |
| `atpg_start` | in | 1 | start test generation |
| `atpg_busy`, `atpg_done` | out | 1 | generator status |
| `n_pat`, `atpg_stats` | out | 5, struct | kept pattern count and summary |
| `bist_start`, `bist_src` | in | 1 | start a BIST run; 0 deterministic, 1 LFSR |
| `golden` | in | W+1 | expected signature |
| `bist_busy`, `bist_done`, `bist_pass` | out | 1 | BIST status and verdict |
| `signature`, `bist_n_applied` | out | W+1, 2W+3 | signature and vector count of the run |

To use it, pulse `atpg_start` and wait for `atpg_done`. Then pulse `bist_start`
with `bist_src = 0` and the golden value, and read `bist_pass` when
`bist_done` rises. A `bist_start` is ignored while the generator is busy.
Outside BIST runs the adder works as a normal adder/subtractor.

The only parameter is `W = 4`. The LFSR width `2W+2` and the signature width
`W+1` follow from it. The DATPG is fixed to the 4-input, 2-output cell.

## Source versus choices made here

Taken from the source:
* the system parts: LFSR, DATPG, signature analysis, and a parallel A/S as the
  circuit under test;
* the 4-bit width of the A/S;
* generating patterns for one basic cell and applying the same data across the
  adder;
* the single stuck-at fault model with a Test bit that selects s-a-0 or s-a-1;
* a DATPG made of a CUT, a counter, a comparator and a controller;
* the minimization order: s-a-0, then s-a-1, then a final combined step.

Chosen here:
* the gate structure of the cell and therefore the 20-fault list;
* the greedy cover rule and its tie-break;
* the pruning order of the final step;
* the on-chip detection table and pattern memory;
* an external carry-in on the adder, so cell 0's carry can be set by a pattern;
* the reading of "identical test data on both inputs" as the same `a` bit in
  every bit of A and the same `b` bit in every bit of B;
* LFSR width, polynomial and seed;
* a parallel-input (MISR) signature register, its width and polynomial;
* the golden signature as an input port;
* asynchronous active-low reset, and all handshakes and cycle timings.

Not built: the sample circuit the source uses to introduce the algorithm. Its
gate structure is not available. The generator is also specific to the A/S
cell: a different circuit needs its own faulty-CUT model and fault list.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`.
Reference models that do not use the RTL are in `tb/tb_ref_pkg.sv`: a
gate-level faulty-cell evaluator, the minimization, one step of the MISR and of
the LFSR, and an arithmetic adder. Highlights:

* `as_cell_tb`, `parallel_as_tb`: exhaustive checks against arithmetic.
* `as_cell_fault_tb`: all 20 faults × 16 patterns.
* `datpg_ctrl_tb`: the cell table and six random detection tables. It checks
  written patterns, statistics, that every (pattern, fault) pair is visited
  once, and the cycle formula.
* `datpg_tb`: the kept set covers all faults, is irredundant, and is a minimum
  cover (exhaustive search over the 2^16 subsets).
* `lfsr_tb`: periods 1023, 15 and 65535 for widths 10, 4 and 16.
* `signature_analyzer_tb`: a step-by-step reference, and detection of a
  single-bit error.
* `bist_ctrl_tb`: vector order, run length, pass and fail.
* `bist_top_tb`: the whole flow at default size. It covers functional
  add/subtract, generation in 439 cycles, an ignored start, deterministic pass
  and fail, the 1023-vector LFSR run, and isolation of the functional inputs
  during test. It also forces stuck-at faults into cells 0 to 3 of the adder
  and checks that the 3-pattern BIST catches every one.

Simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert --top-module bist_top_tb \
  -y rtl -y tb +libext+.sv rtl/bist_pkg.sv tb/tb_ref_pkg.sv tb/bist_top_tb.sv
./obj_dir/Vbist_top_tb
```

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`. All of them run
in well under a second.

## Notes

* The DATPG's storage is flip-flops: a 320-bit detection table and a 64-bit
  pattern memory. Together with the popcount logic, the generator is larger
  than the adder it tests. It shows the method in hardware rather than
  minimizing area. In a production flow, the three patterns and the golden
  signature would be fixed at design time.
