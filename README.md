# Bit-interchanging test pattern generator for low-power scan BIST

In scan-based built-in self-test, every pattern is shifted serially into a
chain of scan flip-flops. Each time two neighbouring bits of a pattern differ,
the transition between them travels down the whole chain, and through the logic
behind it, one flip-flop per clock. Pseudo-random patterns from an LFSR are full
of such transitions, so shifting them burns much more power than normal
operation does.

This design places a small combinational network, the **bit-interchanging TPG
(BI-TPG)**, between the LFSR and the scan chain. It looks at every pair of
adjacent bits together with the bit just beyond the pair. It swaps the pair
whenever the swap removes a transition. A swap only reorders bits, so the
pattern keeps its number of 1s and 0s. It is still the LFSR's pattern, with
fewer transitions entering the chain.

```
            q (N)            tp (N)                 scan_in              scan_out
  LFSR ────────────► BI-TPG ────────► scan-in ─────────────► scan chain ─────────► signature
 x^N+x+1                             register   scan_en      of the CUT            register
     ▲                                  ▲          │            ▲                      ▲
     └──────────── bist_ctrl ───────────┴──────────┴────────────┴──────────────────────┘
```

The circuit under test (CUT) and its scan chain are outside the design. The top
module `bi_tpg_bist` drives `scan_en` and `scan_in`, and receives `scan_out`.

## The interchange rule

Take three consecutive bits `q2 q1 q0`. The pair `q0, q1` is interchanged when

1. `q0 == q2` (checked with an XNOR gate), and
2. `q0 != q1` (checked with an XOR gate).

An AND of the two results selects a pair of 2:1 multiplexers. In words, the
pattern `x y x` with `y ≠ x` becomes `x x y`. The transition next to `q2`
disappears, and one transition remains inside the pair. A pattern like `0 0 1`
or `0 1 1` is left alone, because a swap would not help it. `bi_cell.sv` is one
such cell.

### Which bits are paired: the 8-bit arrangement

The 8-bit generator has three cells. Bits 5 and 2 are never moved: they only
serve as the third bit `q2` of the checks.

| cell | pair (q0, q1) | check bit q2 | swaps when bits read (MSB→LSB) |
|------|---------------|--------------|--------------------------------|
| 0    | 7, 6          | 5            | b7 b6 b5 = 101 or 010          |
| 1    | 4, 3          | 2            | b4 b3 b2 = 101 or 010          |
| 2    | 0, 1          | 2            | b2 b1 b0 = 101 or 010          |

This costs six multiplexers, three XOR, three XNOR and three AND gates. These
sample patterns show the effect. HST is the number of horizontal switching
transitions, i.e. adjacent bits that differ.

| LFSR pattern     | HST | after interchange | HST |
|------------------|-----|-------------------|-----|
| AB = 1010 1011   | 6   | 73 = 0111 0011    | 3   |
| 55 = 0101 0101   | 7   | 8E = 1000 1110    | 3   |
| B5 = 1011 0101   | 6   | 6E = 0110 1110    | 4   |
| 14 = 0001 0100   | 4   | 0C = 0000 1100    | 2   |
| 10 = 0001 0000   | 2   | 10 = 0001 0000    | 2   |
| E8 = 1110 1000   | 3   | F0 = 1111 0000    | 1   |

This pairing was reconstructed from published sample patterns, and all six
rows above follow from it.

Why a swap never adds a transition:

- At either end of the pattern (cells 0 and 2), a swap turns two transitions
  into one.
- The middle cell sits between the two fixed bits 5 and 2. A swap there removes
  two transitions when bit 5 differs from bit 4, and otherwise changes nothing.

### Other widths

`bi_tpg` is parameterised in `N` (N ≥ 3). Bits are grouped in threes from the
MSB. Each group is one pair plus the check bit below it, and the check bit
passes through. If `N mod 3 == 2`, the final pair (1, 0) has no bit below it.
It is checked against bit 2, which is how cell 2 above works. If `N mod 3 == 1`,
bit 0 passes through. For N = 8 this gives exactly the table above. The
extension to other widths is this design's own, because only the 8-bit layout
is specified. `bi_tpg_pkg::bi_num_cells(N)` gives the number of cells.
`swap[m]` is high when cell `m` interchanges; cell 0 is the most significant.

## Test-per-scan sequencing

`bist_ctrl` carries out one test run of `NUM_PATTERNS` patterns, one pattern per
scan cycle:

| state   | clocks        | what happens |
|---------|---------------|--------------|
| IDLE    | –             | LFSR held at its seed; `start` clears the signature |
| LOAD    | 1             | register ← BI-TPG(LFSR); LFSR steps |
| SHIFT   | N             | `scan_en`=1, register shifts MSB first onto `scan_in`; the previous response leaves on `scan_out` into the signature register (not for the first pattern) |
| CAPTURE | 1             | `scan_en`=0, the CUT captures its response; unless this was the last pattern, the next pattern is loaded and the LFSR steps |
| UNLOAD  | N             | `scan_en`=1, the last response is shifted into the signature register |
| DONE    | until `start` | `done`=1, `signature` holds |

Timing facts:

- From the clock that samples `start` to the first clock with `done` high takes
  `1 + NUM_PATTERNS·(N+1) + N` clocks. At the defaults that is 576 clocks.
- The first bit shifted in, `tp[N-1]`, ends up in the flip-flop at the far end
  of the chain. After the N shifts, chain flip-flop k therefore holds `tp[k]`.
- An assertion in `bist_ctrl` checks that a capture is always a single clock
  with `scan_en` low.
- The LFSR steps once per pattern. If it also stepped during shifting, its short
  period would repeat patterns (see below).

## Blocks

| module | what it is |
|--------|------------|
| `bi_tpg_pkg`  | default width, `bi_num_cells()`, controller state enum |
| `lfsr`        | N-bit LFSR with polynomial x^N + x + 1 (Fibonacci form, feedback `q[N-1]^q[N-2]`), seed `SEED`, synchronous `init` back to the seed |
| `bi_cell`     | XOR, XNOR and AND gates plus two 2:1 multiplexers: one interchange cell |
| `bi_tpg`      | the network of cells described above |
| `scan_in_reg` | N-bit parallel-load register that shifts MSB first onto `scan_in` |
| `bist_ctrl`   | the test-run state machine |
| `sisr`        | response analyzer: 16-bit serial-input signature register, CRC generator x^16+x^12+x^5+1, starting from 0 |
| `bi_tpg_bist` | top: all of the above wired together |

Top parameters:

- `N = 8`: scan length, and the width of the LFSR, the network and the
  register.
- `NUM_PATTERNS = 63`.
- `SIG_W = 16`.
- `SEED = 1`.

Top ports:

- Control: `clk`, `rst_n` (asynchronous, active low), `start`, `busy`, `done`.
- To the CUT: `scan_en` and `scan_in`. From the CUT: `scan_out`.
- Result: `signature`.
- Observation outputs: `lfsr_q` (the pattern before interchange), `tp` (after
  interchange), `swap` (which cells interchanged) and `state`.

## What follows the specification and what is chosen here

These parts follow the specification:

- The interchange conditions and the gates that check them.
- The 8-bit arrangement with bits 5 and 2 fixed.
- The LFSR polynomial x^N + x + 1.
- A scan-in register as long as the scan chain.
- The LFSR → BI-TPG → register → scan chain → response analyzer path.
- Scan and capture cycles, one pattern per scan.

These are this design's own choices:

- The bit numbering. It was derived from the sample patterns.
- Extending the pairing to widths other than 8.
- Fibonacci form for the LFSR, seed 1 and the reset values.
- MSB-first shift order.
- The whole controller: one capture clock, the unload phase, the start/done
  handshake and `NUM_PATTERNS = 63`.
- The response analyzer. Only its existence is given; a 16-bit CRC signature
  register is the simplest usual choice.

The following are known limits and departures:

- **x^8 + x + 1 is not primitive.** From seed 1 the 8-bit LFSR repeats after 63
  states rather than 255. The polynomial is kept as specified, and
  `NUM_PATTERNS` defaults to one period. Other polynomials can be used by
  changing the feedback line in `lfsr.sv`.
- **Several 8-bit groups with separate clocks are not built.** The
  specification mentions reusing the 8-bit arrangement for several groups of
  scan cells, each clocked separately, but gives no circuit for it. Longer
  chains are instead served by widening `N`.
- **The circuit under test is not included.** The benchmark circuits
  (ISCAS'89) are external.

## Measured transition reduction

These are transitions entering the scan chain, counted per pattern as adjacent
differing bits. The testbenches measure:

| setting | patterns | total HST before → after | peak HST per pattern |
|---------|----------|--------------------------|----------------------|
| N = 8, seed 1 (defaults) | 63 | 182 → 140 (23.1 % fewer) | 7 → 4 (42.9 % fewer) |
| N = 179 (s5378 chain)    | 40 | 4141 → 3262 (21.2 %) | 107 → 90 (15.9 %) |
| N = 211 (s9234)          | 40 | 4230 → 3485 (17.6 %) | 107 → 95 (11.2 %) |
| N = 638 (s13207)         | 40 | 13221 → 10588 (19.9 %) | 332 → 272 (18.1 %) |
| N = 1426 (s38584)        | 40 | 28028 → 23456 (16.3 %) | 703 → 597 (15.1 %) |
| N = 1636 (s38417)        | 40 | 32971 → 27513 (16.6 %) | 829 → 697 (15.9 %) |

The scan-chain lengths are the flip-flop counts of those ISCAS'89 circuits. For
these runs each long LFSR starts from a pseudo-random seed.

The published evaluation reports 38–60 % peak reduction (45 % on average) and 50.5 %
average reduction. It measures switching inside the benchmark circuits, which
this design does not model.

- At 8 bits the peak reduction matches the published 42.8 %.
- For random bits, the expected average saving is about 1/6 of all
  transitions. A group of three bits carries 1.5 transitions on average, and
  its cell saves 0.25 of them on average: an end cell saves one transition with
  probability 1/4, and a middle cell saves two with probability 1/8. The
  measured 16–23 % agrees with that estimate.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself after
a fixed number of clocks.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bi_tpg_pkg.sv tb/tb_bi_tpg_bist.sv --top tb_bi_tpg_bist -Mdir obj -o sim
./obj/sim
```

Replace `tb_bi_tpg_bist` with any of these testbenches:

| testbench | checks |
|-----------|--------|
| `tb_bi_cell`      | all 8 inputs of one cell |
| `tb_bi_tpg`       | the sample patterns above; all 256 8-bit patterns against a reference; the same number of 1s and never more transitions; widths 10 and 11 |
| `tb_lfsr`         | the sequence against the recurrence s(t+8) = s(t+1) ⊕ s(t); period 63; hold; init |
| `tb_scan_in_reg`  | load, MSB-first shifting, load-over-shift priority |
| `tb_sisr`         | signature against polynomial long division; the CRC check value 0x31C3 for "123456789" |
| `tb_bist_ctrl`    | every control output on every clock of two 5-pattern runs; latency |
| `tb_bi_tpg_bist`  | the top at its default size with a behavioural scan-chain CUT (`tb/scan_cut_model.sv`) |
| `tb_iscas_chains` | the top widened to the five benchmark chain lengths |

`tb_bi_tpg_bist` checks:

- Every bit on `scan_in`, and the swap flags.
- The 576-clock latency.
- The final signature against an independent model, over two back-to-back
  runs.
- That each mechanism happens at least once: a swap in each of the three cells,
  a pattern left unchanged, shift, capture and unload clocks, done, and a
  restart.

`tb_iscas_chains` checks the interchange, the ones count and the serial stream
for each chain length, and prints the reduction table above.
