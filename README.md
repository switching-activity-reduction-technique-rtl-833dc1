# Low-power built-in self-test of an 8x8 multiplier

Testing a chip with pseudo-random patterns makes its logic switch far more
than in normal operation. Dynamic power grows with the switching activity
(P = a·C·V²·f), so a self-test can draw more power than the chip is specified
for. This design is a built-in self-test (BIST) for a multiplier. Its pattern
generator is built to switch less: a low-power LFSR ("LP-LFSR") updates only
half of each test vector per clock, and puts an intermediate vector between
two LFSR states. Each bit that differs between two successive LFSR states
still changes exactly once. But the changes are spread over four clocks, and
at most half of the vector can change in any one clock.

The circuit under test (CUT) is an 8x8 multiplier. Two designs are included:
a carry-save array multiplier and a radix-4 Booth multiplier. Either can be
checked against a reference multiplier.

## Block diagram

```
              +-------------------- bcu (control) ---------------------+
              | tpg_en, en1, en2          capture        clr, compare_valid
              v                               |                 |
   lp_lfsr (a) --in1_cut--+--> ref_mult ------+--> pipo_reg --> tpa_ref_in --+
                          |                   |                              |
   lp_lfsr (b) --in2_cut--+--> array_mult --+ |                              v
                          |                 mux --> pipo_reg --> tpa_in -> comparator
                          +--> booth_mult --+ (cut_sel)                       |
                                                                tpa_out, err_count, bist_fail
```

| module       | role |
|--------------|------|
| `bist_top`   | the whole self-test; the top module |
| `bcu`        | BIST control unit: step sequence, pattern count, end of test |
| `lp_lfsr`    | low-power pattern generator, one per operand |
| `lfsr`       | conventional Fibonacci LFSR, the sequence source inside `lp_lfsr` |
| `ref_mult`   | reference product `a*b` (unsigned, behavioural) |
| `array_mult` | CUT option 1: carry-save array of full adders |
| `booth_mult` | CUT option 2: radix-4 Booth, signed or unsigned |
| `pipo_reg`   | 16-bit parallel-in parallel-out product register (one per path) |
| `comparator` | per-pattern match, error counter, sticky fail flag |
| `full_adder`, `csa` | cells used by the two multipliers |
| `bist_pkg`   | shared enums (generator steps, BCU states) and the counter width |

## The low-power pattern generator (`lp_lfsr`)

This is the central idea of the design, and the part that is least obvious.

`lp_lfsr` has two registers:

- the state `s` of an ordinary 8-bit LFSR;
- the test-vector register `tv`, whose value drives the multipliers.

`tv` is split into two halves:

- the **first half** is `tv[3:0]`, which is flip-flops D1..D4 of the LFSR;
- the **second half** is `tv[7:4]`, which is D5..D8.

Two enables, `en1` and `en2`, each activate one half. They never rise
together, and an assertion checks this. The control unit cycles through four
steps for each LFSR state. In the table, `n` is the LFSR's next state,
`next_state(s)`:

| step | en1 en2 | first half `tv[3:0]`  | second half `tv[7:4]` | LFSR `s` |
|------|---------|-----------------------|-----------------------|----------|
| 1    | 1 0     | `n[3:0]`              | holds                 | holds    |
| 2    | 0 0     | holds                 | injection vector      | holds    |
| 3    | 0 1     | holds                 | `n[7:4]`              | `s <= n` |
| 4    | 0 0     | injection vector      | holds                 | holds    |

The two idle steps (en1 en2 = 00) look the same from outside. A flag records
which half was active last, and that tells an idle step which half to inject
into.

**Injection.** Each bit of the half being injected has a 2:1 mux:

- where the present bit of `tv` already equals the corresponding bit of `n`,
  the mux takes that exact LFSR bit;
- where they differ, it takes the injection bit `r`, which is the LFSR's
  feedback bit `n[0]`.

Each differing bit therefore changes either in the injection step (when `r`
equals its new value) or in the following active step. It never changes
twice.

**Properties that follow** (all checked by `tb_lp_lfsr`):

- After every step 3, `tv` equals the current LFSR state. Over 1020 clocks the
  generator applies all 255 states of the LFSR, plus the intermediate vectors
  between them.
- At most 4 bits (one half) can change in a clock.
- Total toggles equal those of the plain LFSR over the same states. With the
  default polynomial and seed, the plain LFSR makes 1024 toggles in 255
  clocks, about 4 per clock. The LP-LFSR makes 1025 toggles in 1020 clocks,
  about 1 per clock, and never more than 2 in a clock.

`tpg_en = 0` freezes everything. This keeps the generator still between
tests.

Example: the first steps from the seed `0x01`, in order, are
`02, 02, 02, 00, 04, 04, 04, 00, 08, 08, 08, 09, ...`. The vector after each
third step (02, 04, 08, ...) is the plain LFSR sequence.

## The LFSR (`lfsr`)

Flip-flops D1..DN form a shift register, where bit i-1 of `state` is Di. On
each enabled clock, D(i+1) takes Di. D1 takes the XOR of the tapped outputs:
bit i-1 of `TAPS` taps Di, which is the term x^i of the feedback polynomial.

The two 3-bit textbook cases, both started from D1D2D3 = 100, are reproduced
exactly:

- x³+x+1 (`TAPS=3'b101`) is primitive and gives the 7-state cycle
  100, 110, 111, 011, 101, 010, 001.
- 1+x+x²+x³ (`TAPS=3'b111`) is not primitive and gives only the 4-state cycle
  100, 110, 011, 001.

The 8-bit default is x⁸+x⁶+x⁵+x⁴+1 (`8'b1011_1000`), which has period 255.
The default seed is D1 = 1 (`8'h01`).

## The multipliers

**Array multiplier (`array_mult`).**

- Row 0 is the partial product `x & {N{y[0]}}`.
- Each of rows 1..N-1 is N full adders. Row i adds the partial product
  `x·y[i]`, the row-above sums shifted one column, and the row-above carries
  passed straight down. No carry ripples inside a row.
- Each row's lowest sum is a finished product bit.
- A final row of N full adders is a ripple-carry adder with carry-in 0. It
  merges the remaining sums and carries into `z[2N-1:N]`.
- The operands are unsigned.

**Booth multiplier (`booth_mult`).**

1. *Booth encoder.* Both operands are extended by the mode bit `tc`: sign
   extension when `tc=1`, zero extension when `tc=0`. The multiplier is cut
   into overlapping 3-bit groups, which gives N/2+1 digits in {-2..+2} for
   even N. Each digit is encoded as `one`, `two` and `neg`.
2. *Partial products.* Each partial product is (N+2) bits wide, one bit wider
   than the extended multiplicand, and is 0, x or 2x. A negative digit
   inverts it, and its +1 goes into a separate correction row.
3. *Accumulation.* A chain of carry-save adders (`csa`) reduces the partial
   products and the correction row to a sum word and a carry word. One final
   adder resolves them into the product.

The product is exact in both modes, modulo 2^(2N). In two's-complement mode
the result differs from the unsigned reference for most patterns in which the sign bit of an
operand is set. In the end-to-end test, such a signed run is used on purpose
to make the comparator fire. For example, 235·235 gives 441 (that is,
(-21)·(-21)) against the expected 55225.

Both multipliers are purely combinational.

## Control and timing (`bcu`, `bist_top`)

`bcu` is a four-state machine: IDLE → RUN → FLUSH → DONE.

- **IDLE.** Raising `enable` starts a test. In the same clock, `clr` clears
  the comparator.
- **RUN.** Each clock:
  - applies one generator step, cycling en1 en2 = 10, 00, 01, 00;
  - loads both product registers (`capture`);
  - increments `count`.

  RUN lasts `NUM_PATTERNS` clocks.
- **FLUSH.** One clock in which the last captured products are compared.
- **DONE.** `bist_done` is raised and held until `enable` drops. The unit then
  returns to IDLE. The generators keep their state, so the next test goes on
  with new patterns.

The pipeline is one stage deep:

- At a RUN clock edge, the registers capture the products of the operands
  that were present before the edge. At the same edge, the generators move
  to the next vector.
- `compare_valid` (which is `capture` delayed by one clock) marks the clocks
  when the registered pair is compared.
- `tpa_out` is the combinational match of `tpa_in` and `tpa_ref_in`.
- A mismatch while `compare_valid` is high increments `err_count` and sets
  `bist_fail`.

Counting the clock edge that first sees `enable` high as edge 1, `bist_done`
is high after edge `NUM_PATTERNS + 2`: one start edge, `NUM_PATTERNS` RUN
edges and one FLUSH edge.

### `bist_top` ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `enable` | in | 1 | run one test; drop to return to idle |
| `cut_sel` | in | 1 | 0: array multiplier is the CUT, 1: Booth |
| `booth_signed` | in | 1 | Booth multiplier in two's-complement mode |
| `in1_cut`, `in2_cut` | out | 8 | operands from generators a and b |
| `product_cut` | out | 16 | combinational product of the selected CUT |
| `tpa_in`, `tpa_ref_in` | out | 16 | registered CUT product and registered reference product |
| `tpa_out` | out | 1 | registered products match |
| `compare_valid` | out | 1 | the registered pair is being compared this clock |
| `count` | out | 16 | patterns applied in this test |
| `err_count` | out | 16 | mismatches in this test (saturating) |
| `bist_done`, `bist_fail` | out | 1 | test finished; at least one mismatch |

Parameters, with their defaults:

- `N = 8`: operand width.
- `TAPS = 8'b1011_1000`.
- `SEED_A = SEED_B = 8'h01`.
- `NUM_PATTERNS = 1020`: 4 steps × 255 LFSR states, so every LFSR state is
  applied once.

## What follows the original scheme and what is this design's own

**Taken from the published scheme:**

- the block structure: control unit, two 8-bit generators, a reference and a
  tested multiplier, two 16-bit registers and a comparator;
- the conventional LFSR structure and its 3-bit examples;
- the four-step, two-half operation of the low-power generator, with
  non-overlapping en1/en2 and a mux between the exact LFSR bit and an
  injected bit;
- the array multiplier's cell arrangement;
- the Booth multiplier's encoder, (m+1)-bit partial products, carry-save
  accumulation, final adder, and signed/unsigned capability;
- the signal names of the top;
- equal seeds for the two generators, matching published waveforms in which
  both operands are always equal.

**Choices made here, where the original is silent:**

- the 8-bit polynomial, the seeds and the test length;
- the exact injection rule, and the injection bit being the feedback bit;
- the separate output register that is updated half by half, with the LFSR
  stepping together with the second half;
- radix 4 for the Booth multiplier and its sign-extension method;
- the control state machine and its one-clock FLUSH;
- the error counter, sticky fail flag and `clr` in the comparator;
- a mux and `cut_sel` that let both multipliers sit in one top;
- synchronous active-low reset everywhere.

**Known departures:**

- **Product registers.** The original calls the 16-bit product registers
  "parallel-in parallel-out" and also ties them to signature analysis (that
  is, compressing many responses into one word). Here they are plain
  registers, and every product is compared individually, as the block
  diagram and the published waveforms show. No response compactor (MISR) is
  built.
- **Booth multiplier.** It is drawn as an accumulator with feedback whose low
  product half comes directly from the carry-save stage. Here it is unrolled
  into a one-clock combinational chain, because the test applies a new
  pattern every clock. The final adder produces all 2N bits.
- **Array multiplier.** The 4x4 drawing has two constant-1 inputs, as in a
  signed (Baugh-Wooley) array. The built array is unsigned, which matches the
  unsigned results reported for it.
- **Power.** Power figures (nanowatts) cannot come from RTL. The toggle count
  in `tb_lp_lfsr` is the switching-activity measure given instead.
- **No conventional-LFSR mode in the top.** The plain LFSR exists only as the
  comparison baseline in `tb_lp_lfsr`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_lfsr` | both 3-bit reference tables state by state; the 8-bit LFSR against a recurrence model; period 255 with no repeat; hold when disabled |
| `tb_lp_lfsr` | exact vector after each of 1020 steps; no step touches the other half; all 255 LFSR states reached; freeze; toggle count against the plain LFSR (peak ≤ N/2, average < half) |
| `tb_bcu` | clear pulse, step order, `count`, capture length, `compare_valid` delay, done timing, restart (NUM_PATTERNS = 10) |
| `tb_array_mult` | all 65 536 pairs at 8 bits, and all 256 pairs at 4 bits |
| `tb_booth_mult` | all pairs, both modes, at N = 8, 5 (odd) and 4 |
| `tb_ref_mult` | all 65 536 pairs against shift-and-add |
| `tb_pipo_reg`, `tb_comparator` | random load/hold; match, count, sticky flag, clear |
| `tb_bist_top` | three full tests at default parameters: array; Booth unsigned; Booth signed with the expected mismatch count. Checks every compared product, the test length and the counters, and requires half steps, injections and flagged mismatches to have occurred |

The full-size run of `tb_bist_top` reports 0 mismatches for the array and the
unsigned Booth multiplier. The signed Booth run shows 505 mismatches out of
1020 patterns, as predicted.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top --Mdir obj_tb
./obj_tb/Vtb_bist_top
```

Replace `tb_bist_top` with any other testbench name. All testbenches finish
in well under a second.

To try another width, override `N`, `TAPS` and the seeds together. `TAPS`
must be a primitive polynomial of that degree for the maximum period, and
`NUM_PATTERNS = 4·(2^N − 1)` for one full sweep.
