# Low-transition GLFSR test pattern generator

In logic built-in self-test, a pseudorandom generator on the chip drives the
circuit under test. Random patterns make many bits toggle from one pattern to
the next, and during test this can draw much more power than normal operation.
This design generates patterns from a *generalized* LFSR (GLFSR) over
GF(2^3), and splits its flip-flops into two parts that advance on alternate
clocks. Each pair of consecutive GLFSR patterns T(i), T(i+1) then has an
intermediate pattern T(i1) between them. T(i1) takes one part of its bits from
T(i) and the other part from T(i+1). The number of bits that can toggle in one
clock is limited to the size of the part that moves, and the generator's own
flip-flops switch only a part at a time. The generator is still a full-period
GLFSR: every second pattern is exactly the plain GLFSR(3,4) sequence.

The RTL is parameterised, and its defaults are the 12-bit GLFSR(3,4). A
GLFSR of the same size compacts the responses of the circuit under test into a
signature.

## GF(2^3) arithmetic and the GLFSR(3,4)

A GLFSR(δ, m) has m stages. Each stage holds one element of GF(2^δ) in δ
flip-flops. Here δ = 3 and m = 4, which gives 12 bits. Field elements are in
polynomial basis over p(x) = x^3 + x + 1, with bit i being the coefficient of
α^i. So α = 010, α^5 = 111 and α^6 = 101. The feedback polynomial is

    φ(x) = x^4 + α·x^3 + α^6·x^2 + α^5      (φ3 = α, φ2 = α^6, φ1 = 0, φ0 = α^5)

It is primitive over GF(2^3), so the register visits all 4095 non-zero states.
The register is in Galois form, with fb = stage 3:

    stage0 <= fb·α^5 (+ input symbol when used as a signature analyser)
    stage1 <= stage0
    stage2 <= stage1 + fb·α^6
    stage3 <= stage2 + fb·α

Flip-flop D_k holds bit k mod 3 of stage k/3. The three rows D0/D3/D6/D9,
D1/D4/D7/D10 and D2/D5/D8/D11 are therefore the three bit positions of the
field elements. At bit level, with fb = (f2 f1 f0) = (D11 D10 D9):

| flip-flop | next value          | flip-flop | next value          |
|-----------|---------------------|-----------|---------------------|
| D0        | f0 ^ f1 ^ f2        | D6        | D3 ^ f0 ^ f1        |
| D1        | f0                  | D7        | D4 ^ f2             |
| D2        | f0 ^ f1             | D8        | D5 ^ f0             |
| D3, D4, D5| D0, D1, D2          | D9        | D6 ^ f2             |
|           |                     | D10       | D7 ^ f0 ^ f2        |
|           |                     | D11       | D8 ^ f1             |

From the seed 1111 1111 1111 (written D0 first) the sequence starts
1101 1110 0010, 1011 1001 1101, 0111 0100 1111, …

`gf_mul` is a general shift-and-add multiplier. Inside the register one
operand is a constant, and synthesis folds the multipliers into the XOR gates
of the table above. `gf_add` is bitwise XOR.

## The bipartite split and the shadow flip-flops

The flip-flops are split by row:

* **part 1**: D0, D1, D3, D4, D6, D7, D9, D10 (rows 0 and 1, 8 bits)
* **part 2**: D2, D5, D8, D11 (row 2, 4 bits)

One GLFSR step takes two clocks:

| clock | En1 En2 | what moves                      | pattern on the outputs |
|-------|---------|---------------------------------|------------------------|
| 1     | 0 1     | part 2 takes its next value     | T(i1): part 1 of T(i), part 2 of T(i+1) |
| 2     | 1 0     | part 1 takes its next value     | T(i+1)                 |

Consecutive applied patterns therefore differ in at most 4 bits (clock 1) or 8
bits (clock 2), never in 12. The total number of bit changes over the two
clocks equals that of the single plain GLFSR step.

The part boundary runs along rows. Because of this, the stage-to-stage shift
never crosses it: a bit always shifts into the same row of the next stage. The
parts only see each other through the feedback symbol fb = (D11, D10, D9).
This is where the difficulty lies. In clock 2, part 1 needs f2 = D11 as it was
at the start of the step, but part 2 has already changed D11 in clock 1. Three
extra **shadow flip-flops** on the last stage solve this:

* The D11 copy takes the value of D11 *before* part 2 moves (clock 1). Part 1
  uses it in clock 2.
* The D9 and D10 copies take the values D9 and D10 receive when part 1 moves
  (clock 2). Part 2 uses them in the next clock 1.

With these copies the feedback of each step is the one the plain GLFSR would
use. Part 2's feedback gates take D9 and D10 from the shadow. Part 1's take
D11 from the shadow. The D9 and D10 copies always equal the live D9 and D10
when they are used, so they could be removed. They are kept because they
give both parts the same structure, with all of the other part's feedback
taken from a register.

If both enables are low, nothing moves. The two enables must never be high
together, and an assertion in `lt_glfsr` checks this.

## Enables and timing

`lt_enable_gen` holds one phase flip-flop. While `run_i` is high it produces
En1En2 = 01, 10, 01, … Each enable is active on every second clock, and the
sequence starts with the intermediate step. When `run_i` is low both enables
are 0 and the phase is kept. `restart_i` returns to the intermediate step.

The scheme is often drawn as two non-overlapping half-rate clocks, CLK/2 and
a shifted CLK/2. Here they are synchronous clock enables on a single clock.
To save clock power in silicon, replace the enables by integrated
clock-gating cells. The logic does not change.

## The BIST core (`lt_glfsr_bist`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (generator to all ones, signature to 0) |
| `load_i` | in | 1 | load `seed_i`, clear the signature, restart at the intermediate step |
| `seed_i` | in | 12 | generator seed, bit k = D_k; must be non-zero |
| `run_i` | in | 1 | apply one pattern per clock |
| `cut_pattern_o` | out | 12 | pattern for the circuit under test |
| `pattern_inter_o` | out | 1 | the current pattern is an intermediate one |
| `cut_resp_i` | in | 3 | three response bits of the circuit under test |
| `signature_o` | out | 12 | signature register |

Sequence after a load: T(0), T(0i), T(1), T(1i), T(2), … The full period is
8190 patterns (4095 full plus 4095 intermediate). In each clock with `run_i`
high, the analyser absorbs `cut_resp_i` as its input symbol. This must be the
response to the pattern currently on `cut_pattern_o`. The generator then
moves on. `load_i` has priority over `run_i`. There is no test-length counter
and no pass/fail comparison: the surrounding controller decides how long to
run and compares `signature_o` with a known-good value.

## How far it can be trusted, and where it departs from the usual description

* **Checked against published data.** The first 16 GLFSR(3,4) states from the
  all-ones seed match the published sequence exactly, when the leftmost digit
  is read as D0. The period is 4095.
* **Split of 8 and 4 bits, not halves.** The bipartite idea is usually stated
  as "half of the bits from each pattern". This design uses the explicit
  flip-flop lists of the LT-GLFSR(3,4) instead (rows 0 and 1 against row 2).
  The rows are selectable with the `PART2_ROWS` parameter. Any set of whole
  rows works, because shifts stay inside a row.
* **Step order.** Part 2 moves first, then part 1.
* **Published LT-GLFSR pattern list not reproduced.** A published table of
  the first 20 LT-GLFSR(3,4) patterns does not follow from the GLFSR sequence
  above under any bit order or step order tried. A published worked example of
  one insertion is not a step of this feedback polynomial either. The
  generator follows the feedback polynomial and the verified GLFSR sequence.
* **Feedback wiring of the shadow bits.** It is derived from φ(x): the D9 copy
  feeds D2 and D8, the D10 copy feeds D2 and D11, and the D11 copy feeds D0,
  D7, D9 and D10. This may differ from informal descriptions of which XOR
  gates the saved bits reach.
* **Own choices.** Clock enables instead of gated clocks, the all-ones reset
  value, the load/run control, the `inter_o` flag, and the signature analyser
  with the same polynomial as the generator, cleared on load and absorbing the
  response to every applied pattern.
* **Not included.** The benchmark circuits (ISCAS'89 s298, s344, s386, s526)
  and any power estimation.

## Benchmark test lengths

Published results used test lengths of 32 (s344), 12 (s298), 79 (s386) and
197 (s526) LT-GLFSR patterns. All of these are far below one period.

* **Inputs.** The 12 pattern bits cover the primary inputs of these circuits
  (9, 3, 7 and 3). They do not cover primary inputs plus flip-flops (24, 17,
  13 and 24) if the circuits are tested as full-scan combinational logic.
* **Outputs.** The signature analyser takes 3 response bits. These circuits
  have 6 to 11 outputs, so a wider analyser or an XOR space compactor would be
  needed in front of it.

`tb_workloads` runs each test length through the core with a stand-in circuit.
The bit changes per applied pattern it reports are shown below. Each pair is
LT-GLFSR first, then the plain GLFSR over the same number of patterns.

| circuit | patterns | peak, LT / plain | average, LT / plain |
|---------|----------|------------------|---------------------|
| s344    | 32       | 7 / 10           | 3.2 / 6.0           |
| s298    | 12       | 6 / 9            | 2.9 / 5.9           |
| s386    | 79       | 7 / 12           | 3.0 / 6.5           |
| s526    | 197      | 8 / 12           | 3.2 / 6.3           |

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference model
in `tb/glfsr_ref_pkg.sv` is independent of the RTL. It multiplies in GF(2^3)
through log/antilog tables of α, steps the register stage by stage from φ(x),
and holds the published first 16 states.

| testbench | what it shows |
|-----------|---------------|
| `tb_gf_add`, `tb_gf_mul` | all 64 operand pairs; α generates the field |
| `tb_glfsr` | published first states, period 4095 over all non-zero states, hold, load, signature mode with random symbols |
| `tb_lt_enable_gen` | 01/10 alternation starting with 01, no overlap, pause, restart |
| `tb_lt_glfsr` | a whole period (8190 clocks): every full pattern equals the GLFSR state, every intermediate pattern has the right bits from both neighbours, at most 4 and 8 changes per clock, total changes equal the plain GLFSR's |
| `tb_lt_glfsr_bist` | end to end at default size: one full period with random pauses, a reload in mid-step, patterns and signature checked every clock, and each mechanism counted |
| `tb_workloads` | the four benchmark test lengths, as above |

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_lt_glfsr_bist tb/glfsr_ref_pkg.sv tb/tb_lt_glfsr_bist.sv
    ./obj_dir/Vtb_lt_glfsr_bist

Each testbench finishes in well under a second.

## Changing it

* **Another field or register length.** Set `DELTA`, `M`, `FIELD_POLY` and
  `PHI` (φ_i = `PHI[i*DELTA +: DELTA]`). The feedback polynomial must be
  primitive over GF(2^δ) for a full period. `RESET_SEED` must be non-zero.
* **Another split.** Set `PART2_ROWS` to a mask of bit positions.
* The reference package in `tb/` is written for GLFSR(3,4) only.
