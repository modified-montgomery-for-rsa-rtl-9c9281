# Carry-save Montgomery multiplier with a partitioned 4:2 compressor, and RSA engines built on it

RSA encryption is modular exponentiation, and modular exponentiation is a
long chain of modular multiplications of 512- to 2048-bit numbers. The speed
of the multiplier therefore sets the speed of RSA. This RTL implements a
Montgomery modular multiplier in which nothing ever propagates a carry across
the word. Operands and results stay in carry-save form: a value is a pair of
words whose sum is the value. Each clock the multiplier adds four words with
a 4:2 compressor. The compressor's first level for the next clock is computed
in the current clock and stored in registers. That leaves only the lower two
levels, one XOR for the next quotient bit and a 4:1 operand multiplexer
between registers. One multiplication of k-bit operands takes k+6 clocks.

Two RSA encryption engines use the multiplier. One does MSB-first
square-and-multiply on a single multiplier. The other does LSB-first
exponentiation, squaring and multiplying in parallel on two multipliers.

The design follows the architecture published as "Modified Montgomery for RSA
Cryptosystem" (R. Verma, M. Dutta, R. Vig). That description gives the
multiplier algorithm in full and the RSA engines only by their method and
their multiplication counts. The section "Own choices and departures" lists
everything this RTL adds.

## The arithmetic

For an odd K-bit modulus n, `mmm_core` computes

    S1 + S2 ≡ (A1 + A2) · (B1 + B2) · 2^-(K+3)   (mod n)

It runs K+3 iterations of the radix-2 Montgomery step S ← (S + A_i·B + q_i·n)/2,
plus one leading iteration. The leading iteration (numbered -1) starts from
S = 0, so it only primes the pipeline. Three details of the operands keep the
hardware small:

* **B is even.** The multiplicand enters shifted up by one place, so
  B1_0 = B2_0 = 0. The quotient bit is then just the parity of S, q = S1_0 ⊕ S2_0.
  It does not depend on A_i·B. Seen from the unshifted multiplicand B' (B = 2B'),
  the unit computes A·B'·R^-1 mod n with **R = 2^(K+2)**.
* **No final subtraction.** The inputs must satisfy A < 2^(K+1) (in practice
  A < 2n) and B' < 2n. The result then satisfies S1 + S2 < 2n. The result
  words can be fed straight back in, as multiplier (A1, A2 = S1, S2) or as
  multiplicand (B1, B2 = 2·S1, 2·S2). This is the [0, 2n) range of Walter's
  method.
* **The multiplier is carry-save too.** A1 and A2 are added one bit per clock
  by a single full adder with a carry flip-flop (`mmm_abit_adder`). This runs
  alongside the iteration and delivers A_{i+1} exactly when it is needed.

## One iteration: the partitioned 4:2 compressor

An iteration adds four words: the accumulator pair S1, S2 and an operand
pair P1, P2. The operand pair is one of four, chosen by the multiplier bit a
and the quotient bit q:

| a | q | P1 | P2 | PX = P1 ⊕ P2 |
|---|---|----|----|--------------|
| 0 | 0 | 0  | 0  | 0  |
| 1 | 0 | B1 | B2 | BX |
| 0 | 1 | 0  | n  | n  |
| 1 | 1 | D1 | D2 | DX |

Here D1 + D2 = B1 + B2 + n. This pair is built once per multiplication by
`mmm_precompute`, using one full-adder level whose carry is a multiplexer
(BX ? n : B1). BX = B1 ⊕ B2 and DX = D1 ⊕ D2 are formed there as well.

Written as a 4:2 compressor, bit j of the addition is:

    SX = S1 ^ S2          PX = P1 ^ P2          (first level)
    SP = SX ^ PX          MC = SX ? P1 : S1     (MC_j has weight j+1)
    sum_j   = SP_j ^ MC_{j-1}
    carry_j = SP_j ? MC_{j-1} : P2_j            (weight j+1)

The halved result is S1' = carry and S2' = sum >> 1. The dropped bit sum_0 is
always zero, because the quotient rule makes the four words' sum even.

The first level is the part that moves into the previous clock. SX' = S1' ⊕ S2'
is computed as soon as the new accumulator exists. PX' comes out of the
operand table together with P1' and P2'. Both are registered, so in the next
clock SP is a single XOR between registers. `csa42_step` implements the
equations above for a whole word. It takes S1, SX, P1, P2 and PX. It has no S2
input, because S2 only ever enters through SX.

The longest path inside the multiplier runs as follows:

    SX, PX registers → XOR (SP_1) → XOR (sum_1 = S2'_0) → XOR (q = S1'_0 ^ S2'_0)
      → 4:1 operand mux → P1, P2, PX registers

That is three XORs and a 4:1 multiplexer, independent of K. The other
register inputs (S1', S2', SX') have the same or shorter depth.

### Registers of `mmm_core`

Per multiplication: B1, B2, n, BX, D1, D2, DX, and the shifting A1, A2 in
the serial adder. Per iteration: S1, S2, SX, P1, P2, PX. All words are K+4
bits wide. That is enough that S1+S2+P1+P2 can never carry out of the top:
S stays below B + n < 5n. An assertion checks that the top bit stays zero.

## Timing of one multiplication

| cycle | what happens |
|-------|--------------|
| 1 | `start` is sampled while idle. A1, A2 go into the serial adder; B1, B2, n are captured |
| 2 | pre-computation: BX, D1, D2, DX registered. The serial adder produces A_0. S, P, SX, PX are cleared (inputs of iteration -1) |
| 3 … K+6 | iterations i = -1 … K+2, one per clock. Iteration i selects the operands of i+1 and the serial adder produces A_{i+2} |

`done` pulses in the clock after cycle K+6, so there are K+6 clock edges from
the start edge to `done`. This is the k+6 cycles of the published design. The
result stays on `s1`/`s2` until the next start. A new `start` is accepted in
the same cycle as `done`. This lets a chain of multiplications run back to
back, k+6 clocks each, with the result registers serving as the next
operands.

## RSA engines

Both engines take `msg < n`, an odd K-bit `n`, an EBITS-bit exponent `e` and
`r2 = R² mod n = 2^(2K+4) mod n`. They return `msg^e mod n`. `r2` depends only
on the key. Computing it is left to whoever loads the key.

Notation: MMM(x, y) is one multiplication with A = x and B' = y. Each engine
runs this sequence:

1. Convert into the Montgomery domain: M̄ = MMM(msg, r2). Form the Montgomery
   one: X = MMM(r2, 1).
2. Run the exponent loop over all EBITS bits, leading zeros included.
3. Convert back: Y = MMM(X, 1).
4. Form the binary result with `cs_reduce`. It does one carry-propagate
   addition Y1 + Y2 and subtracts n once if the sum is not below n. Y ≤ n
   always holds, so this is exact.

**`rsa_exp_msb` (MSB-first, one multiplier).**

- For j = EBITS-1 down to 0: X = MMM(X, X), and if e_j = 1 then also
  X = MMM(X, M̄).
- X lives in the multiplier's own result registers. M̄ is the only extra
  operand register.
- For e = 65537 with 17 bits, the loop is 17 squarings + 2 multiplications =
  19·(K+6) cycles.
- Total latency, from the start edge to `done`: 2 + (3 + EBITS + popcount(e))·(K+6) cycles.

**`rsa_exp_lsb` (LSB-first, two multipliers).**

- `u_sqr` holds Z and `u_mul` holds Y. The two conversions run in parallel on
  the two units.
- For j = 0 to EBITS-1, both units start in the same clock: Z = MMM(Z, Z),
  and if e_j = 1 also Y = MMM(Y, Z), using Z from before this squaring.
- A slot whose bit is 0 leaves `u_mul` idle.
- For e = 65537 the loop is 17 slots = 17·(K+6) cycles.
- Total latency: 2 + (EBITS + 2)·(K+6) cycles.

At K = 1024 and e = 65537 these totals are 22 662 cycles for the MSB engine
and 19 572 for the LSB engine. The loop parts are 19 × 1030 and 17 × 1030.

`rsa_top` places the two engines side by side. Each has its own `h_*` / `l_*`
start, operand and result ports, and they share only the clock and reset.

## Interfaces

All modules use one rising-edge clock and an asynchronous active-low reset
`rst_n`. Reset clears only control state; data registers are written before
they are read.

`mmm_core #(K)`:

- Inputs: `start`, `a1`/`a2` [K+2:0], `b1`/`b2` [K+1:0] with bit 0 = 0,
  `n` [K-1:0].
- Outputs: `busy`, `done` (one-cycle pulse), `s1`/`s2` [K+2:0].

`rsa_exp_msb`, `rsa_exp_lsb #(K, EBITS)`:

- Inputs: `start`, `msg`, `e`, `n`, `r2`. They are captured at start and need
  not be held.
- Outputs: `busy`, `done` (pulse), `result` [K-1:0]. `result` is held until
  the next operation ends.

Defaults: K = 1024, EBITS = 17. K is free; EBITS ≥ 1.

## Own choices and departures

These choices were made by this design rather than taken from the published
description:

* **The k+6 split.** Spending the k+6 cycles as one capture cycle, one
  pre-computation cycle and k+4 iterations is a reading of the published
  cycle count.
* **Halving the compressor output.** The published step is written as
  "(…)/2" on both result words. Here the halving applies to the pair's value:
  the carry word is taken unshifted and the sum word is shifted down. With
  this reading the arithmetic is exact, and the testbenches check it against
  integer arithmetic.
* **D1 is shifted.** D1 is stored shifted up one place, so that D1 + D2
  equals B1 + B2 + n.
* **Widths, handshake, reset and select encoding.** The K+4 internal width,
  the start/busy/done handshake, the reset behaviour and the {q, a} select
  encoding (`mmm_pkg::op_sel_e`) are not specified by the source.
* **RSA engine internals.** The source gives only the method and the counts.
  The following are this design's own: the domain conversions, the `r2`
  input, the final `cs_reduce`, and the operand sequencing.
* **`cs_reduce` timing.** `cs_reduce` is a single-cycle K+3-bit adder and
  comparator. It is far longer than the multiplier's critical path. It is
  used once per exponentiation, so it could be made multi-cycle (or run
  bit-serially) without changing the cycle counts noticeably. As written it
  limits the clock of the engines, not of `mmm_core`.
* **Register reuse in the LSB engine.** The LSB engine keeps Y and Z in its
  multipliers' result registers. The published LSB engine used separate
  registers; register reuse was described there for the MSB engine only.
* **Register count.** `mmm_core` at K = 1024 has about 15.4 k flip-flops:
  15 words of 1028 bits. The published 1024-bit unit reports about 11 k slice
  flip-flops, so it stores fewer words than this RTL. Which ones it omits is
  not described. A likely saving is to drive P1/P2/PX from the
  multiplexer's select bits instead of storing the words.
* **Not covered.** Nothing here covers an FPGA mapping. The published results
  are Virtex-2/Virtex-5 syntheses, and clock-rate figures do not transfer to
  this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model,
`tb/tb_ref_pkg.sv`, uses plain shift-and-add big-integer arithmetic
(Montgomery product via repeated halving mod n, square-and-multiply
exponentiation) that shares nothing with the RTL.

| testbench | what it checks |
|-----------|----------------|
| `csa42_step_tb` | 2·(S1'+S2') = S1+S2+P1+P2, SX', q' for random and extreme words |
| `mmm_precompute_tb` | D1+D2 = B1+B2+n, D1_0 = 0, BX, DX |
| `mmm_operand_select_tb` | all four rows of the operand table |
| `mmm_abit_adder_tb` | serial bits equal the bits of A1+A2, final carry included |
| `mmm_core_tb` | K = 64: random and corner operands, result < 2n and correct mod n, exactly K+6 cycles; chains of 12 back-to-back multiplications fed from the result registers. K = 4: every odd modulus 9…15 with every A, B' < 2n |
| `rsa_exp_msb_tb`, `rsa_exp_lsb_tb` | K = 64: e = 65537, 3, 17, 1, 0, all ones, random; msg = 0, 1, n-1; exact latency formulas |
| `rsa_top_tb` | K = 128: both engines at once on different keys. Counts that all four operand cases, serial-adder carries, MSB squarings and multiplications (17 + 2 for 65537), and parallel and squaring-only LSB slots all occur |
| `rsa_top_full_tb` | default parameters (K = 1024, EBITS = 17): one e = 65537 encryption on each engine, results and latencies |
| `workload_sizes_tb` | multiplier at K = 512, 1024, 2048 (K+6 cycles each); RSA at 512 bits on both engines |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/mmm_pkg.sv tb/tb_ref_pkg.sv tb/rsa_top_full_tb.sv \
      --top-module rsa_top_full_tb -Mdir obj_full
    ./obj_full/Vrsa_top_full_tb

Verilator finds the other modules through `-Irtl -Itb`; `tb/mmm_size_run.sv`
is a helper used by `workload_sizes_tb`. All testbenches finish in well under
a second of simulation time. Verilator's lint (`--lint-only -Wall`) reports
only unused-bit warnings. It also reports one note that `rst_n` is used both
as an asynchronous reset and in assertion `disable iff` clauses.

## Changing it

* **Operand size.** Set `K` on `rsa_top`, or on any module. Every width
  follows from it: K+4 internal, K+3 for A, K+2 for B. The multiplier's
  latency is K+6.
* **Exponent width.** Set `EBITS`. The loop always walks all EBITS bits, so
  the latency depends on the width and, in the MSB engine, on popcount(e).
* **Throughput.** The multiplier's operand registers and the engines' operand
  multiplexers are where a faster clock would be won or lost. `csa42_step`
  and `mmm_operand_select` are purely combinational and can be retimed
  freely.
