# SCS-MM-New: a radix-2 Montgomery multiplier with one configurable carry-save row

This is synthesizable SystemVerilog for a k-bit Montgomery modular multiplier of
the kind used for RSA-size modular exponentiation (default k = 1024). It computes

    S = A * B * 2^-(k+2)  mod N^,        0 <= S < 2 N^

for an odd modulus N^ < 2^k and operands A, B < 2 N^. The output meets the same
bound as the inputs, so products can be chained (square-and-multiply) without a
final subtraction.

The design aims for a very short clock period with little hardware. The whole
arithmetic core is **one row of k+6 configurable full adders**, each with a
4-to-1 multiplexer in front of it. The critical path is about one 4-to-1
multiplexer plus one full adder. Three ideas keep the cycle count down even
though the row is that small:

1. **One adder row does all the work.** The same row precomputes D^ = B^ + N^,
   runs the Montgomery iterations, and converts the carry-save result to binary
   at the end. There is no carry-propagate adder.
2. **Configurable cells.** For carry propagation, each cell can act as two half
   adders in series instead of one full adder. That halves the clock cycles the
   two conversions take.
3. **Quotient precomputation and iteration skipping.** The quotient bit and the
   multiplier bit for the *next* iteration are worked out one cycle ahead, from
   three register bits. An iteration that would add nothing is folded into the
   previous one as an extra right shift.

A second, unrelated block sits beside it in the top level: `normal16x16`, a plain
16 x 16 unsigned array multiplier.

## The arithmetic

The textbook radix-2 Montgomery step is S <- (S + A_i*B + q_i*N) / 2, with q_i
picked to make the sum even. In this design:

* **S stays in carry-save form** (SS, SC) throughout, so no step has a long carry
  chain.
* **The addend is one operand, not two.** A_i*B + q_i*N is one of 0, N^, B^ or
  D^ = B^ + N^. D^ is computed once per multiplication, so each iteration is a
  single three-input carry-save addition.
* **B is pre-shifted: B^ = B << 3.** Its three low bits are zero, so B^ and D^
  have the same three low bits as N^. The three low bits of the addend therefore
  depend only on q^, never on A^, and they are known before the addend is
  selected. That makes the one-cycle-ahead prediction possible. It costs three
  extra halvings, so the loop runs k+6 iterations, i = -1 ... k+4. Iteration -1
  adds zero and only sets up the pipeline.
* With k+2 effective halvings of A*B, the result satisfies S < 2 N^ whenever
  A, B < 2 N^ and N^ < 2^k. This removes the usual final comparison and
  subtraction.

Internal vectors are W = k+6 bits wide. D^ < 17 N^, and the unshifted iteration
sum is below 34 * 2^k.

## Datapath

```
         N^ reg   B^ reg   D^ reg               A reg ---- A_{i+1}, A_{i+2}
           |        |        |                                   |
  SC reg --+- M1    +- M2 -- SS reg      SM3 (0/N^/B^/D^)        |
  (>>1,>>2,as is,N^) (>>1,>>2,as is,B^)  by (A^, q^)             |
           \        |        /                                   v
            +---- CCSA row (alpha) ----+     SS/SC low bits -> M4/M5 -> Skip_D
                 |             |                                  |
              SC reg        SS reg --> result          skip, q^, A^ flip-flops
                 |
               Zero_D (SC == 0)
```

| Block | Module | Job |
|---|---|---|
| CFA | `cfa` | One bit. alpha=0: full adder on (SC-path, SS-path, x). alpha=1: two half adders in series. The first half adder's carry goes to the next cell. |
| CCSA | `ccsa` | A row of W `cfa` cells. 1F_CSA(a,b,x) or 2H_CSA(a,b). Outputs (ss, sc) with sc already at its own weight. |
| M1, M2 | `shift_sel_mux` | 4-to-1 multiplexer in front of the row. Inputs: register >>1, register >>2, register unshifted, load operand (N^ for M1, B^ for M2). |
| SM3 | `sm3` | Picks the addend: N^ gated by q^, then B^/D^ by q^, then A^. |
| M4, M5 | `low_bits_mux` | 3-bit 2-to-1 multiplexer. Feeds the skip detector the low bits of SS[i] and SC[i] straight from the registers. |
| Skip_D | `skip_d` | Predicts q_{i+1}, q_{i+2} and skip_{i+1}, then selects the next q^ and A^. |
| Zero_D | `zero_d` | Wide NOR on SC. It ends each conversion. |
| register A | `a_shift_reg` | Shifts right by 1 or 2 per iteration and presents A_{i+1} and A_{i+2}. |
| control | `scs_mm_ctrl` | State machine and iteration counter. |
| top of the multiplier | `scs_mm_new` | Holds the registers N^, B^, D^, SS, SC and the skip, q^, A^ flip-flops, and wires the blocks together. |

**The shift is delayed by one cycle.** The SS and SC registers store the adder
output *before* the iteration's division by two. M1 and M2 apply the shift in
the next cycle, either >>1 or, after a skip, >>2, so no logic sits between the
adder and the registers. For the same reason, the skip detector reads its three
bits through the small multiplexers M4 and M5 and not through M1 and M2.

## Skipping iterations

This is the least obvious part of the design. In iteration i the row computes
T = SS[i] + SC[i] + x, and S[i+1] = T/2. The bits 0..2 of T depend only on bits
0..2 of SS[i], SC[i] and x, and x[2:0] = q^ ? N^[2:0] : 0. So `skip_d` can run a
3-bit carry-save addition in parallel with the wide one. Per bit j it gives the
sum s_j and the carry c_{j+1}. From those:

* q_{i+1} = s1 ^ c1 is the parity of S[i+1].
* q_{i+2} = s2 ^ c2 ^ (s1 & c1) is the parity of S[i+1]/2.
* skip_{i+1} = allow & ~(q_{i+1} | A_{i+1} | (s1 & c1 & s2 & c2)).

When A_{i+1} = q_{i+1} = 0, iteration i+1 would add zero and only halve. It is
skipped: the next cycle takes the registers >>2, and i advances by 2.

**A subtlety the design has to handle.** S[i+1] being even only says that its
two bit-0 carry-save bits (s1 in SS, c1 in SC) are equal. They are both 1
whenever the previous iteration added N^ (q_i = 1). Shifting both vectors right
then throws away 1 at the weight of S[i+2]. This design puts that 1 back. It
sets bit 0 of the twice-shifted SC if SC's next bit (c2) is 0, or else bit 0 of
the twice-shifted SS. The flip-flops `inj_sc` and `inj_ss` carry that decision
to M1/M2 and M4/M5. If all four low bits are 1 there is no free bit, so the
iteration is simply not skipped.

Skipping only when s1 = c1 = 0 would need no correction, but it hardly ever
applies (17 of about 9,200 iterations on random 1024-bit operands). With the
correction, about 25 % of iterations are skipped.

`allow` is low in the last iteration (i = k+4), so that a skip never runs past
S[k+5].

Assertions in `scs_mm_new` check on every shift that nothing set is shifted out.

## Control sequence and timing

`scs_mm_ctrl` runs these phases, one CCSA operation per clock:

| State | Operation | Cycles |
|---|---|---|
| `ST_PRE` | (SS,SC) = 1F_CSA(B^, N^, 0) | 1 |
| `ST_PRE_CONV` | while SC != 0: 2H_CSA; then D^ = SS and SS = SC = 0 | passes + 1 |
| `ST_LOOP` | iterations i = -1 ... k+4 | k+6 - skips |
| `ST_POST_SH` | one 2H_CSA on the shifted result (applies the pending halving) | 1 |
| `ST_POST` | while SC != 0: 2H_CSA; then `done` | passes + 1 |

The number of conversion passes depends on the longest carry chain of the
value. Each 2H_CSA pass moves a carry two bit positions. Random 1024-bit
operands need about 5 passes each way. The worst case is about k/2 passes; a
plain carry-save conversion would take about k.

Measured at k = 1024 on random operands: **about 820-900 cycles per
multiplication**. Without skipping it would be 1040.

**Interface (`scs_mm_new`, or the `mm_` ports of `mm_top`):**

* Pulse `start` for one cycle with `a_in`, `b_in` and `n_in` valid. They are
  registered on that edge.
* `busy` is high from the next cycle until `done`.
* `done` is a one-cycle strobe. `result` is valid from then until the next
  `start`.
* Reset is active-low and asynchronous (`rst_n`).
* The caller must keep N^ odd and below 2^k, and A, B < 2 N^. Nothing checks
  these.

The modulus port takes N^ directly. How N^ is derived from an application
modulus N is left to the user. For an ordinary odd N < 2^k, use N^ = N; the
result is then the Montgomery product modulo N, with the radix 2^(k+2).

## The 16 x 16 multiplier

`normal16x16` computes c = a * b for 16-bit unsigned a and b, a 32-bit c. It is
combinational. Partial-product rows are summed by a chain of ripple adders, with
the running sums named p1 ... p15. It is independent of the Montgomery unit and
has its own ports (`mul_a`, `mul_b`, `mul_c`) on `mm_top`.

## Files

* `rtl/scs_mm_pkg.sv`: enums for the M1/M2 selects, the CCSA mode and the
  controller states.
* `rtl/cfa.sv`, `ccsa.sv`, `sm3.sv`, `skip_d.sv`, `zero_d.sv`,
  `shift_sel_mux.sv`, `low_bits_mux.sv`, `a_shift_reg.sv`, `scs_mm_ctrl.sv`:
  the blocks listed above.
* `rtl/scs_mm_new.sv`: the multiplier. Parameter `K`, default 1024.
* `rtl/normal16x16.sv`: the 16 x 16 multiplier.
* `rtl/mm_top.sv`: top level with both units. Parameter `K`, default 1024.
* `tb/tb_<block>.sv`: one self-checking testbench per block.
* `tb/mm_ref_funcs.svh`: reference functions shared by the two
  multiplier-level testbenches. One is a modular-arithmetic check of results;
  the other is an integer model of the iteration scheme that predicts the exact
  cycle count.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example, the
full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/scs_mm_pkg.sv tb/tb_mm_top.sv --top-module tb_mm_top
./obj_dir/Vtb_mm_top
```

To run another block's test, substitute its testbench. The package must come
first on the command line.

## What the tests cover

* **Cell and block tests.** `cfa`, `skip_d` and `low_bits_mux` are tested
  exhaustively. `ccsa`, `sm3`, `zero_d`, `shift_sel_mux` and `a_shift_reg` get
  random and corner vectors. `skip_d` is checked against integer arithmetic on
  the 3-bit sums.
* **`tb_scs_mm_ctrl`.** Runs the state sequence with random conversion lengths
  and random skip decisions, and checks every strobe and the loop length.
* **`tb_scs_mm_new` (k = 32).** 600 multiplications:
  * random, corner (A = 0, A = B = 2N^-1, one-hot B) and chained operands;
  * every result checked modularly;
  * every latency checked cycle-exact against the model;
  * requires that skips, full iterations, all four addends and multi-pass
    conversions all occur.
* **`tb_mm_top` (k = 1024, default parameters).**
  * random and chained products;
  * a worst-case carry chain in B^ + N^, which must finish in about k/2 passes;
  * the same mechanism coverage as above;
  * a random product on the 16 x 16 multiplier every clock.

## Where this departs from the published architecture, and open points

* **Skip equations.** The skip-detector equations above, and the bit-0
  correction flip-flops `inj_sc` and `inj_ss`, are this design's own. The
  published detector is a similar small gate network: a NOR for the skip
  decision and two 2-to-1 multiplexers for q^ and A^. Its exact gate list is not
  reproduced.
* **SM3 and CFA polarity.** The addend is passed true. The published cells pass
  it inverted. This changes no function.
* **One extra cycle after the loop.** The pass that applies the pending halving
  always runs, so the final conversion may take one cycle more than strictly
  needed.
* **Zero testing.** Each conversion loop tests the SC register, which costs one
  cycle beyond the last pass.
* **Width.** Internal width is k+6. The operand ports are k+1 bits, so a
  result can be used as an operand.
* **`normal16x16` internals.** This block is known only by its name, ports and
  layout. Its row-adder structure is a plain choice.
* **Not characterised.** No timing or area figures are claimed. The critical
  path is meant to be one 4-to-1 multiplexer plus one full adder, but no
  synthesis to a cell library has been done.
