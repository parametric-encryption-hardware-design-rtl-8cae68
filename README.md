# Parametric Montgomery multiplier, modular exponentiator and Rabin-Miller prime tester

RSA needs two expensive things: modular exponentiation on numbers of 512 to
4096 bits, for encryption and decryption, and primality tests on numbers of
half that size, for key generation. Both reduce to one operation repeated
thousands of times: modular multiplication. This RTL builds that multiplier
so it can be scaled along two independent axes:

* **Pipelining (p = `NB_BLOCKS`).** The n iterations of Montgomery's
  bit-serial algorithm are divided between p hardware blocks in a chain.
  While block 1 works on one multiplication, block 0 already starts the
  next. Pipelining raises throughput but not latency.
* **Replication (r = `NB_REP`).** Inside each block, r carry-save adders sit
  in series, so one clock cycle performs r dependent iterations. Replication
  cuts latency by about r, at the price of a longer critical path.

Any p and r with p·r ≤ n work, for any bit width n. Two units are built on
top of the multiplier:

* a constant-time modular exponentiator that keeps two products in flight
  in a 2-block multiplier;
* a deterministic Rabin-Miller prime tester that reuses the exponentiator's
  multiplier for its squaring loop.

The top module is `prime_tester`, which contains every other block.

The design follows a thesis on parametric encryption hardware. Where this
implementation departs from that design, or fills in something it leaves
open, the last section and each file's opening comment say so.

## The carry-save Montgomery loop (`mont_cell`)

Montgomery multiplication computes A·B·2⁻ⁿ mod N for odd N without any
division. The bits of A are scanned from the least significant one. For each
bit, an addend I is chosen and added to an accumulator, which is then halved.
I is chosen so that the sum is even, which makes the halving exact. Here the
accumulator is kept in carry-save form as two words S and C, so an iteration
costs only a row of full adders and no carry propagation. The addend depends
only on a_i and the low bits of S, C and B:

| a_i | condition          | I     |
|-----|--------------------|-------|
| 0   | s0 = c0            | 0     |
| 0   | s0 ≠ c0            | N     |
| 1   | s0 ⊕ c0 ⊕ b0 = 0   | B     |
| 1   | s0 ⊕ c0 ⊕ b0 = 1   | B + N |

B + N is computed once per multiplication, outside the block. S and C are
n+1 bits wide.

A block runs `ITERS` iterations on its own slice of A. It contains `NB_REP`
selector + CSA pairs in series. Each clock cycle advances `NB_REP`
iterations. When `ITERS` is not a multiple of `NB_REP`, the last cycle takes
its result from the replica that completes iteration `ITERS`, not from the
end of the chain.

Each block has its own FSM:

* IDLE;
* LOADING: one cycle, S/C loaded from the previous block, counter cleared;
* RUNNING: ⌈ITERS/NB_REP⌉ cycles;
* FINISHED: `done` high for one cycle.

A block therefore takes ⌈ITERS/NB_REP⌉ + 2 cycles. A start that arrives in
FINISHED goes straight to LOADING, so a block can take work on consecutive
turns without a gap.

## The pipelined multiplier (`mont_mult`)

### Splitting the iterations

The n iterations are spread over p blocks:

* the first n mod p blocks do ⌊n/p⌋ + 1 iterations;
* the remaining blocks do ⌊n/p⌋.

This avoids an extra, mostly idle block when p does not divide n. Block k
starts one cycle after block k−1 raises `done`. The same pulse loads the
inter-block S/C register. The core latency is therefore

    L = Σ_k (⌈iters_k / r⌉ + 2) + (p − 1)      cycles.

For the default n = 512, p = 2, r = 4, that is 2·(64+2) + 1 = 133 cycles.

### The triangular register array (`operand_fifo`)

Every block needs its slice of A, plus B, N and B+N, for the multiplication
it is working on. Different blocks work on different multiplications. The
operands are captured once, when block 0 finishes a multiplication: each
later block's A slice, together with B, N and B+N, is pushed at the same
moment into that block's FIFO row. Block k pops its row when it finishes.
The S/C values, by contrast, are handed from block to block through the
inter-block registers.

Each row is a shift register with a fill pointer:

* a pop moves register i+1 into register i;
* a push writes the slot the pointer names.

The head is always register 0, so a block reads its operands from a fixed
register with no multiplexer. Row k has k+1 entries, hence the triangle.
The "+1" comes from the one-cycle start delay between blocks: in a full
pipeline, each block falls one more cycle behind the next operation, so
row k can hold k+1 operations at once. The same drift is why B and N cannot
simply ride along in the inter-block registers. Such a register would be
overwritten by the next operation one cycle before the block that reads it
has finished.

Assertions in `operand_fifo` flag a push into a full row or a pop from an
empty one, and in `mont_mult` a block started while busy. None of them fire
in any test. With rows one entry shorter, the overflow assertion fires in
`tb_mont_mult`.

### Front and back adders (`pipe_adder`)

The wide adders would set the clock: B+N before block 0, S+C after the last
block, and P−N for the final reduction. So each of them is cut into
`ADD_SUB_STAGES` chunks with a registered carry between chunks. At 512 bits
and 4 stages, each cycle crosses a 128-bit adder. The subtractor computes
a + ~b + 1, and its carry out (no borrow) is the P ≥ N comparison that picks
P or P−N.

After the B+N adder, an operation waits in a one-entry pending register.
Block 0 takes it in the first cycle it is idle or finishing. So with a
caller that issues whenever `ready_o` is high, a full pipeline accepts one
multiplication every

    N = ⌈⌈n/p⌉ / r⌉ + 2      cycles

(34 cycles at the defaults). When the blocks are shorter than the front
adder, the interval is `ADD_SUB_STAGES` + 2 cycles instead.

`FINAL_SUB = 0` drops the subtractor. The result is then only below 2N, and
the exponentiator compensates by using a multiplier 3 bits wider than its
operands.

### Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clock_i`, `reset_i` | in | 1 | clock; synchronous active-high reset |
| `start_i` | in | 1 | one-cycle pulse, only while `ready_o` is high |
| `x_i`, `y_i`, `m_i` | in | n | operands A, B and the odd modulus N; sampled at the start |
| `ready_o` | out | 1 | a start is accepted this cycle |
| `done_o` | out | 1 | one-cycle pulse; results leave in issue order |
| `p_o` | out | n | x·y·2⁻ⁿ mod m, held until the next `done_o` |

An idle multiplier raises `done_o` S + 1 + L + S·(1 + FINAL_SUB) + 1 cycles
after `start_i`, where S = `ADD_SUB_STAGES`. At the defaults that is 147
cycles.

## The exponentiator (`mont_exp`, `exp_ram`)

The exponentiator computes x^e mod m right to left over all n exponent
bits:

    P0 = x·Nr,  Z0 = 1·Nr                      (enter the Montgomery domain)
    for i in 0..n-1:
        Z(i+1) = Z(i)·P(i)    written back only if e_i = 1
        P(i+1) = P(i)·P(i)    (skipped for the last i: never used)
    result = Z(n)·1                            (leave the Montgomery domain)

Here Nr = 2^(2n) mod m is supplied by the caller on `nr_i`. The Z product
is computed for every bit, whether the bit is 0 or 1, so the number of
multiplications (2n + 2) and the run time do not depend on the exponent.
This is the defence against timing attacks.

P and Z sit in a two-entry RAM with one write port and two read ports
(`exp_ram`: address 0 is P, address 1 is Z). Only the P chain and the Z
chain are independent of each other. So at most two products are ever in
the multiplier, and a 2-block multiplier is the deepest that can be kept
full.

A small FSM tracks what is in flight:

* EMPTY;
* P alone;
* Z-P (P ahead);
* P-Z (Z ahead);
* Z alone (only for the last Z).

When a product comes out, it is written back and its chain issues its next
product:

* P(i+1) may issue once P(i) is in the RAM and Z(i) has been issued.
  The multiplier returns results in order, so Z(i) completes before
  P(i+1). Z(i+1), which reads P(i), is then issued at once, before P(i+1)
  can overwrite P(i). An assertion checks that this never goes wrong.
* Z(i+1) may issue once Z(i) has completed and P(i) is in the RAM.
* When both are ready, Z goes first.

The default multiplier has p = 2 and r = 4. At 512 bits an exponentiation
takes 76,141 cycles. The same unit with p = 1 and r = 1 takes 527,412
cycles. p = 2, r = 1 takes 273,709 cycles, while p = 3, r = 1 takes
275,166: a third block cannot be filled. Even with one block, the two
chains overlap in the front and back adders, so the adder pipeline depth
costs almost nothing: depth 8 is 63 cycles slower than depth 1. With two
blocks, the two chains alternate and each product takes a full multiplier
latency L (adders included), so an exponentiation costs about (2n + 2)·L/2
cycles. With one block it costs about (2n + 2)·N.

Interface: `start_i` is a pulse, and `x_i`, `e_i`, `m_i`, `nr_i` must stay
stable until `done_o`. `res_o` then holds x^e mod m until the next start.
While the exponentiator is idle, its multiplier is available on
`ext_start_i`, `ext_x_i`, `ext_y_i` / `mult_ready_o`, `mult_done_o`,
`mult_p_o`, with `m_i` as modulus. The prime tester uses this port.

## The prime tester (`prime_tester`, `prime_rom`)

The prime tester runs a Rabin-Miller strong pseudoprime test of an odd
n-bit number p. The bases a are the first `NB_PRIMES` primes (2, 3, 5, …,
37 by default). They come from a ROM whose contents are computed at
elaboration by trial division.

Write p − 1 = 2^s·d with d odd. A base passes if one of these holds:

* p = a;
* a^d ≡ 1;
* a^d ≡ p−1;
* a^(2^j·d) ≡ p−1 for some 1 ≤ j < s.

The first failing base makes p composite. If every base passes, p is
reported probably prime.

Datapath:

* **One exponentiator** computes a^d mod p.
* **The same multiplier** does everything else, through the exponentiator's
  standalone port:
  * converting p−1 into the Montgomery domain, once per test;
  * converting a^d into it, once per base that reaches the squaring loop;
  * the squarings a^(2^(j+1)·d) = (a^(2^j·d))².

  The squaring loop stays in the Montgomery domain, so its values are
  compared with the converted p−1.
* **A shifter and counter** find s and d while p−1 is being converted.
* **One equality comparator** with operand multiplexers serves all four
  tests.

The FSM states are:

* IDLE;
* LOADING: s = 0;
* PRE1: find s and d; convert p−1;
* RUN1: p = a?
* RUN2: compute a^d; test = 1?
* RUN3: test = p−1? The squaring loop is skipped when s < 2.
* PRE2: convert a^d;
* RUN4: squaring loop;
* FINISHED.

The FSM returns to RUN1 for the next base whenever a base passes.

Interface:

* `start_i` is a pulse.
* `p_i` must be odd and at least 3. `nr_i` = 2^(2n) mod `p_i`. Both must
  stay stable until `done_o`.
* `done_o` is high for one cycle.
* `result_o` is 1 for probably prime and 0 for composite. It holds until
  the next start.

Run time depends on the number. A prime costs about 12 times the cost of
one base, while most composites are rejected after the first base. Cycles
for one base at 512 bits, ADD_SUB_STAGES = 4:

| p (`PIPELINE_STAGES`) | r (`NB_REP`) | cycles per base |
|---|---|---|
| 1 | 1 | 527,945 |
| 1 | 2 | 265,033 |
| 1 | 4 | 133,577 |
| 2 | 1 | 274,245 |
| 2 | 2 | 142,277 |
| 2 | 4 (default) | 76,293 |

With one block, doubling r halves the time. With two blocks, the P and Z
chains overlap, so p = 2 with r = 4 is nearly twice as fast as p = 1 with
r = 4. Deeper pipelines give the exponentiator nothing more.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| all | `WIDTH` | 512 | operand width n (any value, not only powers of two) |
| `mont_mult` | `NB_BLOCKS` | 2 | pipeline blocks p |
| `mont_exp`, `prime_tester` | `PIPELINE_STAGES` | 2 | same, passed to the multiplier |
| all | `NB_REP` | 4 | carry-save adders per block r |
| all | `ADD_SUB_STAGES` | 4 | pipeline depth of the wide adders/subtractor |
| `mont_mult`, `mont_exp` | `FINAL_SUB` | 1 | 1: final subtraction; 0: WIDTH+3 multiplier without it |
| `prime_tester`, `prime_rom` | `NB_PRIMES` | 12 | number of bases |
| `prime_tester`, `prime_rom` | `PRIMES_DATA_WIDTH`, `PRIMES_ADDR_WIDTH` | 8, 4 | ROM shape |

Two constraints apply: p·r ≤ n, and `NB_PRIMES` ≤ 2^`PRIMES_ADDR_WIDTH`
with the largest base fitting in `PRIMES_DATA_WIDTH` bits. The prime tester
always uses the final subtraction, because its equality tests need fully
reduced values.

Counter widths are derived inside the modules with functions in `mont_pkg`.
That package also holds the iteration split and latency formulas.

## Files

| file | content |
|------|---------|
| `rtl/mont_pkg.sv` | shared cell-state enum; iteration split and latency functions |
| `rtl/pipe_adder.sv` | carry-pipelined adder/subtractor |
| `rtl/mont_cell.sv` | one pipeline block: replicated I-selector + CSA chain and its FSM |
| `rtl/operand_fifo.sv` | one row of the triangular operand array |
| `rtl/mont_mult.sv` | pipelined multiplier: front adder, blocks, array, back end |
| `rtl/exp_ram.sv` | 2-entry, 1-write / 2-read RAM for P and Z |
| `rtl/mont_exp.sv` | exponentiator with two-chain pipeline control |
| `rtl/prime_rom.sv` | table of the first primes, computed at elaboration |
| `rtl/prime_tester.sv` | Rabin-Miller tester (top) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/*_tb_core.sv` | reusable drivers/checkers instantiated by several testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>`, then stops. Each
also has a watchdog that counts a failure if the run hangs. With Verilator
5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/mont_pkg.sv tb/tb_prime_tester.sv --top-module tb_prime_tester
    ./obj_dir/Vtb_prime_tester

Run from the repository root. Substitute any `tb/tb_*.sv` for the
testbench. `-Wno-fatal` is needed because some testbenches draw random
stimulus wider than the operand and let it truncate, which `-Wall`-style
width warnings report. The RTL itself lints clean apart from the unused
bits explained in `mont_mult`. The reference results are computed inside the testbenches with
wide integer arithmetic, and no files are read.

| testbench | what it checks |
|-----------|----------------|
| `tb_pipe_adder` | random and corner sums/differences, carry/borrow, payload and latency |
| `tb_mont_cell` | (S+C)·2^ITERS ≡ S_in + C_in + a·B (mod N) for 17 iterations/3 replicas and 40/4; done latency, also with a start in the FINISHED cycle |
| `tb_operand_fifo` | random traffic against a queue model, including simultaneous push/pop and full rows |
| `tb_mont_mult` | 7 shapes (p 1 to 6, r 1 to 5, uneven splits, with and without final subtraction): every result, exact latency, exact accept interval |
| `tb_exp_ram` | two read ports against a model |
| `tb_mont_exp` | 5 shapes at 45 to 96 bits: results, 2n+2 multiplications, overlap of the two chains, cycle count against the model above |
| `tb_mont_exp_512` | one 512-bit exponentiation with p=1, r=1 (cycle count within 10 % of 530,000, the count implied by the original design's measured 512-bit timing) and with the defaults (at least 3× faster) |
| `tb_mont_exp_shapes` | 512-bit exponentiation cycle trends: 2 blocks ≈ half of 1 block, 3 blocks ≈ 2 blocks, doubling r ≈ halves, adder depth 8 only slightly slower than depth 1 |
| `tb_prime_tester_512_cfg` | the 512-bit prime tester in six shapes (p = 1, 2; r = 1, 2, 4), one base each: verdicts, and that the cycle counts rank the shapes as the original design's published timings do (cycle table in the prime tester section) |
| `tb_prime_rom` | a 40-entry table against a sieve of Eratosthenes |
| `tb_prime_tester` | 64-bit numbers with p=3, r=3: numbers equal to a base, 2047 (strong pseudoprime to base 2), a Carmichael number, a strong pseudoprime to bases 2..7, large primes and random odd numbers, all against a reference Rabin-Miller; counts that every control path occurs (p = a, a^d = 1, a^d = p−1, success in the squaring loop, composite with and without squaring loop, skipped Z writes, two products in flight, a 2-entry FIFO row, standalone multiplications) and fails if one never does |
| `tb_prime_tester_full` | the top with all defaults (512 bits): the prime 2^512 − 569 and a composite; about 990,000 cycles, a few seconds |

## Where this implementation departs from the original design or fills gaps

* **Final conversion.** The exponentiator's result leaves the Montgomery
  domain by multiplying by 1. The original text also mentions multiplying
  by Nr at that point, which would not return the plain result.
* **Multiplication count.** The last P square is never issued, so an
  exponentiation takes 2n + 2 multiplications, not 2n + 3. The issue-order
  and Z-first rules are this implementation's reading of the described
  two-chain control.
* **Standalone multiplier port.** The `ext_*`/`mult_*` port of `mont_exp`
  is an addition. It lets the prime tester share the multiplier, which the
  original design also does, but without specifying an interface.
* **Block restart.** Blocks accept a new start in FINISHED without first
  returning to IDLE.
* **Front pending register.** The pending register after the B+N adder is
  this implementation's way of reaching the one-result-every-N throughput.
* **Row contents.** The original area model puts only A slices in the
  triangular array rows and carries B and M between blocks. Here the rows
  also hold B, N and B+N, and have k+1 entries; the triangular-array section
  explains why.
* **Adder cycles.** The pipelined adders add about 3·S + 2 cycles to every
  multiplication's latency. These cycles are not in the latency formula
  above.
* **Number of bases.** `NB_PRIMES` = 12 is a choice; the original gives no
  number. With 12 bases every odd number below 3.3·10²⁴ is classified
  correctly. Above that, the test is probabilistic in the usual sense.
* **Reset.** Reset is synchronous and active high everywhere. RAM and
  operand registers are not reset; they are always written before they are
  read.
* **Memories.** The exponentiator RAM and the prime table are written as
  plain arrays with asynchronous reads. They map to distributed RAM or
  registers, not block RAM.
* **Software tool.** The original design also comes with a software tool
  that models area and throughput to choose p and r. It is not hardware and
  is not included.
* **Untested sizes.** The largest width simulated is 512 bits. Nothing in
  the RTL limits the width, but 2048- and 4096-bit runs have not been
  simulated.
