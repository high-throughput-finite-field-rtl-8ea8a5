# Digit-serial redundant-basis multipliers for GF(2^m)

Elliptic-curve cryptography does most of its work in multiplications over a
binary field GF(2^m). This design gives three pipelined hardware multipliers
for that field. They differ in area, clock period and latency. All three use
a *redundant basis* (RB), so the multiplier needs no reduction circuit. Each
takes one digit of P bits of the second operand per clock and delivers a
finished product every Q clocks, with products overlapping in the pipeline.

| structure | module        | clock period (gate delays)      | latency (cycles) |
|-----------|---------------|---------------------------------|------------------|
| PS-I      | `rb_mult_ps1` | T_AND + (1 + ceil(log2 d)) T_XOR | P/d + Q          |
| PS-II     | `rb_mult_ps2` | T_AND + (1 + ceil(log2 d)) T_XOR | log2(P/d) + Q    |
| PS-III    | `rb_mult_ps3` | T_XOR                           | P + Q + 1        |

All three produce one product every Q cycles. The defaults are N = 269,
P = 32, Q = 9 and d = 1. `rb_multipliers` puts the three side by side.

## Redundant basis arithmetic

Let beta be a primitive N-th root of unity over GF(2). When 2 has order m
modulo a prime N, the ring GF(2)[beta]/(beta^N - 1) contains GF(2^m). An
element is then a vector of N bits `a[0..N-1]`, meaning sum a_k beta^k. The
representation is redundant: N bits for an m-bit field. Two facts make this
cheap in hardware:

* Because beta^N = 1, multiplying by beta^s is a **cyclic rotation** by s
  places: bit k of A*beta^s is `a[(k-s) mod N]`. In RTL that is only wiring:
  `{a[N-1-s:0], a[N-1:N-s]}`.
* The product is the **cyclic convolution**
  `c[k] = XOR_i a[i] & b[(k-i) mod N]`. No modular reduction step is needed.

The default N = 269 is prime, and 2 is primitive modulo 269. So the ring holds
GF(2^268), which has a type I optimal normal basis. N is only a parameter: the
RTL computes the cyclic convolution for any N. Whether that ring holds a field
is a question for the system around the multiplier.

## The digit-serial decomposition

B is padded with zeros to P*Q bits and cut into Q digits of P bits. Digit j
holds bits `b[jP .. jP+P-1]`. The product splits into one word per digit:

```
W_j = XOR_{i=0}^{P-1}  b[jP+i] & (A * beta^i)      (partial product word)
C   = XOR_j  beta^(jP) * W_j
    = (...((W_{Q-1}) beta^P ^ W_{Q-2}) beta^P ^ ...) beta^P ^ W_0
```

Two parts of the hardware compute this:

* The **partial product generation units** (PPGUs, `rb_ppgu`) form W_j. A unit
  handles d bits of the digit. It ANDs each bit with a fixed rotation of A and
  XORs the d products in a balanced tree.
* The **finite field accumulator** (FFA, `rb_ffa`) applies Horner's rule. On
  each word it sets `C <- C*beta^P ^ W`, which is one rotation and N XOR gates.
  The digits therefore arrive most significant first. On the first digit of a
  product the register loads W instead, so the next product can start at once.

The three structures differ only in how the P/d PPGUs are combined and
where the pipeline registers sit. For every digit of every product, W_j is the
same in all three.

## The three structures

### PS-I: systolic chain

There are S = P/d stages. Stage 0 is an AND array. Every later stage XORs its
PPGU output onto the registered sum of the stage before. So the longest path
is one PPGU plus one XOR: T_AND + (1 + ceil(log2 d)) T_XOR. A digit needs S
cycles to cross the chain, then one more to enter the FFA.

Several products are in the chain at once: at the defaults the chain is 32
stages deep but a product lasts only 9 cycles. Every stage must therefore use
the A of the digit it is working on, not the A now in the operand register. So
A and the digit move down the chain beside the partial sum. Each stage has one
N-bit A register and one P-bit digit register.

### PS-II: pipelined XOR tree

All S = P/d PPGUs see the same A and digit in the same cycle, straight from the
operand register. A binary XOR tree sums their outputs, with a register after
each level. The first level XORs two PPGU outputs, so the clock period equals
PS-I's. The latency falls to log2(P/d) + Q. The tree holds S - 1 words and A
is held only once, so this structure has by far the fewest registers. P/d must
be a power of two. With d = P the single PPGU output is registered once, which
gives a latency of 1 + Q.

### PS-III: one gate per cycle

This is the PS-I chain with d = 1 and one more cut per stage. Every AND array
has its own product register, and every XOR stage adds a registered product
to a registered sum. No path crosses more than one gate, so the clock period
is one XOR delay. That costs one cycle of latency. The products of bits 0 and
1 are both taken from stage 1 of the A/digit pipeline. That way they are ready
in the same cycle, and the first XOR adds them.

| digit word leaving the operand register in cycle c | PS-I | PS-II | PS-III |
|---|---|---|---|
| W in the last pipeline register | c + P/d | c + log2(P/d) | c + P + 1 |
| word folded into the FFA at the end of cycle | c + P/d | c + log2(P/d) | c + P + 1 |
| `out_valid` (after the last digit, c = c0 + Q - 1) | c0 + P/d + Q | c0 + log2(P/d) + Q | c0 + P + Q + 1 |

## Interface and timing

The three multipliers have the same ports. Each module's first comment gives
its exact schedule.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active low |
| `in_valid` / `in_ready` | in / out | 1 | operand pair taken at an edge where both are high |
| `a_in`, `b_in` | in | N | operands, bit k = coefficient of beta^k |
| `out_valid` | out | 1 | high for one cycle when `c_out` holds a product |
| `c_out` | out | N | product, in the order the pairs were taken |

* `in_ready` is high when the operand register is idle or is presenting its
  last digit. A pair offered on every cycle is therefore taken every Q cycles
  with no gap.
* The digits of a pair taken at edge t leave the operand register in cycles
  t+1 ... t+Q. The latencies above count from cycle t+1, so `out_valid` comes
  latency + 1 cycles after the accepting edge.
* There is no back-pressure on the result. `c_out` is valid only in the
  `out_valid` cycle, because the next product may start changing it in the
  following cycle.
* Reset clears the control state: tags, counters, accumulator and
  `out_valid`. The data pipeline registers have no reset. Their contents are
  used only when a valid tag travels with them.

The top level `rb_multipliers` has ports `ps1_*`, `ps2_*` and `ps3_*`. Each set
is the port list above, with `in_valid`, `in_ready`, `a`, `b`, `out_valid`
and `c`. Clock and reset are shared.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 269 | ring size, bits per operand |
| `P` | 32 | digit size, bits of B per cycle (P*Q >= N is required) |
| `Q` | 9 | digits per operand, cycles per product |
| `D` (`D1`, `D2` on the top) | 1 | bits per PPGU in PS-I / PS-II; must divide P |

The structures were evaluated at (P, Q) = (32, 9), (16, 17) and (8, 34). For
PS-I and PS-II, d went up to 8, 4 and 2 respectively. Those three pairs fit
any N with 264 < N <= 272. N = 269 is this design's choice inside that range.
`rb_pkg` holds the defaults and the tag
struct that travels with each digit word.

## How far this follows the original structures

The RTL is derived from the gate counts, register counts, latencies and clock
periods given for these structures in the original design. AND and XOR
counts match: P*N of each in every structure. The places where this RTL
departs from those figures, or fills a gap they leave, are listed below.

* **Extra registers in PS-I and PS-III.** The original gives (P/d)N + 2N
  registers for PS-I, (2P + 2)N for PS-III and (P/d)N + N for PS-II. Here
  PS-I and PS-III also carry A (N bits) and the digit (P bits) down the
  chain. Without them, overlapping products would use each other's A. At the
  defaults, synthesis gives about 18,900 register bits for PS-I against
  34N = 9,146, and 27,500 for PS-III against 66N = 17,754. PS-II has about
  9,500 against 33N = 8,877. Most of its difference is the P*Q-bit B register.
* **B is held whole.** The operand register keeps all P*Q bits of B as a shift
  register and A separately. The original does not say how B reaches the
  PPGUs.
* **PS-III unit boundaries.** The original describes PS-III as P + 1 units,
  P - 2 of them regular. Here there are P AND arrays with product registers and
  P - 1 XOR stages. The latency and the period are the same.
* **Own choices:** the FFA's load-on-first-digit, the valid/ready handshake,
  the reset scheme, N = 269, and the latency reference point (the cycle after
  the accepting edge). The latency formulas match the original's for d = 1.
  For d > 1 the original gives none for PS-II.

## Verification

Each testbench in `tb/` prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. All compare products with a reference cyclic convolution in
`rb_ref_pkg`, which multiplies bit by bit. The operands include 0, 1,
beta^(N-1), all ones and random vectors.

| testbench | covers |
|---|---|
| `tb_rb_ppgu` | rotations, including wrap-around, and the d-input XOR tree |
| `tb_rb_ffa` | Horner accumulation, back-to-back products, idle cycles |
| `tb_rb_digit_feeder` | digit order, first/last tags, `in_ready`, offers while busy |
| `tb_rb_mult_ps1/2/3` | each structure at N = 269 and on a 5-bit ring, several P, Q, d |
| `tb_rb_multipliers` | the top level at its default sizes, all three structures |
| `tb_rb_workloads` | all 21 evaluated combinations of structure, (P, Q) and d, at N = 269 |

The structure and top-level tests check every latency and check that pairs
issued back to back give results exactly Q cycles apart. `rb_mult_checker`
drives random traffic: pairs back to back, idle gaps, and offers held while
the multiplier is busy. `rb_mult_harness` pairs a checker with one multiplier.
The structure and top-level testbenches fail if any of these traffic cases,
or overlapping products in the pipeline, never occurred.

The products come out correct in simulation. Clock period and gate counts
have not been measured.

## Simulating

Each testbench runs in well under a second. For example, the top level:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rb_multipliers \
  rtl/rb_pkg.sv tb/rb_ref_pkg.sv rtl/rb_ppgu.sv rtl/rb_ffa.sv rtl/rb_digit_feeder.sv \
  rtl/rb_mult_ps1.sv rtl/rb_mult_ps2.sv rtl/rb_mult_ps3.sv rtl/rb_multipliers.sv \
  tb/rb_mult_checker.sv tb/tb_rb_multipliers.sv
./obj_dir/Vtb_rb_multipliers
```

For the structure testbenches and `tb_rb_workloads`, add
`tb/rb_mult_harness.sv`. The unit testbenches need only `rb_pkg`,
`rb_ref_pkg` and their unit. `tb/tb_mult_common.svh` is included by the
multiplier testbenches and is found through `-Itb`.

To change a size, set parameters on the structure or on `rb_multipliers`.
P*Q must cover N. D must divide P, and for PS-II P/D must be a power of two.
Assertions in the modules report a violation at elaboration.
