# Karatsuba polynomial multipliers for lattice cryptography

Lattice-based schemes spend most of their time multiplying polynomials in the
ring Z_q[x]/(x^256 + 1). This RTL holds two hardware multipliers for that ring.
Both cut the work with Karatsuba's trick: two half-size products and one
product of sums replace four half-size products. Both also fold the reduction
modulo x^256 + 1 (the "negacyclic" wrap, x^256 = -1) into the step that puts
the partial products back together. So neither ever stores the 511-coefficient
full product.

| | KaratSaber | SK (SPMA-Karatsuba) |
|---|---|---|
| scheme | Saber (module-LWR) | R-LWE |
| ring | Z_8192[x]/(x^256+1) | Z_7681[x]/(x^256+1) |
| operand a | 256 x 13 bit | 256 x 13 bit, < 7681 |
| operand b | secret, coefficients in [-5, 5] | small, coefficients 0..31 |
| Karatsuba layers | 4 (81 sub-products of size 16) | 1 (3 half products) |
| multipliers | 512 shift-and-add units | 3 DSP-style 25x18 multipliers |
| cycles per product | 75 (published design: 82) | 8780 (published design: 8787) |
| top module | `karatsaber_core` | `sk_rlwe_core` |

The two multipliers are separate designs. `lbc_pm_top` places them side by
side. They share only clock and reset, and each keeps its own ports (`ks_*` and
`sk_*`). They can run at the same time.

The architectures follow the KaratSaber and SK multipliers of Wong Zheng Yan's
thesis, *Efficient Implementation of Lattice-Based Cryptographic Schemes for
Internet of Things Applications* (UTAR, 2021). This RTL is an independent
implementation of those descriptions. Where the description leaves something
open, this design makes its own choice. Each such choice is noted below and in
the opening comment of the file concerned.

---

## 1. KaratSaber: the Saber multiplier

### 1.1 Four Karatsuba layers, precomputed

Split the 256-coefficient a into 16 *top-layer* parts a_0 .. a_15 of 16
coefficients each. A Karatsuba layer turns one product into three: low x low,
high x high, and (low+high) x (low+high). Each of those is called L, H and M.
After four layers, a becomes 3^4 = 81 sub-polynomials A_k of 16 coefficients.
Each A_k is a sum of some top-layer parts:

* Each layer fixes one bit of the top-layer index.
* Digit L means the bit is 0, H means it is 1, and M means either (the sum of both).
* Layer p decides bit p of the index.

Two examples: the sub-polynomial "M at the three finest layers, L at the top"
is the sum of a_0 .. a_7. The one that is H at layers 1 and 3 and L elsewhere
is a_10 alone.

**Numbering.** The design numbers the sub-polynomials
k = 27·D3 + 9·D2 + 3·D1 + D0:

* D0 to D2 (the three finest layers) use the digit order L, H, M.
* D3 (the top layer) uses the order L, M, H.

With this numbering, sub-polynomial 52 is the sum of the even parts a_0 + a_2 +
… + a_14, and sub-polynomial 37 is a_4 + a_12.

**Partial multiplication.** Only a is split this way. For b, the design uses
the identity A_k · (Σ b_j) = Σ A_k · b_j. Each A_k is multiplied by each
top-layer part b_j of the same index set, and the results are summed. So b
never needs adders and stays a small signed number.

The sub-polynomial A_k is used with 2^(number of M digits) parts of b. Over
all 81 sub-polynomials that is (1+1+2)^4 = 256 products of 16x16 coefficients.

### 1.2 Reusable register sets and the group schedule (`ks_preprocess`, `ks_ctrl`)

Sub-polynomials that share the two top digits (D3, D2) form a **group** of nine.
A group is built from four *group inputs* g_0 .. g_3. These are top-layer parts,
or sums of two or four of them. Nine register sets R_1 .. R_9 hold the group's
sub-polynomials as sums of the group inputs:

| set | R_1 | R_2 | R_3 | R_4 | R_5 | R_6 | R_7 | R_8 | R_9 |
|---|---|---|---|---|---|---|---|---|---|
| holds | g0 | g1 | g0+g1 | g2 | g3 | g2+g3 | g0+g2 | g1+g3 | g0+g1+g2+g3 |

A **load** brings one top-layer part a_w in at group position m. Every register
set whose pattern contains m then does one of two things:

* **overwrite:** the set is replaced by a_w. This happens when the group starts
  from fresh inputs and m is the first position the set holds.
* **accumulate:** a_w is added to what the set holds. This happens in every
  other case.

The nine groups are visited in an order where each group differs from the
previous one by adding or replacing one block of four parts. So the same nine
register sets serve all 81 sub-polynomials.

| group | (D3,D2) | load | top-layer parts per position |
|---|---|---|---|
| 0 | L,L | a0..3, overwrite | a_m |
| 1 | L,M | +a4..7 | a_m + a_{4+m} |
| 2 | L,H | a4..7, overwrite | a_{4+m} |
| 3 | M,H | +a12..15 | a_{4+m} + a_{12+m} |
| 4 | H,H | a12..15, overwrite | a_{12+m} |
| 5 | H,M | +a8..11 | a_{8+m} + a_{12+m} |
| 6 | H,L | a8..11, overwrite | a_{8+m} |
| 7 | M,L | +a0..3 | a_m + a_{8+m} |
| 8 | M,M | +a4..7, +a12..15 | all four |

The published design gives the start of this input sequence. The rest of the
table (groups 3 to 8) is this design's continuation by symmetry.

### 1.3 Shift-Two-Multiplicand units (`ks_stm`, `ks_mult`)

The secret coefficients are at most 5 in magnitude. So a "multiplier" can be a
selection among 0, x, x<<1, x+(x<<1), x<<2 and x+(x<<2), followed by a
conditional negation. The negation is 8192 − x, which is exact modulo 2^13. No
DSP blocks and no modular reduction are needed.

Each STM takes one 13-bit coefficient and **two** signed multiplicands, and
returns the sum of both products. This is how two b parts are multiplied with
one register set at once.

`ks_mult` is an array of 256 STMs: the full 16x16 grid of one sub-polynomial
product. It sums the anti-diagonals into 31 coefficients, plus a zero
coefficient on top. It has two pipeline stages. Two such arrays run in parallel
(512 STMs in all).

When a register set needs an odd number of b parts, the last call has its
second multiplicand forced to zero (`b2_zero`).

b is encoded as 4-bit sign-magnitude, `{sign, magnitude[2:0]}`. Magnitudes 6
and 7 are outside the scheme and produce 0.

### 1.4 Code-based post-process (`ks_postprocess`, `ks_acc_bank`)

This is the part that needs the most thought. Each 32-coefficient product P_k
is cut into R_L = P[0..15] and R_H = P[16..31]. Where P_k ends up in the final
result, with sign, depends only on k. In the ring, the contribution of P_k is

    P_k · Π_layers f_layer(y),      y = x^16,  modulo y^16 + 1

The factor f_layer depends on the layer's digit and on the step
h = 1, 2, 4, 8 from the finest layer up:

* L: 1 − y^h
* H: y^2h − y^h
* M: y^h

Because these factors are all ±1 per power of y, every (sub-polynomial,
accumulator set) pair gets one of nine **instruction codes**:

| code | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| adds | — | +R_L | +R_H | −R_L | −R_H | +R_H+R_L | +R_H−R_L | −R_H+R_L | −R_H−R_L |

The coefficient of y^t selects R_L. The coefficient of y^(t−1) selects R_H.
For t = 0, the coefficient of y^15 is negated: this is the negacyclic wrap.

The 81 x 16 code table is computed at elaboration by `ks_pkg::map_code()`,
so no table is written out. Its first nine rows are checked in
`tb_ks_postprocess` against the table of the published design.

The two mappers feed one adder into the sixteen accumulator sets
acc_0 .. acc_15. Together these hold the 256 result coefficients. They are
already reduced, because arithmetic modulo 2^13 is just 13-bit wrap-around.

### 1.5 Controller: overlapping loads with multiplications (`ks_ctrl`)

The controller drives two streams at once:

* the **load stream:** four loads per group, and eight for group 8;
* the **multiply stream:** for each group, the register sets in the order
  R_1 R_2 R_3 R_4 R_7 R_8 R_9 R_5 R_6, two b parts per STM call, up to two
  calls per cycle.

A small scoreboard decides what may issue:

* A multiply on R_r waits until every group position that R_r holds has been
  loaded for the current group.
* A load for the next group at position m waits until every multiply of the
  current group on a set holding m has issued. It may issue in the same cycle
  as the last such read, because a read returns the old value.

R_5 and R_6 hold only g_2/g_3, so multiplying them last lets the next group
start overwriting g_0/g_1 early.

The multiply stream holds 136 STM calls, the work of 68 cycles of two calls.
The dependencies add a few single-call cycles. A product takes **75 cycles**
from `start` until the accumulators are final; the published design reports
82 cycles. After that, 16 more cycles copy the accumulators into the result
memory (`ks_result_mem`). `done` pulses when the result memory is valid.

### 1.6 Interface (`karatsaber_core`)

| port | meaning |
|---|---|
| `a_we, a_addr[3:0], a_wdata[207:0]` | write top-layer part a_i; coefficient j in bits 13j+12 : 13j |
| `b_we, b_addr[3:0], b_wdata[63:0]` | the same for b, 4 bits per coefficient |
| `start` | one-cycle pulse; ignored while `busy`, as are writes of a and b |
| `busy`, `done` | operation in progress / one-cycle pulse when the result is readable |
| `res_re, res_addr[3:0], res_rdata[207:0]` | read result word t (coefficients 16t..16t+15), data one cycle later |
| `mult_cycles`, `stall_cycles` | cycle count of the last product; cycles in which not both STM arrays issued |

Loading takes 16 cycles and is not counted in `mult_cycles`.

---

## 2. SK: the R-LWE multiplier

### 2.1 One Karatsuba layer, three schoolbook lanes

a and b are split into halves: `low` is coefficients 0..127 and `high` is
128..255. The design forms

* a_mid = a_low + a_high mod q,
* b_mid = b_low + b_high (a plain sum; b is small).

Three schoolbook products of 128 x 128 coefficients then run in parallel:
ab_low, ab_high and ab_mid. Each has 255 coefficients.

The core runs these stages one after the other:

| stage | module | cycles |
|---|---|---|
| karatsuba 1_1 (form a_mid, b_mid) | `k_split_prep` | 128 |
| prep_input (copy b_low to its own memory) | `k_split_prep` | 128 (+2) |
| spma (three schoolbook products) | `sk_spma_seq` + `sk` | 64 x 129 (+4) |
| karatsuba 1_2 + negacyclic | `k_combi_nega` | 256 (+2) |

The whole product takes **8780 cycles**; the published design reports 8787.

### 2.2 Two products per multiplier (`sk`, `sk_lane`)

Each lane multiplies one coefficient a[i] by a **pair** of b coefficients,
b[2k] (even) and b[2k+1] (odd). It does this with a single 25x18-bit multiply
of a against `{b_E, 13'b0, b_O}`. The low 19 bits of the product are
a·b_O and the high bits are a·b_E. No carry can cross, because
a·b < 2^19.

The products go to these coefficients:

* a[i]·b[2k] belongs to coefficient i+2k.
* a[i]·b[2k+1] belongs to coefficient i+2k+1, which is also the target of the
  next step's even product a[i+1]·b[2k].

So each lane keeps the odd product in a register and adds it to the next even
product. One sum per step is then written back:

* `first` (i = 0) suppresses the carried-in odd product.
* A flush step `last` (i = 128) writes the final odd product alone.

Each step adds the partial sum of its coefficient read back from memory
(`inStack`), when an earlier pair already wrote that coefficient. The 20-bit
sum is reduced mod 7681 by `barrett_reduce`, which uses k = 26 and m = 8736.
Its quotient estimate is off by at most one for inputs below 2^20, so one
conditional subtraction suffices.

A lane has two register stages. The partial sum arrives one cycle after the
operands, and the result is valid two cycles after them.

### 2.3 Read-modify-write sequencing (`sk_spma_seq`)

The sequencer walks the pairs (outer loop, k = 0..63) and i = 0..128 (inner
loop). Each step has a fixed timeline:

* cycle t: read a[i], and the b pair at i = 0.
* cycle t+1: lane operands valid, and the read of partial sum ab[i+2k].
* cycle t+3: write back.

`stack_en` is low where a coefficient is written for the first time: k = 0, or
i+2k beyond the previous pass's range. The product memories therefore need
no clearing. Consecutive passes overlap by 127 coefficients. A pass's
write-back of coefficient c always lands before the next pass reads c.

### 2.4 Recombination fused with the wrap (`k_combi_nega`)

From ab = ab_low + x^128·(ab_mid − ab_low − ab_high) + x^256·ab_high and
x^256 = −1, result coefficient i, with j = (i + 128) mod 256, is

    i <  128:  (ab_low[i] − ab_high[i]) − (ab_mid[j] − ab_high[j] − ab_low[j])
    i >= 128:  (ab_low[i] − ab_high[i]) + (ab_mid[j] − ab_high[j] − ab_low[j])

all modulo q. Index 255 of a half product does not exist and reads as zero.
The stage uses two read ports on ab_low and ab_high and one on ab_mid, and
produces one coefficient per cycle.

### 2.5 Memories and interface (`sk_bram`, `sk_rlwe_core`)

Every memory is an `sk_bram`: one synchronous write port and two synchronous
read ports with enables. The core has nine of them:

* a and b;
* a_mid, b_mid, and the b_low copy;
* ab_low, ab_high, ab_mid;
* the result.

| port | meaning |
|---|---|
| `a_we, a_addr[7:0], a_wdata[12:0]` | write a[i] (< 7681) |
| `b_we, b_addr[7:0], b_wdata[5:0]` | write b[i] (0..31) |
| `start`, `busy`, `done` | as for KaratSaber; writes are ignored while busy |
| `res_re, res_addr[7:0], res_rdata[12:0]` | read result coefficient, one cycle latency |
| `cycles` | start-to-done cycle count |

---

## 3. Where this RTL departs from the published design

* **KaratSaber load schedule.** The published design uses a fixed input
  sequence table. Here, a scoreboard issues loads and multiplies as soon as
  their data allow, in a fixed group and register order. It reaches 75 cycles
  rather than 82.
* **KaratSaber code table.** The table is generated from the Karatsuba algebra.
  Only its first nine rows could be compared with the published table; they
  agree. The final products are checked against schoolbook multiplication.
* **KaratSaber result memory.** The result memory's width (16 coefficients per
  word) and its fill timing are this design's choices.
* **SK operand b.** b is unsigned and below 32. The published design mentions a
  6-bit field with a sign bit for error values, but not how signed values pass
  through the packed DSP multiply. **Signed b is not supported.**
* **SK recombination indices.** The recombination takes the mid term at index
  (i + 128) mod 256, as the derivation requires: result coefficient 0 needs
  ab_newmid[128].
* **Names and constants.** The recombination module is named `k_combi_nega`.
  The Barrett constants, pipeline depths, memory organisation and start/done
  handshakes are this design's choices.
* **Not modelled.** Neither the key-exchange / KEM protocols around the
  multipliers nor the matrix-vector accumulation of Saber is modelled.

## 4. Verification

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_lbc_pm_top` | both cores at default size, started together, twice. Results are checked against schoolbook negacyclic products and cycle counts against 82 and 8787. It also counts every mechanism: load/multiply overlap, overwrite and accumulate loads, dual issue, zero-padded calls, idle slots, negative secrets, all eight non-zero codes, ignored start, SK partial-sum read-back, first/last steps, both halves of the wrap, both cores busy at once |
| `tb_karatsaber_core`, `tb_sk_rlwe_core` | each core alone, with extreme and random operands; KaratSaber with each of the secret ranges [-3,3], [-4,4] and [-5,5] of the three Saber security levels |
| `tb_ks_ctrl` | every multiply reads a register set holding exactly the right sum of a parts. Every sub-polynomial meets each of its b parts exactly once, in 136 calls and at most 82 cycles |
| `tb_ks_postprocess` | the first nine code rows against the published table, and every delta against its code |
| `tb_ks_stm`, `tb_ks_mult`, `tb_ks_preprocess`, `tb_ks_acc_bank`, `tb_ks_result_mem` | units against models |
| `tb_sk`, `tb_sk_spma_seq`, `tb_k_split_prep`, `tb_k_combi_nega`, `tb_barrett_reduce`, `tb_sk_bram` | units against models. The Barrett test is exhaustive over all 2^20 inputs. The stage lengths are checked |

To run one with Verilator (packages first):

    verilator --binary --timing rtl/ks_pkg.sv rtl/sk_pkg.sv rtl/*.sv \
        tb/tb_lbc_pm_top.sv --top-module tb_lbc_pm_top -o sim
    ./obj_dir/sim

The full-size top test runs in well under a second of simulation time. The
simulator has two states, so every register that is read is reset.

## 5. Files

* `rtl/ks_pkg.sv`: KaratSaber types, constants, group schedule and
  code-table function.
* `rtl/sk_pkg.sv`: SK types, constants and modular add/sub.
* `rtl/lbc_pm_top.sv`: the top.
* The other files in `rtl/` are one module each, named as above.
