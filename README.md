# Fast, power-aware RNS reverse converters from hybrid parallel-prefix adders

A residue number system (RNS) represents a number X by its remainders
modulo a few pairwise co-prime moduli. Addition and multiplication then run in
independent, short, carry-free channels, but getting back to ordinary binary
(the *reverse conversion*) is the expensive step. A reverse converter is a
chain of modulo 2^k-1 additions and a final regular addition over many bits,
and the adder chosen for those additions sets its delay.

Ripple-carry adders there are small and frugal but slow. Full parallel-prefix
adders are fast but burn much more power. This design sits between the two.
It keeps prefix adders where they matter and uses two hybrid adders:

* **HMPE** (hybrid modular parallel-prefix excess-one adder). A modulo 2^k-1
  adder made of a plain prefix adder and a cheap *conditional* +1 stage. The
  +1 stage also makes zero have one code only.
* **HRPX** (hybrid regular parallel-prefix XOR/OR adder). A regular adder for
  the case where one operand's upper bits are all constant ones. Only the
  variable bits get a prefix adder; the constant-one bits need just an OR
  chain and XNOR gates.

Three complete reverse converters are built from these parts. All are
purely combinational SystemVerilog, and n = 5 by default.

| converter | moduli set | output | adders used |
|---|---|---|---|
| `reverse_converter1` | {2^n-1, 2^n, 2^n+1, 2^(2n+1)-1} | 5n+1 bits | 2 CSA + HMPE(2n), CSA + HMPE(2n+1), HRPX(4n+1) |
| `reverse_converter2` | {2^n-1, 2^n+1, 2^2n, 2^(2n+1)-1} | 6n+1 bits | 2 CSA + HMPE(2n), CSA + HMPE(2n+1), HRPX(4n+1) |
| `reverse_converter3` | {2^n-1, 2^n+1, 2^2n, 2^2n+1} | 6n bits | 4 CSA + HMPE(4n) |

`rns_prefix_top` instantiates the three side by side. They share nothing;
each has its own residue inputs (`cK_x1` … `cK_x4`, in the order of its
moduli set) and binary output `cK_x`.

## The HMPE adder: modulo 2^k-1 with a single zero

For operands a, b in 0 … 2^k-1, the sum modulo 2^k-1 is the raw k-bit sum
a+b, plus one whenever a+b ≥ 2^k-1. There are two ways to reach that
threshold, and the prefix adder already computes both signals:

* `cout`: a+b ≥ 2^k. The carry out of bit k-1 is worth 2^k ≡ 1, so 1 must be
  added back (this is the classic end-around carry).
* `p_all`: a+b = 2^k-1 exactly, which means every bit propagates (a XOR b is
  all ones). The raw sum is then the all-ones pattern, which is a second code
  for zero. Adding 1 wraps it to 0.

So `inc = cout | p_all`, and the `excess_one_unit` computes y = s + inc. Its
bit i toggles when `inc` is set and all bits of s below i are one. Those AND
terms come from a log-depth prefix tree, so the correction costs about
log2 k AND levels plus one XOR. An end-around-carry adder would instead
recirculate the carry through the prefix network, either as an extra prefix
level with heavy fan-out or as a second pass, and would still leave the
double zero.

The result is always in 0 … 2^k-2. The one input pair this scheme gets wrong
is a = b = 2^k-1 (both operands the all-ones code of zero): the output is
2^k-1 instead of 0. None of the converters here produces that pair. All three converters
are checked exhaustively at n = 3 and n = 4, and on random inputs above that.

`hmpe_adder` = `prefix_adder` (cin = 0) + `excess_one_unit`.

## The HRPX adder: a regular adder with a constant-ones operand

`hrpx_adder #(W, K)` computes `a + {(W-K) ones, b} + cin`. That operand shape
appears when a short value v is subtracted from a long one:
a - v = a + {ones, ~v} + 1.

* Bits K-1 … 0 are a normal K-bit prefix addition. It produces the carry
  `c_lo` into bit K.
* In bits W-1 … K the second operand bit is 1. There, generate = a[i] and
  propagate = ~a[i], so the carry recurrence collapses to
  c[i+1] = a[i] | c[i], and the sum bit is a[i] XNOR c[i].
  The carries are the OR of `c_lo` with the a bits below. They are built as
  an OR prefix tree.

No full-width prefix adder is needed, and no ripple chain of full adders.

## How the converters are assembled

Every converter follows the same recipe:

1. Each multiplicative inverse needed by the Chinese remainder theorem
   (CRT) or by mixed-radix conversion is a power of two, up to sign.
2. Multiplying by 2^j modulo 2^m-1 is a left rotation by j.
3. Negation modulo 2^m-1 is bitwise complement.

So every term becomes a rotated, possibly complemented, copy of a residue,
with no multipliers. The terms go through carry-save adders with end-around
carry (`csa_eac`: the carry vector rotates instead of shifting) and one HMPE
adder. Below, `rot(v, j)` is a left rotation on the datapath width, and
`~` is complement on that width.

In the formulas, the residue names follow each converter's port order.

### Converter-3: {2^n-1, 2^n+1, 2^2n, 2^2n+1}

Let M' = 2^4n - 1 = (2^n-1)(2^n+1)(2^2n+1). The residue x3 (modulo 2^2n) is
the low 2n bits of X. The rest is

    Y = | 2^2n · (X mod M' − x3) |_M'        (2^2n is its own inverse mod M')

X mod M' comes from the CRT over the three odd moduli. The inverses are
2^(n-2), 2^(n-2) and 2^(2n-1). Folding the factor 2^2n in gives six 4n-bit
operands:

    rot({x1,x1,x1,x1}, 3n-2)
    rot(w2, 4n-2), rot(~w2, 3n-2)       w2 = x2 + x2·2^2n
    rot(x4, 2n-1), rot(~x4, 4n-1)
    rot(~x3, 2n)

They pass through four CSAs with end-around carry (6 → 2) and one 4n-bit
HMPE. The output is `{Y, x3}`, with no final regular adder. At n = 5 this is
the 20-bit modulo 2^20-1 prefix adder that the original design was
demonstrated with.

### Converter-2: {2^n-1, 2^n+1, 2^2n, 2^(2n+1)-1}

1. Y = |Z − x3| modulo 2^2n-1, where Z is the CRT value over 2^n±1 (both
   inverses are 2^(n-1)). The operands are `rot({x1,x1}, n-1)`,
   `rot(x2, 2n-1)`, `rot(~x2, n-1)` and `~x3`. Two CSAs and a 2n-bit HMPE
   give Y. Then X' = {Y, x3} is X modulo 2^2n(2^2n-1).
2. The mixed-radix digit for m4 = 2^(2n+1)-1. Modulo m4 the inverse of
   2^2n(2^2n-1) is −4, so k = |4(X' − x4)|_m4. X' is folded into two
   (2n+1)-bit chunks. The chunks and `~x4`, each rotated by 2, go through one
   CSA and a (2n+1)-bit HMPE.
3. X = x3 + 2^2n·R, where R = Y + k(2^2n−1) = {k, Y} − k. This is exactly
   the HRPX case: {k,Y} + {2n ones, ~k} + 1, with W = 4n+1 and K = 2n+1.
   The output is `{R, x3}`.

### Converter-1: {2^n-1, 2^n, 2^n+1, 2^(2n+1)-1}

This is the same three steps, with x2 (modulo 2^n) as the low n bits:

* Y = |2^n(Z − x2)| modulo 2^2n-1. The operands are `rot({x1,x1}, 2n-1)`,
  `rot(x3, n-1)`, `rot(~x3, 2n-1)` and `rot(~x2, n)`.
* X' = {Y, x2}.
* k = |2^(n+2)(X' − x4)|_m4, since the inverse of 2^n(2^2n−1) is −2^(n+2).
* R = {k,Y} − k through the HRPX.
* The output is `{R, x2}`.

The final HRPX's carry-out is always 1, because the difference is never
negative. It is left unconnected.

## Prefix networks

`prefix_adder` implements three carry networks, selected by the `NET`
parameter (type `prefix_pkg::prefix_net_e`). All converter and adder modules
pass `NET` down:

* `PFX_BK`, Brent-Kung (the default): an up-sweep tree and a down-sweep,
  2·log2 W − 1 levels, fan-out 2, fewest cells.
* `PFX_SK`, Sklansky: log2 W levels, fan-out doubling per level.
* `PFX_KS`, Kogge-Stone: log2 W levels, fan-out 2, most cells.

The original work characterised HMPE variants with all three networks. It
selected Brent-Kung for its low fan-out. Widths that are not powers of two
are padded internally.

## Interfaces and timing

Every module is combinational: no clock, no reset, no registers.

Inputs are residues in 0 … m−1 of their modulus:

* A 2^k+1 residue is k+1 bits wide (it can equal 2^k).
* A 2^k−1 residue is k bits wide. The all-ones code is also accepted as zero.

A converter's latency is its combinational delay. In order, that delay is:

1. the CSA levels (2 to 3);
2. the HMPE: a prefix adder plus the excess-one stage;
3. for Converter-1 and Converter-2 only, a second CSA and HMPE, followed by
   the HRPX.

To pipeline a converter, place registers on the `y`, `k` or operand signals
between those stages.

Parameters (defaults in brackets):

* `N` [5]: the moduli-set parameter n, for converters and top. Use n ≥ 2;
  Converter-1 needs n ≥ 2 for its chunk split. Table-level sizes used when
  the design was characterised were n = 4, 8, 12 and 16; all of them are
  exercised by the testbenches.
* `NET` [`PFX_BK`]: the prefix network.
* `W`, `K`: widths for the stand-alone components (the HMPE defaults to
  W = 20 = 4n).

## Where this RTL departs from the original description

* **Conversion formulas.** The original description gives the three moduli
  sets and the design method: CSA trees with end-around carry, HMPE for
  modulo 2^k−1 carry-propagate additions, and HRPX for a regular adder whose
  operand has constant ones. It does not give the converters' equations. The
  formulas above are derived here from the CRT and mixed-radix conversion.
  They apply that method, but they are not necessarily the exact published
  architectures. In particular, constant-bit simplifications of the operands
  are left to synthesis.
* **Excess-one unit gates.** The gate-level structure of the modified
  excess-one unit is this design's own (an AND-prefix incrementer). Only its
  function (a conditional increment driven by the prefix carry and propagate
  signals) is taken from the original.
* **HRPX.** Two choices are this design's own: the constant ones sit in the
  upper bits, and their carries form an OR prefix tree. The stand-alone
  default widths (W = 20, K = 10) are also arbitrary. Inside the converters
  the widths are 4n+1 and 2n+1.
* **HMPE corner case.** The HMPE does not handle the operand pair
  (2^k−1, 2^k−1), as explained above.
* **Not included.** The comparison baselines (ripple-carry converters and
  converters built entirely from prefix adders, including Type-I prefix
  modulo 2^n−1 adders) are not included. Power, area and delay figures are
  not reproduced: this is RTL only.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a time-out watchdog. Reference values
come from plain integer arithmetic, not from the RTL:

* `tb_prefix_adder`: BK, SK and KS at 20 bits, BK at 13 bits (padding), and
  BK at 8 bits exhaustively; checks sum, carry and `p_all`.
* `tb_excess_one_unit`: runs of trailing ones and random values at 20 bits;
  exhaustive at 8 bits.
* `tb_hmpe_adder`: all three networks at 20 bits, with directed sums at and
  around 2^k−1; exhaustive at 8 bits. It requires that each correction path
  (carry-out, all-propagate, none) occurs.
* `tb_hrpx_adder`: random and long-carry cases, and use as an a − v
  subtractor; exhaustive at W = 9, K = 4.
* `tb_csa_eac`: checks the modular identity at 20 bits; exhaustive at 3 bits.
* `tb_reverse_converter1/2/3` (with the helper `conv_harness`): each builds
  residues from a known X and compares the output to X.
  * All three cover their full range at n = 3 and n = 4 (up to 33 million
    numbers for Converter-2 at n = 4).
  * n = 5 runs with all three networks.
  * n = 8, 12 and 16 run on corner values plus random numbers.
* `tb_rns_prefix_top`: runs the top at its default parameters.
  * For each converter: all X below 4096, M−1, M−2, and 30 000 random
    numbers.
  * It counts how often each mechanism fired and fails if one never did:
    each HMPE correction path, the HRPX carry into its constant-one part
    (present or absent), and top-code residues 2^k of the 2^k+1 moduli.

To run a test with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/prefix_pkg.sv \
        tb/tb_rns_prefix_top.sv --top-module tb_rns_prefix_top
    ./obj_dir/Vtb_rns_prefix_top

Replace the testbench name to run any other one. Verilator finds the modules
each test needs through `-I`. `tb_reverse_converter2` is the longest: about
34 million vectors, under a minute.

## Files

* `rtl/prefix_pkg.sv`: the network enum and a level-count helper.
* `rtl/prefix_adder.sv`, `rtl/excess_one_unit.sv`, `rtl/hmpe_adder.sv`,
  `rtl/hrpx_adder.sv`, `rtl/csa_eac.sv`: the adder components.
* `rtl/reverse_converter1.sv`, `rtl/reverse_converter2.sv`,
  `rtl/reverse_converter3.sv`: the converters.
* `rtl/rns_prefix_top.sv`: the top.
* `tb/`: the testbenches and `conv_harness.sv`.
