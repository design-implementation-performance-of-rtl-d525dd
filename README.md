# Vedic (Urdhva Tiryakbhyam) multipliers, 2 to 16 bits

Unsigned combinational multipliers built the "vertically and crosswise" way
(Urdhva Tiryakbhyam, a multiplication rule from Vedic mathematics). An N-bit
product is formed from four N/2-bit products. The "vertical" ones are low×low
and high×high. The "crosswise" ones are high×low and low×high. The four are then
summed in columns. Applied recursively, this gives a tree with a 2×2 element at
the bottom and 4-, 8- and 16-bit multipliers above it. The adders that sum the
partial products come in two builds: a ripple-carry adder (the default) and a
Kogge-Stone parallel prefix adder (shorter carry path).

Nothing is clocked. There are no registers and no reset. A product is valid one
propagation delay after its operands change.

## The 2×2 element (`vedic_mult2`)

Four AND gates form `a0b0`, `a1b0`, `a0b1` and `a1b1`. Then:

| product bit | source |
|---|---|
| `p[0]` | `a0b0` (vertical) |
| `p[1]` | sum of half adder 1 on the two crosswise terms `a1b0`, `a0b1` |
| `p[2]`, `p[3]` | sum and carry of half adder 2 on `a1b1` (vertical) and half adder 1's carry |

## Building N bits from N/2 (`vedic_mult4`, `vedic_mult8`, `vedic_mult16`)

This is the part of the design that needs the most care. Let H = N/2. Split the
operands as `a = {aH, aL}` and `b = {bH, bL}`. Four H×H Vedic multipliers give

    q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH        (each 2H bits)

and a*b = q0 + (q1 + q2)·2^H + q3·2^2H. The design sums these with exactly three
adders, which are N, 3N/2 and 3N/2 bits wide (4/6/6, 8/12/12 and 16/24/24):

    t1 = q1 + (q0 >> H)            N-bit adder
    t2 = q2 + (q3 << H)            3N/2-bit adder
    t3 = t1 + t2                   3N/2-bit adder
    p  = {t3, q0[H-1:0]}

The low H bits of q0 go straight to the product. The rest of q0 joins the first
crosswise product. The second crosswise product joins the high vertical product,
shifted one half-width up. Nothing overflows, so every adder's carry-in is 0 and
its carry-out stays 0. An assertion in each multiplier checks that:

- t1 ≤ (2^H−1)² + 2^H−1 < 2^2H
- t2 ≤ (2^H−1)²·(2^H+1) < 2^3H
- t3 = ⌊a·b / 2^H⌋ < 2^3H

The design fixes how many adders there are and how wide each one is. Which partial
products go into which adder is this implementation's choice. It is the
assignment that fits those widths. The 16-bit multiplier holds 4 8×8,
16 4×4 and 64 2×2 elements, plus 3 + 12 + 48 adders.

Every multiplier above 2×2 has a parameter
`ADDER` (`vedic_pkg::adder_kind_e`, `ADDER_RCA` by default, or `ADDER_KSA`). It
is passed down the tree, so one setting selects the adder type for the whole
multiplier. `vedic_adder` is the small wrapper that makes this selection.

## The two adders

**`rca_adder #(N)`**: N `full_adder` cells in a chain. Each carry-out is the next
cell's carry-in. The delay grows linearly with N. The default N = 4.

**`ks_adder #(N)`**: a Kogge-Stone prefix adder in three stages. The delay
grows with log2 N. The default N = 16.

1. Pre-processing: `p = x ^ y` and `g = x & y` for each bit.
2. Prefix network: ceil(log2 N) levels. At level k (span d = 2^(k−1)), each
   bit i ≥ d combines with bit i−d:
   `G = G[i] | (P[i] & G[i−d])` and `P = P[i] & P[i−d]`.
   Bits below d pass through unchanged. After the last level, bit i holds the
   group generate and propagate of bits i..0.
3. Post-processing: `c[i] = G[i−1] | (P[i−1] & cin)` with `c[0] = cin`.
   Then `s[i] = p[i] ^ c[i]` and `cout = c[N]`.

The multipliers also need widths that are not powers of two (6, 12 and 24). The
same network handles them.
Both adders have a carry-in port so they can be used on their own. The
multipliers tie it to 0.

## Top level (`vedic_top`)

The top holds two 16×16 multipliers that share the inputs `a[15:0]` and
`b[15:0]`:

| output | built with | notes |
|---|---|---|
| `p_rca[31:0]` | ripple-carry adders | the main configuration |
| `p_ksa[31:0]` | Kogge-Stone adders | the faster alternative |

Both outputs equal a·b. Keep only one instance if you need only one build.

## Reference figures

The ripple-carry build was originally implemented on a Xilinx Spartan-6
(XC6SLX45, CSG324 package, speed grade −3). These are the figures reported for it.
They have not been reproduced with this RTL.

| multiplier | delay (ns) | logic levels | slice LUTs |
|---|---|---|---|
| 2-bit | 6.494 | 4 | 6 |
| 4-bit | 7.942 | 5 | 7 |
| 8-bit | 18.270 | 15 | 121 |
| 16-bit | 27.278 | 23 | 656 |

## Where this RTL goes beyond the source description

- The source gives only the gate counts of the 2×2 element. The wiring shown
  above is the standard one.
- The source gives only the first level of the Kogge-Stone network, and it gives
  the sum equation. The deeper levels, the carry-in and `cout` follow the usual
  Kogge-Stone form.
- The full adder and half adder use textbook equations.
- The source lists the 8-bit multiplier's adders as "8 bit, 12 bit". Here the
  third adder is also 12 bits, following the 4/6/6 and 16/24/24 pattern of
  the other sizes.
- All operands are unsigned. Signed multiplication is not described.
- The ripple-carry build is the default because that is the build the figures
  above describe.
- Putting both builds side by side in `vedic_top` is this implementation's
  choice.
- The adder carry-outs are provably always 0 (see the bounds above). An
  immediate assertion in each multiplier checks this in simulation.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
outputs with integer arithmetic done in the testbench and ends with
`TB_RESULT checks=N failures=M`:

| testbench | what it runs |
|---|---|
| `tb_half_adder`, `tb_full_adder` | every input combination |
| `tb_rca_adder` | 4-bit exhaustively, including carry-in; 24-bit with carry-chain corners and 20,000 random sums |
| `tb_ks_adder` | 6-bit exhaustively; 16-bit with corners and 20,000 random sums |
| `tb_vedic_mult2` | all pairs, plus the reference vectors `01·10`, `10·11` and `10·10` |
| `tb_vedic_mult4` | all pairs in both adder builds, plus the reference vectors `0001·1010`, `0010·1010`, `0100·1010` and `1111·1111` |
| `tb_vedic_mult8` | all 65,536 pairs in both builds, plus the reference vector `FF·FF = FE01` |
| `tb_vedic_mult16` | corners, walking-one × walking-zero patterns and 100,000 random pairs in both builds |
| `tb_vedic_top` | the top at full size; details below |

`tb_vedic_top` compares both outputs with a·b and with each other. It also counts
how often each of these cases happened, and fails if any never did:

- a zero operand
- all-ones squared
- a middle column that carries into the high product
- a carry out of the low half of `t1`

The 2^32 operand space of the 16-bit multiplier is sampled, not exhausted.

Run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv tb/tb_vedic_top.sv --top tb_vedic_top
    ./obj_dir/Vtb_vedic_top

Swap in another `tb_*` name to run the others. The package must come first. The
other modules are found through `-Irtl`. Each testbench finishes in seconds.
