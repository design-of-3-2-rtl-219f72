# Ternary (3,2) and (4,2) counters and the multiplier trees built from them

Combinational multipliers spend most of their hardware in the reduction tree:
the array of counters that squeezes the partial products down to two rows for
a final adder. This design builds that tree for base-3 arithmetic. Its main
cells are two ternary counters built from ternary multiplexers:

* a **(3,2) counter**: a ternary full adder whose carry-in and carry-out may
  be 0, 1 or 2 (`a + b + cin = sum + 3*cout`);
* a **(4,2) counter** derived from it (`x1 + x2 + x3 + x4 = sum + 3*cout`),
  which holds log2(9) = 3.17 bits of information, about as much as a binary
  (7,3) counter.

From these cells the RTL builds an 8 x 8 trit Wallace-tree multiplier. Beside
it, for comparison, it builds the binary design of the same capacity: a
(7,3) counter made of full adders (in 14- and 28-transistor styles), and a
12 x 12 bit Wallace multiplier built from it. The original cells are CNTFET
transistor circuits, where a trit is one of three voltages (0, Vdd/2, Vdd).
This RTL keeps their multiplexer structure and their fixed-level signals.
It represents each trit as a 2-bit code.

Everything is combinational: no clock, no reset and no state.

## Trits in RTL

`ternary_pkg` defines `trit_t` (`logic [1:0]`) and the three levels
`T0`, `T1`, `T2` (ground, Vdd/2, Vdd). Code 3 is never produced. Multi-trit
words pack trit *i* in bits `[2i+1:2i]`, least significant trit first.

The circuits decode a trit with two ternary inverters (`trit_detect`):

| trit | n (NTI, "An") | p (PTI, "Ap") |
|------|---------------|---------------|
| 0    | 1             | 1             |
| 1    | 0             | 1             |
| 2    | 0             | 0             |

Each ternary block is built from these two signals:

* `mux3_t`: a 3-input multiplexer with a ternary control. Input `i0` is
  selected when `n` is high, `i1` when `n` is low and `p` is high, and `i2`
  when `p` is low, as with the transmission-gate paths of the circuit.
* `trit_succ`: the successor circuits `A^1 = (A+1) mod 3` and
  `A^2 = (A+2) mod 3`. Each output picks a level from `n`, `p` and their
  complements.
* **Fixed-level signals.** An inverter on `n` or `p` whose supply is Vdd/2,
  or whose rails are Vdd and Vdd/2, gives a trit that depends only on
  whether A is 0 or 2. The names give the output for A = 0, 1, 2:
  `A001`, `A011`, `A112`, and for the (4,2) counter `X1-122`.

## The (3,2) counter (`tcnt32`)

Two ranks of `mux3_t`:

1. Controlled by **B**, six multiplexers form the sum and the carry for each
   possible carry-in k:

   | output | B = 0 | B = 1 | B = 2 |
   |--------|-------|-------|-------|
   | Sum0   | A     | A^1   | A^2   |
   | Sum1   | A^1   | A^2   | A     |
   | Sum2   | A^2   | A     | A^1   |
   | Cout0  | 0     | A001  | A011  |
   | Cout1  | A001  | A011  | 1     |
   | Cout2  | A011  | 1     | A112  |

2. Controlled by **cin**, two multiplexers pick `Sum_cin` and `Cout_cin`.

B drives the first rank, so it has the longest path. A carry of 2 comes out
only for 2+2+2.

## The (4,2) counter (`tcnt42`)

A (3,2) counter adds x2, x3 and x4 into S0 and C0, where C0 can be 2. Then:

* `sum = (S0 + x1) mod 3`: one multiplexer controlled by x1 picks S0,
  S0^1 or S0^2.
* `cout`: two multiplexers controlled by S0 give the carry for C0 = 0, with
  inputs (0, X1-001, X1-011), and for C0 = 1, with inputs (1, X1-112,
  X1-122). A last multiplexer controlled by C0 picks one of those two or
  the fixed level 2. C0 = 2 only occurs with S0 = 0.

The (3,2) counter's inputs are wired x4 → A, x2 → B and x3 → cin. That
choice is this RTL's own; the counter gives the same result whichever input
goes where.

## The ternary multiplier tree (`tmul_wallace`, N = 8)

**Partial products.** A one-trit multiplier (`tmul1`) gives a product
trit and a carry trit, because 2 x 2 = 4 = "11" in base 3. So an N x N trit
multiplier starts with **2N rows** (row 2j: products of b[j]; row 2j+1: their
carries), where a binary one has N rows. That doubling is the main cost of
the ternary tree.

**Reduction in bands of four rows.** Each stage cuts the rows into bands of
four and reduces every band to a sum row S and a carry row K. A band column
with k trits:

| k | cell | outputs |
|---|------|---------|
| 4 | (4,2) counter | sum → S[c], carry (0..2) → K[c+1] |
| 3 | (3,2) counter | sum → S[c], carry → K[c+1] |
| 2 | none, or a ternary half adder (`tha`) if a carry already took K[c] | S[c], K[c] / S[c], K[c+1] |
| 1 | none | S[c] |

For N = 8 the rows go 16 → 8 → 4 → 2 in three stages. A ripple adder then
adds the last two rows: a half adder in the lowest column that holds two
trits, then (3,2) counters.

Cell counts for N = 8. The RTL counts are also exported as localparams
(`TC42_COUNT`, `TC32_COUNT`, `THA_COUNT`, `STAGE_COUNT`):

| | stage 1 | stage 2 | stage 3 | final adder | total |
|---|---|---|---|---|---|
| (4,2), this RTL | 24 | 12 | 5 | – | 41 |
| (3,2), this RTL | 8 | 4 | 4 | 12 | 28 |
| half adders, this RTL | 0 | 4 | 3 | 1 | 8 |
| (4,2), reference dot diagram | 24 | 14 | 7 | – | 45 |
| (3,2), reference dot diagram | 8 | 2 | 1 | 12 | 23 |

In the reference design, the dot diagram totals 45 (4,2) counters. Its
summary table gives 48 (4,2), 23 (3,2) and 4 half adders. The first stage and
the 12-counter final adder match exactly. Later stages differ because the
reference moves trits between rows in ways it does not spell out.
This RTL follows the fixed rule above instead. The layout is computed at
elaboration by constant functions, so `N` can be changed freely.

## The binary side

* `fa14t`: `x = a^b`, `sum = x^c`, `cout = x ? c : a`.
* `fa28t`: the mirror adder. `cout_n = ~(ab + c(a+b))`,
  `sum_n = ~(abc + cout_n(a+b+c))`, then an inverter on each.
* `bfa`: picks one of the two full adders with `FA_STYLE` (0 = 14T, 1 = 28T).
* `bcnt73`: the (7,3) counter built from four full adders:
  (x0,x1,x2)→S0,C0; (x3,x4,x5)→S1,C1; (S0,S1,x6)→out0,C2; (C0,C1,C2)→out1,out2.
* `bha`: half adder.
* `bmul_wallace` (N = 12): AND-gate partial products and a tree built column
  by column:
  * groups of seven bits go to (7,3) counters;
  * groups of three from the rest go to full adders;
  * in the last stage, a half adder is used where a 2-bit column also
    receives a carry;
  * a ripple final adder finishes.

  For N = 12 this gives 4 stages, 12 (7,3), 77 (3,2) and 8 half adders. The
  reference design reports 27 (7,3), 26 or 46 (3,2) and 1 half adder for its
  own hand-drawn tree. The tree here shows the cells working; it is not a
  copy of that layout.

`cnt_mult_top` places the ternary multiplier (`TN = 8`) and the binary
multiplier (`BN = 12`, `FA_STYLE = 0`) side by side. They share no signals.

## What is from the reference design and what is not

From the reference:
* the MUX structure of the (3,2) and (4,2) counters, the successor
  circuits and the fixed-level signals;
* the 14T and 28T full adders and the four-adder (7,3) counter;
* the one-trit multiplier's function, the four-row band stages, and the
  8-trit / 12-bit sizes.

Choices of this RTL:
* the 2-bit trit code;
* the internal circuits of the ternary half adder and the one-trit
  multiplier (the reference gives only their function);
* the exact cell placement rules of both trees;
* ripple-carry final adders (the reference only asks for "a fast adder");
* the 14T default for `FA_STYLE`.

Not modelled: anything analog. That covers transistor sizes, the Vdd/2
supply, delays, power and noise margins. The reference design's results
(critical-path delays, power-delay products, chip area) are all
circuit-level and have no RTL counterpart.

## Simulating

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints one `TB_RESULT checks=N failures=M` line. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ternary_pkg.sv \
    tb/tb_cnt_mult_top.sv --top-module tb_cnt_mult_top -Mdir obj
./obj/Vtb_cnt_mult_top
```

Testbenches, each checked against values worked out independently:
* **Small cells** (decoder, successor, MUX, counters, adders): exhaustive.
* **`tb_tcnt42`**: also walks the counter's printed truth table and the
  critical-path input sequence (x1=0, x3=x4=1, x2 = 0,1,2,1,0 → sum 2,0,1,0,2).
* **Multipliers**: several thousand random operands plus corner cases,
  checked against integer products.
* **`tb_cnt_mult_top`**: runs both multipliers at full size. It counts how
  often a one-trit carry, a (4,2) carry of 2, a half-adder carry, a carry
  through the final adder and a (7,3) count of 4 or more occur. It fails if
  any of them never occurs.
