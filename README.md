# Universally testable PLA

A programmable logic array (PLA) normally needs a test set generated for the
particular function it is programmed with. This design adds a small amount of
hardware to a NOR-NOR PLA so that one **fixed test sequence**, which depends only
on the array's size and not on its programmed function, detects its faults:
stuck lines, missing or extra crosspoint devices, and shorts between adjacent
lines. Any single row and any single column of the AND array can be made
active on its own. Each crosspoint can then be observed on its own.

The design comes in two forms that share one structure:

* **Multiple-fault form** (`aug_pla_multi`). The fixed sequence detects any
  combination of faults. The correct responses still depend on the
  programmed function and have to be compared by a tester. They are easy to
  derive from the personality (the crosspoint map).
* **Single-fault form** (`aug_pla_single`). Under a single-fault model, the
  *responses* are function-independent too. One extra column has its devices
  placed so that certain device counts are odd. The response can then be
  compressed by a parity counter on every output and checked against a
  handful of reference bits. This makes a cheap built-in self test
  (`tpg` + `parity_bist`).

`upla_top` builds both forms over the same personality. Each form has its own
on-chip pattern generator. The single-fault form also has the self-test
checker.

The RTL describes the logic of the arrays, not the NMOS transistors. A
crosspoint "device" is one bit of a personality parameter.

## The base PLA and its numbering

The PLA has `N` inputs, `M` product terms and `L` outputs. It uses one-input
decoders, so each input `x[i]` drives two AND-array rows:

| row | carries | high when (normal use) |
|-----|---------|------------------------|
| `q[2i]`   (Q(2i-1) in 1-based terms) | complement literal | `x[i] = 0` |
| `q[2i+1]` (Q(2i))                    | true literal       | `x[i] = 1` |

Product line `p[j]` is high when none of the rows that carry a device on it
is high (a NOR), so a device on `q[2i]` puts the literal `x[i]` into the
product. Output `f[g]` is the OR of the products that have a device on its
row. Indices in the RTL are zero-based. The text below uses the 1-based
names Q(1..2N), P(1..), F(1..L) where that reads better.

Default size: `N = 60`, `M = 200`, `L = 60`. The default personality is a
fixed pseudo-random one (`pla_pkg::def_and_lit` and `def_or_bit`). Each
product leaves half of the inputs as don't-care and uses a quarter of them in
true form and a quarter in complemented form. Each product feeds an output
with probability 1/4. To program your own function, override `AND_PERS`
(`[M-1:0][2N-1:0]`, one word of row bits per product) and `OR_PERS`
(`[L-1:0][M-1:0]`, one word of product bits per output) on `upla_top`.

## What the augmentation adds

1. **Control lines C1, C2** (`pla_decoder`):
   `q[2i] = ~x[i] & ~C1` and `q[2i+1] = x[i] & ~C2`.
   With C1 = C2 = 0 the decoder is unchanged. To make only Q(2i-1) high, set
   `x[i] = 0`, all other inputs to 1, C1 = 0 and C2 = 1. To make only Q(2i)
   high, use the mirror image of that pattern. To make no row high, use C1 = 1,
   C2 = 0 with all inputs 0, or C1 = 0, C2 = 1 with all inputs 1.
2. **Column-select shift register** S(1..K) (`col_select_sr`). Every product
   line is ANDed with the complement of its S bit: `P(j) = p(j) & ~S(j)`.
   All zeros enables every product, which is normal use. A single 0 in a
   field of ones selects one column.
3. **Extra AND-array column(s)** and **extra OR-array row(s)**. These differ
   between the two forms (below).

Normal use is C1 = C2 = 0 with S all zero, which is the reset state. Each
input then drives exactly one of its two rows high. An extra column that has
devices on both rows of an input is therefore always low, and the outputs F
are the original function.

## The universal test sequence

`tpg` applies one pattern per clock, in this order. `K` is the number of
selectable columns: `M+1` for the multiple-fault form, `M+2` for the
single-fault form.

| pattern | X | C1 C2 | S | rows high |
|---------|---|-------|---|-----------|
| I1            | all 0                 | 1 0 | all 1     | none |
| I2(j), j=1..K | all 0                 | 1 0 | 0 at j    | none |
| I3            | all 1                 | 0 1 | 0 at K    | none |
| I4(i,j)       | 0 at i, others 1      | 0 1 | 0 at j    | Q(2i-1) only |
| I5(i,j)       | 1 at i, others 0      | 1 0 | 0 at j    | Q(2i) only |

Within I4 and I5, `i` runs fastest. The sequence has `2NK + K + 2` patterns.
That is `2nm + 2n + m + 3` for the multiple-fault form, which is 24 323 at the
default size. For the single-fault form it is 24 444.

The I3 pattern is this design's choice. It makes all rows low through the
other control line, so that C2 stuck at 0 and the inputs stuck at 0 show up.
It selects the last column, which holds a device on every row.

The generator is built from two shift registers:

* A one-hot ring register walks the selected input.
* The PLA's own S register walks the single 0.

`tpg` therefore drives the register's controls (`sr_op`, `sr_in`) and not S
directly. The operation it issues in one cycle takes effect at the clock
edge, so S is right in the cycle the next pattern is applied:

* I1 is preceded by SET.
* I2(1), I4(1,1) and I5(1,1) shift in a 0.
* A column step shifts in a 1.
* I3 keeps the 0 where it is.
* The end of the test clears the register, which restores normal use.

## Multiple-fault form (`aug_pla_multi`)

* Extra column P(m+1) has a device on every AND-array row. It conducts only
  when no row is high, and it has no device on the F rows.
* Extra output Z has a device on every product line, including P(m+1).

Under I1 every product line is low. Under I2 and I3 the selected column is
high. Under I4 and I5 the selected column is high exactly when it has no
device on the one active row. Every response is therefore `F(g) = OR(g,j) & P(j)`
and `Z = P(j)` for the selected column `j`. Any one AND or OR crosspoint can be
read this way. `upla_top` brings out `m_test_valid` and `m_test_phase` so that
an external tester knows when to compare. `tb_upla_top` acts as that tester.

## Single-fault form (`aug_pla_single`) and the parity self test

This is the subtle part of the design. It has two extra columns and two extra
output rows:

* **P(m+2)** has a device on every AND row. On the OR side it has devices on
  F(1), F(3), F(5), ... .
* **P(m+1)** has devices on Q(1) and Q(2), so it is always low in normal use.
  Its other devices are chosen from the personality:
  * **Device on Q(3).** It is placed exactly when this makes the number of
    *missing* devices at (P(j), Q(2i-1)), over j = 1..m+1 and i = 1..n, odd.
  * **Device on Q(4).** It follows the same rule for the true-literal rows
    Q(2i).
  * **Rows Q(5) to Q(2n).** It has no devices there, so `N >= 2` is required.
  * **F rows.** It has a device on F(g) exactly when this makes the number of
    devices on F(g) among P(1..m+1) odd.
* **Z1** has devices on the odd product lines P(1), P(3), ... .
* **Z2** has devices on all product lines.

The column is computed at elaboration from `AND_PERS`/`OR_PERS`. It is
exposed as the parameters `XAND`/`XOR`. Overriding the personality while
keeping the fault-free `XAND`/`XOR` is how the testbench models crosspoint
faults.

With these rules the *parity* of the responses over parts of the sequence no
longer depends on the function. `parity_bist` keeps one toggle flip-flop per
response line (F, Z1, Z2; module `parity_counter`). At the end of each of
seven windows it compares the parity, including the window's last response,
with a reference. It then clears the counters. Bits marked "-" are not
checked:

| window | patterns | F(g) | Z1 | Z2 | why |
|--------|----------|------|----|----|-----|
| w0 | I1, I2(1..m+1) | 1 | Pi(ceil((m+1)/2)) | Pi(m+1) | each column fires once; F rows have an odd device count |
| w1 | I2(m+2) | 1 for odd g | Pi(m+2) | 1 | only P(m+2) fires |
| w2 | I3 | 1 for odd g | Pi(m+2) | 1 | as w1 |
| w3 | I4, columns 1..m+1 | - | - | 1 | Z2 fires once per missing device on Q(2i-1): an odd count |
| w4 | I4, column m+2 | 0 | 0 | 0 | P(m+2) is pulled low by every row |
| w5 | I5, columns 1..m+1 | - | - | 1 | as w3, rows Q(2i) |
| w6 | I5, column m+2 | 0 | 0 | 0 | as w4 |

`Pi(a)` is 1 when `a` is odd. The reference bits are functions of `M` and `L`
only, computed in `parity_bist`. A single missing or extra device in the
AND array changes a missing-device count by one, which flips Z2 in w3 or w5.
A single OR-array crosspoint fault flips an F parity in w0.

Departure from the original scheme: that scheme uses nine check times. This
design checks the seven windows above, whose references follow directly from
the augmentation rules. Counting the parity afresh in each window is also
this design's choice.

## Top level (`upla_top`)

One clock, one asynchronous active-low reset. Ports of each form:

* Multiple-fault form:
  * `m_x` in, `m_f` and `m_z` out;
  * `m_test_start` (a one-cycle pulse) starts the sequence;
  * `m_test_busy`, `m_test_valid` and `m_test_phase` follow it;
  * `m_test_done` pulses once at the end.
* Single-fault form:
  * `s_x` in, `s_f`, `s_z1` and `s_z2` out;
  * `bist_start` (a one-cycle pulse) starts the self test;
  * `bist_busy` is high while it runs;
  * two cycles after the last pattern, `bist_done` pulses with the verdict
    on `bist_pass` / `bist_fail`;
  * `bist_err_win` says which windows mismatched, `bist_checks` how many
    windows were checked.

While a test runs, that PLA takes its inputs from its generator. Otherwise
it takes them from `m_x` / `s_x`. Its outputs are combinational from its
inputs. The first pattern is applied the cycle after the start pulse.

Hierarchy:

```
upla_top
├── tpg (K = M+1) ─▶ aug_pla_multi ── pla_decoder, col_select_sr, pla_and_plane, pla_or_plane
└── tpg (K = M+2) ─▶ aug_pla_single ─ (same four) ─▶ parity_bist ── parity_counter
```

`pla_pkg` holds the default sizes, the shift-register operation and
pattern-class enums, and the hash used for the default personality.

## Cost

For the default 60/200/60 PLA, the extra hardware consists of:

* 2 control lines;
* 1 or 2 columns and 1 or 2 rows;
* a 201- or 202-cell shift register.

Count a transistor and a pull-up as one unit of area each, and a
shift-register cell as six. The added area is then
`(6n + 7m + l + 7) / (6n + 2nm + lm + m + 3l)` of the original, which is
1827 / 36740, about 5.0 %. The self-test logic (the pattern generator and
62 parity flip-flops) comes on top of that.

## Simulating

Every file in `rtl/` holds one module or package. List the package first.
Then let verilator find the other modules by name:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pla_pkg.sv tb/tb_upla_top.sv --top-module tb_upla_top
./obj_dir/Vtb_upla_top
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. The testbenches:

* **`tb_upla_top`** runs the whole design at the default size in about a
  second.
  * It applies 400 random normal-use vectors to both PLAs.
  * It runs the full multiple-fault sequence and compares all 24 323
    responses with ones derived from the personality.
  * It runs the self test, then both tests at once.
  * It checks the sequence lengths and counts that every pattern class and
    every window occurred.
* **`tb_bist_faults`** builds 46 small single-fault PLAs (3 inputs,
  4 products, 3 outputs) on one pattern generator. One is fault-free. Each of
  the others has one AND or OR crosspoint flipped, in the original arrays or
  in P(m+1). The fault-free copy must pass its self test and all 45 faulty
  ones must fail.
* **`tb_bist_line_faults`** checks every single fault against the self test,
  for two personalities: the small one above and a pseudo-random one with
  4 inputs, 8 products and 5 outputs. Each set (helper `tb_bist_fault_set`)
  builds faulty copies from the design's decoder, shift register and planes
  (helper `tb_faulty_pla`). That gives 137 and 255 faulty copies. The faults
  are:
  * every crosspoint of the augmented arrays flipped, including those of
    P(m+1), P(m+2), Z1 and Z2;
  * every input, control line, row, product line, output line (F, Z1, Z2)
    and S bit stuck at 0 and at 1;
  * wired-AND bridges between C1 and C2, and between every pair of adjacent
    rows, product lines and output lines.

  The fault-free copies must pass, and the self test must catch every fault.
* **`tb_multi_faults`** applies the conventional test of the multiple-fault
  form to faulty copies and compares every response with the fault-free
  copy. It uses the same two personalities (helper `tb_multi_fault_set`),
  giving 473 and 583 faulty copies:
  * every single line fault and every single crosspoint fault;
  * 120 pairs of line faults;
  * 120 pairs of crosspoint faults;
  * 120 line-plus-crosspoint pairs.

  All must be detected.
* **`tb_table2_plas`** runs the whole design (normal use, the full
  conventional test with every response compared, and the self test) at the
  sizes of the eight BELLMAC-32A PLAs, 12 to 54 inputs, 12 to 67 outputs and
  42 to 190 products. Each size gets a pseudo-random personality. Helper:
  `tb_upla_run`.
* **Per-block testbenches** check each block against an independent model:
  * `tb_pla_decoder`, `tb_pla_and_plane`, `tb_pla_or_plane`,
    `tb_col_select_sr`, `tb_parity_counter`;
  * `tb_tpg` checks the pattern list, the window marks and the restart;
  * `tb_parity_bist` uses synthetic streams, with every checked bit flipped
    once;
  * `tb_aug_pla_multi` and `tb_aug_pla_single` cover normal use, every
    universal pattern and random selections. The single-fault one also
    checks the odd-count properties.

## Limits and open points

* **Fault coverage in simulation.** Faults were injected only into small
  arrays (3 inputs, 4 products, 3 outputs) with one fixed personality, and
  multiple faults only as sampled pairs. At larger sizes, and for arbitrary
  fault combinations, coverage rests on the construction.
  Bridges are modelled as wired-AND, as in NMOS, where a low line wins.
* **Folded PLAs.** Applying the augmentation to a folded PLA is a layout
  matter and is not provided.
* **Table size.** At its default size the design holds PLAs of up to 60
  inputs, 60 outputs and 200 products.
  * This covers the 60/60/200 example and the PLAs of the BELLMAC-32A
    microprocessor with up to 60 outputs. The overhead figures are based
    on those PLAs.
  * The two BELLMAC-32A PLAs with 67 and 61 outputs need `L` raised.
  * A smaller function fits by leaving spare products without OR devices
    and tying spare inputs.
* **Reading choices.** The I3 pattern, the placement of the "alternate"
  devices (odd rows and odd columns), and the absence of P(m+1) devices on
  Q(5..2n) and on the F rows of the multiple-fault form are interpretations.
  They are listed above where they apply.
