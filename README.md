# Self-checking two-level combinational circuits

A combinational block that fails in the field usually gives wrong answers
silently. This design turns ordinary combinational functions into
**self-checking circuits**. Each circuit computes its normal outputs and, at the
same time, a small amount of redundant information predicted from the same
inputs. A checker then watches that the two always agree. The checker reports
through two complementary wires. As long as they read 01 or 10 the outputs are
trustworthy. A 00 or 11 means an error, and that includes a fault inside the
checker itself.

All the codes used are *separable*: the normal outputs appear unchanged in the
code word and only check bits are added. The user therefore takes the outputs
as they are, with no decoding.

The RTL follows the scheme set out in *On VHDL Synthesis of Self-Checking
Two-Level Combinational Circuits*. Six small standard functions are built, and
each is protected three ways: by duplication, by a Bose-Lin code, and by parity
codes. The parity codes come in three variants, giving five protected versions
per function. Everything is combinational: there is no clock, no reset and no
state.

## Structure of one self-checking circuit

```
            +---------------- functional circuit F ----------------+
 x (n) ---->| function logic (bench_logic) ---- z, data part (P) ---+----> outputs
       |    |                                                      |
       +--->| check symbol generator (check_gen) -- chk, check (K) |
            +------------------------------------------------------+
                         | z                      | chk
                         v                        v
                  +-------- checker C (TSC) ---------+
                  |   scheme-dependent, see below    |---> err_f, err_g
                  +----------------------------------+
```

`sc_circuit` is this picture for one function (`CIRCUIT`) and one scheme
(`SCHEME`). The check symbol generator does **not** look at `z`. It holds its
own copy of the function and encodes that copy's result. A fault in the
function logic therefore makes data part and check part disagree, and the
checker sees the mismatch. The check part is available on port `chk`.

The checker is *totally self-checking* (TSC):

* for every fault-free code word, `(err_f, err_g)` is `01` or `10`;
* every non-code word gives `00` or `11`, so an error is never turned into an
  "all good";
* both `01` and `10` occur in normal operation, so a stuck checker output shows
  up as an error.

The testbenches check all three properties.

`error = (err_f == err_g)` is a one-wire summary for convenience. It is not
itself self-checking. A system that needs the full guarantee must carry the two
rails onward, for example into the next level of two-rail checking.

## The five schemes

| `SCHEME`   | check part `chk` (K bits)                                     | checker                                   |
|------------|----------------------------------------------------------------|-------------------------------------------|
| `SCH_DUP`  | the **complemented** outputs of a second copy of the function (K = P) | two-rail tree over the P pairs (z[i], chk[i]) |
| `SCH_BLIN` | Bose-Lin check: number of zeros in `z`, modulo 2^`BL_K` (K = `BL_K` = 2 or 3) | regenerate from `z`, invert, two-rail compare with `chk` |
| `SCH_POV`  | one even-parity bit over all outputs (K = 1)                  | TSC parity checker                        |
| `SCH_PG2`  | one even-parity bit for each of 2 output groups (K = 2)      | 2 parity checkers + two-rail tree         |
| `SCH_PG4`  | one even-parity bit for each of 4 output groups (K = 4)      | 4 parity checkers + two-rail tree         |

What each scheme detects:

* **Duplication** detects any error on the outputs: any pattern of flipped
  data bits, and any difference between the two copies. Its cost is a second
  copy of the whole function.
* **Bose-Lin** detects every *unidirectional* error of up to 2 bits (K = 2) or
  3 bits (K = 3). A unidirectional error means all wrong bits went 0→1, or all
  went 1→0. Stuck-at faults in inverter-free logic produce errors of this kind.
  The number of check bits does not depend on the number of outputs.
* **Parity** detects any odd number of wrong bits within one group. A two-bit
  error inside one group passes unseen. More groups allow more sharing of logic
  between outputs but need more predicted bits.

Parity groups are contiguous slices of `ceil(P/G)` outputs, with the last group
taking the rest. For example, 16 outputs in 4 groups give Z1–Z4 with C1, Z5–Z8
with C2, and so on.

## Checker building blocks

* **`trc_cell`**: the two-rail checker cell. It takes pairs (a1, a0) and
  (b1, b0) and computes `f = a1·b1 + a0·b0` and `g = a1·b0 + a0·b1`. If both
  pairs are valid (rails differ), the output is valid. If either pair is 00 or
  11, the output is 00 or 11.
* **`trc_tree`**: N pairs reduced by N−1 cells, used as the TSC equality
  comparator. It is laid out like a heap: the input pairs are leaves N..2N−1 and
  node n combines nodes 2n and 2n+1. For N = 4 this is two cells feeding a
  third, the arrangement used for duplication. Depth is ⌈log2 N⌉ cells.
* **`parity_checker`**: one group of M data bits plus its check bit. The M+1
  bits are split into two halves, each with its own XOR tree; `f` is the parity
  of one half and `g` the inverted parity of the other. For an even-parity word
  the halves agree, so f ≠ g.
* **`pg_checker`**: G parity checkers whose G pairs feed a `trc_tree`. With
  G = 1 it is the single-parity checker.
* **`boselin_gen`** / **`boselin_checker`**: the generator is a zero count
  truncated to K bits. The checker regenerates the check bits from the received
  information bits, inverts them, and compares them pairwise with the received
  check bits in a `trc_tree` of K pairs.

## The benchmark functions

`bench_logic` selects a function by `CIRCUIT` and gives every function the
same interface: an `n_in`-bit input bus `x` and an `n_out`-bit output bus `z`.
`sc_pkg` holds the enums and the size functions.

| `CIRCUIT`  | module    | function | `x` (LSB first) | `z` |
|------------|-----------|----------|-----------------|-----|
| `BINBCD6`  | `binbcd #(6)`  | 6-bit binary to BCD (SN74185A function) | value | 2 BCD digits (8 bits) |
| `BINBCD8`  | `binbcd #(8)`  | 8-bit binary to BCD | value | 3 digits (12 bits) |
| `BINBCD12` | `binbcd #(12)` | 12-bit binary to BCD | value | 4 digits (16 bits) |
| `COMPAR`   | `compar`  | 4-bit magnitude comparator with cascade inputs (SN7485 function) | {i_eq, i_lt, i_gt, b, a} | {a_eq_b, a_lt_b, a_gt_b} |
| `DEMUX38`  | `demux38` | 3-to-8 decoder, enables G1, G2A_n, G2B_n, active-low outputs (74x138 function) | {g2b_n, g2a_n, g1, sel} | y_n[7:0] |
| `MULTIPL`  | `multipl` | 4×4 unsigned multiplier | {b, a} | product (8 bits) |

With its cascade inputs at A = B, the comparator follows the 7485 table:
`i_eq` = 1 gives A=B; otherwise `a_gt_b = ~i_lt` and `a_lt_b = ~i_gt`.

The binary-to-BCD converter uses shift-and-add-3, unrolled. The functions are
written behaviourally. Flattening them to two-level sum-of-products form is left
to synthesis.

An 18-segment alphanumeric display decoder belongs to the same benchmark set but
is **not included**, because its character set and segment patterns are not
defined.

## Top level: `sc_top`

`sc_top` builds every function in every scheme: 6 × 5 slots, less one.

* Inputs and outputs are arrays indexed by circuit (`circuit_e` value: 0
  BINBCD6 … 5 MULTIPL) and scheme (`scheme_e` value: 0 dup, 1 Blin, 2 pov,
  3 pg2, 4 pg4).
* Buses are 16 bits wide and right-aligned. Unused high bits read 0 and are
  ignored on input.
* All schemes of one circuit share that circuit's input `x[c]`.
* Slot (COMPAR, pg4) is empty, because three outputs cannot be cut into four
  parity groups. Its outputs are 0, its pair is 01 and `error` is 0.
* The unprotected functions, the reference point for cost comparisons, are not
  instantiated.

| port | width | meaning |
|------|-------|---------|
| `x` | [6][16] | primary inputs per circuit |
| `inj_data`, `inj_chk` | [6][5][16] | error-injection XOR masks on data / check part; tie to 0 |
| `z`, `chk` | [6][5][16] | outputs and check part per slot |
| `err_f`, `err_g` | [6][5] | two-rail error indication per slot |
| `error` | [6][5] | 1 when `err_f == err_g` |

Parameter `BL_K` (default 3) sets the Bose-Lin check width for all Blin slots.

The injection masks are an addition of this design, there for testing. They sit
between the functional circuit and the checker, so a mask bit models a wrong
output bit or check bit. The inputs are assumed fault free, so no injection is
provided there.

## Where this RTL departs from, or fills in, the original scheme

These points come from the original scheme:

* the structure of F and C;
* duplication with a complemented second copy and a TRC tree;
* the Bose-Lin checker structure (regenerate, invert, double-rail compare);
* four parity groups over 16 outputs, combined by a TRC tree with four input
  pairs;
* the moduli 4 and 8 of the Bose-Lin count;
* the set of benchmarks and the missing pg4 result for the comparator.

These are this design's own choices:

* **pg2 / pg4** are read as 2 and 4 parity *groups*, each with one check bit.
  The alternative reading, groups of 2 and 4 bits, gives the same hardware only
  for the 16-output converter at pg4.
* The **contiguous** partition of the outputs into groups.
* **Even** parity, and the split of each group into two halves in the parity
  checker.
* **Bose-Lin counts zeros**, with K = 3 by default. K > 3 uses a modified code
  and is not supported.
* The TRC cell equations (the standard ones).
* The output widths and bus layouts of the benchmarks; the comparator's cascade
  inputs; the enables of the decoder; unsigned multiplication.
* The injection ports and the `error` summary bit.

### Synthesis constraints that the RTL cannot enforce

Self-checking only holds for the netlist as built. Three points need attention:

1. **The two copies must stay apart.** The function logic and the predicting
   copy inside `check_gen` compute the same thing. A synthesis tool will happily
   merge them, and then a fault in shared logic corrupts data and check part
   alike and goes unseen. Both instances carry `(* keep_hierarchy *)`.
   Flattening flows must honour that attribute or be told so by other means; a
   plain flatten-and-optimise run merges them.
2. **No shared logic inside a parity group.** A fault in logic shared by two
   outputs of the same group can flip both bits, and a two-bit error is
   invisible to parity. The synthesis flow must not share logic between
   outputs of one group.
3. **Bose-Lin needs an inverter-free function.** Otherwise a single fault can
   flip bits in both directions. In addition, no internal node may reach more
   than t outputs.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_ref_pkg` holds the arithmetic reference
models (`/10`, `%10`, `*`, comparisons) and the reference check-part encoders.
To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sc_pkg.sv tb/tb_ref_pkg.sv tb/tb_sc_top.sv --top-module tb_sc_top
./obj_dir/Vtb_sc_top
```

What the testbenches cover:

* **Building blocks**: checked exhaustively where that is small. This covers
  all 16 inputs of the TRC cell, all 2^10 rail patterns of a 5-pair tree, every
  input of every benchmark (the 12-bit converter included), and Bose-Lin
  generators against a bit-by-bit zero count.
* **`tb_sc_circuit`**: runs MULTIPL in all schemes and COMPAR in four schemes,
  over every input. It checks outputs and check part against the model and
  confirms there is no error when fault free. It injects single data and check
  bit errors, unidirectional multi-bit errors (duplication, Bose-Lin) and
  errors in two different parity groups, and requires each to be flagged.
* **`tb_trc_selftest`**: forces each of the 28 single stuck-at faults on the
  nodes of a 4-pair `trc_tree` and applies all 16 code words. Every fault must
  be revealed by at least one code word (self-testing), and no input may
  produce the wrong code word (fault secure).
* **`tb_sc_top`**: runs the full top at its defaults over 4096 input steps,
  which is exhaustive for every circuit. In every slot it injects the errors
  above and checks that only the faulty slot reports. It also checks that a
  two-bit error inside one parity group is *not* reported, the known blind spot.
  It counts every mechanism and fails if one never happened. It runs in a few
  seconds and performs about 12 million checks.

## Changing the design

* **Add a benchmark**: add a value to `circuit_e`, its widths to
  `n_in` / `n_out`, a case in `bench_logic`, and a reference in `tb_ref_pkg`.
  Every scheme then applies automatically.
* **Change the grouping**: `check_gen` (via `grp_size` in `sc_pkg`),
  `pg_checker` and `tb_ref_pkg` each compute the contiguous group bounds; change
  all three together.
* **Use a 2-bit Bose-Lin code**: set `BL_K = 2` on `sc_top` or `sc_circuit`.
