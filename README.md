# Self-checking combinational logic with a reduced Hamming check-bit predictor

A combinational circuit can check its own results while it runs. The idea is
to compute a few *check bits* of its outputs a second time, directly from the
inputs. A checker then compares these predicted bits with the check bits of
the outputs the circuit actually produced. The outputs and the predicted check
bits together form a code word. A fault that corrupts either part gives a word
outside the code, and the checker reports it on the same cycle.

The usual way to predict the check bits is to build a full copy of the circuit
and then an XOR tree over the copy's outputs. This design uses a smaller
predictor. The copy and the XOR tree are replaced by a single new function
whose only outputs are the check bits. It is written as a truth table over the
primary inputs, so synthesis minimises it as one two-level function with K
outputs, not as an NO-output copy followed by K XOR trees. The check bits come
from a Hamming-style code. With it, a single wrong output is both detected and
located.

The circuit targets FPGAs. The circuit under protection and the predictor are
each held as a look-up table (LUT), and the fault model is an upset of one LUT
memory cell.

## Structure

```
             +-------------------+   out  [NO]
  in [NI] -+-| comb_circuit      |---------------+------------------> code word
           | |  (original, LUT)  |               |                    (out, check)
           | +-------------------+               v
           |                               +-------------+
           | +-------------------+ check[K]| tsc_checker |--> z[1:0]   two-rail result
           +-| check_predictor   |-------->|  regenerate |--> syndrome[K]
             | (duplicate reduced|         |  + compare  |
             |  to its check bits)|        +-------------+
             +-------------------+
```

| Module | Role |
|---|---|
| `tsc_top` | The whole self-checking circuit. |
| `comb_circuit` | The circuit being protected, held as a truth-table LUT. |
| `check_predictor` | Check bits straight from the inputs: one LUT holding the check bits of every table entry (default predictor). |
| `dup_xor_predictor` | The conventional predictor: a duplicate `comb_circuit` followed by `code_generator`. Selected with `PRED = PRED_DUP_XOR`. |
| `code_generator` | XOR trees that compute the check bits of an output word. |
| `tsc_checker` | Regenerates the check bits from `out`, compares them with `check` in a two-rail tree, and outputs `z` and `syndrome`. |
| `two_rail_reduce` | Balanced tree of two-rail checker cells. |
| `tsc_pkg` | Code types, the coefficient matrix and the check-bit count. |

Everything is combinational: there is no clock, reset or latency.

## The check-bit code

Number the outputs o_1 ... o_m (m = `NO`; o_(i+1) is `out[i]`). Check bit k
is an XOR of selected outputs:

    x_k = a_1k·o_1 ⊕ a_2k·o_2 ⊕ ... ⊕ a_mk·o_m

The coefficients a_ik form the right-hand part of a systematic Hamming
generator matrix: m rows and K columns. The columns are filled so that the
pattern of failing check bits works like a binary search for the wrong output:

* The last column is all ones, so x_K is the parity of all outputs. Any odd
  number of wrong outputs changes it.
* Column k < K has a one in row i (0-based) exactly when bit k−1 of i is
  zero. The first column is therefore 1,0,1,0,…, the second 1,1,0,0,…, the
  third 1,1,1,1,0,0,0,0, and so on. Each of these columns splits the outputs
  in half a different way.

For m = 8 the matrix is (columns x1 x2 x3 x4):

| output | x1 | x2 | x3 | x4 |
|---|---|---|---|---|
| o1 | 1 | 1 | 1 | 1 |
| o2 | 0 | 1 | 1 | 1 |
| o3 | 1 | 0 | 1 | 1 |
| o4 | 0 | 0 | 1 | 1 |
| o5 | 1 | 1 | 0 | 1 |
| o6 | 0 | 1 | 0 | 1 |
| o7 | 1 | 0 | 0 | 1 |
| o8 | 0 | 0 | 0 | 1 |

When m is not a power of two, the rows stop at m−1 and the deeper columns
have more ones than zeros; detection and location work the same way.

This takes K = ⌈log2 m⌉ + 1 check bits: 2 for 2 outputs, 4 for 8, 5 for 12,
6 for 31 and 7 for 47. It is the matrix of an (m + K, m) code cut down from a
full Hamming code; for 8 outputs, from the (15, 11) code.

**Locating the wrong output.** The checker's `syndrome` is the XOR of the
regenerated and the predicted check bits. If only output o_(i+1) is wrong, the
syndrome equals row i of the matrix. Its top bit is 1, and its lower K−1 bits,
inverted, spell out i in binary. If two outputs are wrong, the syndrome is the
XOR of two different rows, which is never zero, so the error is still detected.

**Single parity.** `CODE = CODE_PARITY` keeps only the all-ones column. That
gives one check bit, the parity of all outputs. It costs less but does not
locate the wrong output.

**Polarity.** `ODD = 1` inverts every check bit (odd parity). The checker uses
the same setting, so only the stored check bits change.

All of this is computed at elaboration by `tsc_pkg::coef`, `column_mask` and
`num_check_bits`, for up to `MAX_OUT` = 256 outputs.

## The reduced predictor

`check_predictor` receives the original circuit's truth table `TABLE` as a
parameter. At elaboration, a constant function encodes every NO-bit table word
into its K check bits, which gives a new table of 2^NI words of K bits. The
module is then a LUT over that table. The original outputs are dropped from
this copy entirely. Only the information the checker needs is kept.

Two things follow from this:

* **It is smaller.** A K-output function is usually much smaller than an
  NO-output duplicate, especially when NO is large. It can still be larger
  when the check bits are less regular than the outputs. On an 8-output ALU,
  for example, parity over all outputs can be harder to minimise than the ALU
  itself. In that case `PRED_DUP_XOR` can be the better choice, and it
  produces the same check bits.
* **It shares nothing with the original circuit.** Both are built from the
  same table but are separate modules. Keep them apart in synthesis, for
  example by preventing cross-boundary optimisation, so that one defect
  cannot hit both copies in the same way.

## The checker

A checker that reported "ok / error" on a single wire could not show its own
stuck-at-ok fault. So `tsc_checker` outputs a two-rail pair `z`: `01` or `10`
means a valid code word, and `00` or `11` means an error. For each check bit k
it forms the pair (regenerated x_k, inverted predicted x_k). The pair is
complementary exactly when the two values agree. `two_rail_reduce` folds the K
pairs with the standard cell:

    z0 = a0·b0 | a1·b1        z1 = a0·b1 | a1·b0

The cell's output is complementary only if both of its input pairs are. The
tree is balanced, with depth ⌈log2 K⌉. Valid code words drive `z` to both
`01` and `10`, so faults inside the tree are exercised in normal operation.
`tsc_top` also outputs `error = (z[0] == z[1])` for convenience. That single
wire is not self-checking itself.

## Fault model and upset injection

In an FPGA, the original circuit and the predictor are both LUTs. A radiation-
or noise-induced upset flips one memory cell. The wrong value reaches the
output only while the input selects that cell; for every other input the fault
is masked. `comb_circuit` and `check_predictor` model this with three ports:
`seu_en`, `seu_addr` and `seu_mask`. When `seu_en` is high, the word at
`seu_addr` is XORed with `seu_mask`. `tsc_top` routes the upset to the
original circuit or to the predictor with `seu_target`. The ports exist for
testing; tie `seu_en` low in a real design.

## Default configuration: the worked example

With no parameters set, `tsc_top` protects a 3-input, 2-output circuit. The
inputs are {c, b, a} = `in[2:0]`, and the outputs are f = `out[0]` and
e = `out[1]`:

| cba | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| f | 0 | 1 | 1 | 1 | 0 | 0 | 1 | 0 |
| e | 1 | 0 | 0 | 0 | 1 | 1 | 1 | 0 |

That is f = a̅b + c̅(a + b) and e = a̅b̅ + c(a̅ + b̅). The table parameter is
`16'h3A56`: word n sits at bits [2n+1:2n], as {e, f}.

The default code is Hamming with 2 check bits: x1 = f and x2 = f ⊕ e. With
`CODE_PARITY` and `ODD = 1`, the single check bit is the odd parity of f and
e, which reduces to x = b·c.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NI` | 3 | Number of inputs (LUT address width). |
| `NO` | 2 | Number of outputs. |
| `TABLE` | `16'h3A56` | Truth table, `2**NI` words of NO bits; word a is `TABLE[a*NO +: NO]`. |
| `CODE` | `CODE_HAMMING` | `CODE_HAMMING` (⌈log2 NO⌉+1 check bits) or `CODE_PARITY` (1 check bit). |
| `PRED` | `PRED_MERGED` | `PRED_MERGED` (reduced predictor) or `PRED_DUP_XOR` (duplicate plus XOR tree). |
| `ODD` | 0 | 1 inverts the check bits (odd parity). |
| `K` | derived | Number of check bits; a localparam. |

To protect your own circuit, generate its truth table, for example with a
constant function as `tb/tb_tsc_workloads.sv` does, and pass `NI`, `NO` and
`TABLE`. The tables grow as 2^NI: 16 inputs and 47 outputs already make a
3-Mbit parameter, which the simulator's compiler elaborates very slowly.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

| Testbench | What it checks |
|---|---|
| `tb_code_generator` | 8 outputs: all 256 words against the matrix above. 12 outputs: random words against a reference encoder. 2 outputs with odd parity. |
| `tb_comb_circuit` | Every table row and the minimised equations. Every single-cell upset is visible at its address and masked at every other address. |
| `tb_check_predictor` | Example check bits (Hamming, and odd parity = b·c). A 4-input, 8-output table against the matrix. Upsets in every predictor cell. |
| `tb_dup_xor_predictor` | Same check bits as the reduced predictor. Upsets in the duplicate change the check bits by that output's matrix row. |
| `tb_tsc_checker` | Valid words give complementary `z` and a zero syndrome. Every single wrong output is detected and located. Every single wrong check bit is detected. For random corruptions, an error is flagged exactly when the syndrome is non-zero. Both valid `z` states occur. |
| `tb_tsc_top` | Default parameters, end to end: all inputs fault-free, then every single and double upset of the circuit's LUT and every single upset of the predictor's LUT, each over all inputs. It counts detection, masking, location and both checker states, and fails if any of them never occurs. |
| `tb_tsc_workloads` | The three-input example with single odd parity, through both predictors, and with the Hamming code through the duplicate. c17 from its standard six-NAND netlist, exhaustively, with both codes and both predictors. Pseudo-random functions shaped like the other benchmark circuits: alu1 and br1 (12 in, 8 out), apla (10/12), b11 (8/31), alu2 and alu3 (10/8). Checks the check-bit count, outputs, check bits, detection, masking and location. |

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tsc_pkg.sv tb/tb_tsc_top.sv --top-module tb_tsc_top
./obj_dir/Vtb_tsc_top
```

All testbenches finish in seconds. `tb_tsc_workloads` takes about 20 s to
compile because its truth tables are built at elaboration.

## Limits and departures

* **The benchmark circuits are not included.** Their functions come from an
  external benchmark suite. Only their input and output counts are used here,
  with pseudo-random functions in their place; c17 uses its well-known
  netlist. The 16-input, 47-output al2 is not simulated.
* **No area or coverage figures.** LUT counts and fault coverage depend on the
  synthesis tool and on a gate-level fault simulation of the mapped netlist.
  Neither is part of this RTL. The word-level upset model used here is always
  caught, because every output is in the all-ones parity column and every
  predictor bit is compared directly. Coverage below 100 % only appears when
  faults are modelled inside a minimised netlist.
* **Checker insides.** Only the checker's job and its two outputs are fixed
  by the method. The two-rail tree, the `syndrome` port and the `error`
  convenience output are this implementation's choices. No faults are
  injected inside the checker.
* **Minimisation.** The reduced predictor is handed to synthesis as a truth
  table. The two-level minimisation and multi-level re-synthesis that the
  method relies on are left to the synthesis tool, not done by a separate
  minimiser.
* **Default polarity.** The check bits use even parity by default. The odd
  parity of the worked example is available with `ODD = 1`.
* **Sequential circuits.** These are handled by splitting them at their
  flip-flops into combinational parts and protecting each part. No sequential
  wrapper is provided.
