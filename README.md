# Output-compression checker for self-checking circuits

A self-checking circuit flags its own errors while it runs. Usually this means re-synthesising
the functional logic so that its faults can only cause errors of a restricted kind, such as
unidirectional errors, and then encoding its outputs in a code that catches that kind (Berger,
weight-based codes). This design takes the functional circuit as it is, with no changes. The
checker is fixed first, and the check symbol follows from it:

* The checker folds the n-bit output vector in half and adds the halves together. It repeats
  this until only k bits are left. The result is the regenerated check symbol **CS'**.
* A separate check symbol generator (CSG) predicts the same k bits directly from the primary
  inputs. Its output is **CS**.
* A two-rail checker compares CS' with CS. It drives a two-wire error indication.

Any error in the outputs that changes CS' is caught. An error that leaves CS' unchanged (an
*alias*) is missed. The checker is just a short chain of adders and a comparator, so it stays
small even for wide output vectors. The check symbol is short too, which keeps the CSG small.
The method comes from the paper "Design of Low-Cost Self-Checking Circuits". This RTL covers
the checker side of that method.

```
             +--------------------+  out_vec (N)
 inputs --+->| functional circuit |------------+---------------------------> outputs
          |  +--------------------+            |
          |  +--------------------+            v
          +->| check symbol       |     +----------------+
             | generator (CSG)    |     | cs_regenerator |  adder chain(s)
             +--------------------+     +----------------+
                       | cs (CS)                | cs_regen (CS')
                       v                        v
             +--------------------------------------------+
             | trc_tree on pairs (cs[i], ~cs_regen[i])    |---> err_f, err_g
             +--------------------------------------------+
   functional circuit and CSG: outside the RTL; everything else: sc_checker
```

## Folding the output vector

A stage with a w-bit input splits it into two parts. The upper part has ceil(w/2) bits and the
lower part has floor(w/2) bits. The stage adds the two parts and keeps the carry, so its output
has ceil(w/2)+1 bits and nothing overflows. Stages repeat while the width is above k.

Example: n = 8, k = 3, vector `11010011`:

| stage | upper part, lower part | operation | result (width)  |
|-------|--------------|-----------|-----------------|
| 1     | `1101`, `0011` | 13 + 3    | `10000` (5)     |
| 2     | `100`, `00`    | 4 + 0     | `0100` (4)      |
| 3     | `01`, `00`     | 1 + 0     | `001` (3) = CS'  |

Widths shrink as w → ceil(w/2)+1, as the examples below show. With k = 3 or 4 the chain always
ends at exactly k bits. A 3-bit stage would produce 3 bits again, so k must be at least 3.

| n   | widths down to k = 3      | stages | full adders, k = 3 / k = 4 |
|-----|---------------------------|--------|-----------------------------|
| 7   | 7, 5, 4, 3                | 3      | 9 / 7                       |
| 32  | 32, 17, 10, 6, 4, 3       | 5      | 35 / 33                     |
| 140 | 140, 71, 37, 20, 11, 7, 5, 4, 3 | 8 | 150 / 148                  |

A stage is ceil(w/2) full adders wide. The checker's cost is counted in full adders:
`sc_pkg::fa_count(n, k)` computes it. For n = 6, 12, 28 and 54 it gives 5, 15, 32, 59 (k = 3)
and 3, 13, 30, 57 (k = 4). These values match the paper's cost table.

### Subtracting stages

An adder can subtract as easily as it adds, so a chain can be built from subtracting stages
instead. A subtracting stage inverts the lower part (zero-extended to the width of the upper
part), adds it with a carry-in of 1, and keeps the carry-out. Its output is
`upper − lower + 2^ceil(w/2)`, which is always non-negative and fits the same ceil(w/2)+1 bits.
For the example above the Sub chain gives `11010`, `1100`, `111`. For n = 4 and k = 3, the Add
chain spreads the 16 vectors over the symbols 000…110 as 1, 2, 3, 4, 3, 2, 1. The Sub chain
spreads them over 001…111 the same way. In both chains, two vectors that share a symbol differ
in at least two bits.

### The three schemes

`MODE` (type `sc_pkg::enc_mode_e`) selects the scheme:

| MODE      | check symbol                         | width |
|-----------|--------------------------------------|-------|
| `ENC_ADD` | Add(k): one chain of adding stages   | k     |
| `ENC_SUB` | Sub(k): one chain of subtracting stages | k  |
| `ENC_MIX` | Mix(2k): both chains, `{Sub, Add}`   | 2k    |

Add and Sub alias on different error patterns, so Mix misses far fewer errors than either chain
alone, at twice the symbol length. The default is Mix with k = 3, a 6-bit symbol.

## Two-rail comparison

A comparator built from ordinary gates could hide its own faults. So the comparison uses a
two-rail checker. Bit i of the comparison becomes the pair `(cs[i], ~cs_regen[i])`. This pair
is a two-rail code word (its two rails differ) exactly when the two bits agree. `trc_tree`
reduces the pairs with 2-bit cells (`trc2`):

```
f = a1·a2 + b1·b2        g = a1·b2 + b1·a2
```

A cell's output pair is a code word exactly when both input pairs are. A balanced tree of P−1
cells reduces P pairs to one, and an odd pair is carried to the next level unchanged. The
checker's output `(err_f, err_g)` is read as follows:

| err_f err_g | meaning                          |
|-------------|----------------------------------|
| 01 or 10    | CS' = CS, no error               |
| 00 or 11    | mismatch: an error in the outputs, the CSG or the checker |

With two wires, a single stuck-at fault on the indication cannot fake a "no error" answer for
every input. Both valid values (01 and 10) occur in normal operation, so a line stuck at one
value shows up as an error.

## Modules

| module          | role |
|-----------------|------|
| `sc_pkg`        | `enc_mode_e`; width helpers `stage_out_width`, `num_stages`, `width_at`, `fa_count`, `cs_width` |
| `cs_stage`      | one fold: split, add or subtract, keep carry |
| `cs_compressor` | chain of `cs_stage`s from N bits down to K bits |
| `cs_regenerator`| Add, Sub or Mix symbol from one or two chains |
| `trc2`          | 2-bit two-rail checker cell |
| `trc_tree`      | P-pair two-rail checker from `trc2` cells |
| `sc_checker`    | top: regenerator + two-rail comparison |

The top `sc_checker` has these parameters:

| parameter | default   | meaning |
|-----------|-----------|---------|
| `N`       | 7         | width of the functional output vector |
| `K`       | 3         | length of each compression chain's result (≥ 3) |
| `MODE`    | `ENC_MIX` | scheme; the symbol is `cs_width(MODE, K)` bits (2K for Mix) |

Ports: `out_vec[N-1:0]` and `cs[CSW-1:0]` are inputs. `cs_regen[CSW-1:0]`, `err_f` and `err_g`
are outputs. Everything is combinational, with no clock and no reset. The delay is
`num_stages(N, K)` adders plus `clog2(CSW)` two-rail cells.

The functional circuit and the check symbol generator are not part of this RTL. The method
works with any functional circuit. The CSG's logic depends on that circuit: it is the circuit
composed with the fold, synthesised on its own. To use the checker, build a CSG whose output
equals the `cs_regen` of the fault-free outputs, and wire both into `sc_checker`.

## Choices that go beyond the method

* **Subtraction offset.** The method says stages may subtract but does not say how.
  `upper + ~lower + 1` with the carry kept is the natural adder form. It reproduces the Sub
  distribution for n = 4 quoted above.
* **Split for odd widths.** The upper part gets the extra bit, as in the worked examples of the
  method.
* **Chains that end below K bits.** This happens only for K ≥ 6 or N < K. The result is
  zero-extended to K bits.
* **Bit order of the Mix symbol.** The Add result is in the low K bits and the Sub result in the
  high K bits.
* **Forming two-rail pairs.** Each `cs_regen` bit is inverted before it enters the tree.
* **The `trc2` equations.** These are the standard two-rail checker cell.
* **Tree shape.** The balanced tree with odd pairs carried over is a free choice.
* **Default size.** N = 7, K = 3 and Mix match a 7-output circuit, such as the ISCAS-85
  benchmark C432. Set `N` to the output count of the circuit being checked.

Not analysed here: self-testing of the adder chain. If a single fault sits in the chain, the
functional outputs are correct, so the fault can at worst raise a false alarm. Whether every
such fault is eventually revealed by some input has not been analysed.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values come from an integer model
of the fold in `tb/tb_ref_pkg.sv` (shift, mask, add), not from the RTL. Each testbench prints
`TB_RESULT checks=… failures=…`.

| testbench | what it shows |
|-----------|---------------|
| `tb_cs_stage` | every input of stages with W = 4, 5, 7, 10, add and sub |
| `tb_cs_compressor` | two worked examples (`0100110` → `001`, `1011010001` → `101`); the n = 4 symbol distributions and distances; every input for n = 7, 10, 12 with k = 3, 4; the full-adder counts |
| `tb_cs_regenerator` | Add, Sub and Mix against the model, with n up to 32 |
| `tb_trc2`, `tb_trc_tree` | every rail combination: the output is a code word exactly when all input pairs are |
| `tb_sc_checker` | the top at its defaults: all 128 × 64 pairs of vector and symbol; every single- and double-bit error on every vector |
| `tb_iscas_outputs` | Mix(6) and Mix(8) checkers sized for 7, 22, 25, 26, 32, 107, 123 and 140 outputs, each with 10 000 random vectors carrying 1–4 random bit flips; also checks that Mix catches at least what each half catches and that Mix(8) beats Mix(6) at every width |

`tb_sc_checker` runs the top at its default parameters. It also counts how often each behaviour
occurs, and each must occur at least once:

* both valid indications, 01 and 10;
* both error indications, 00 and 11;
* errors caught only by the Add half, only by the Sub half, and by both;
* masked errors.

At N = 7 the checker caught all 896 single-bit errors and 2520 of the 2688 double-bit errors.

`tb_iscas_outputs` prints the share of corrupted vectors that each scheme catches. For random
errors of small weight this is about 70–77 % for Add(3), 81–87 % for Sub(3) and 92–97 % for
Mix(6). With k = 4 the rates rise to 94–99 % for Mix(8). These numbers are not the paper's
fault coverages. Those were measured with single stuck-at faults injected into the benchmark
netlists, which are not modelled here.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sc_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_sc_checker.sv --top-module tb_sc_checker -Mdir obj_tb -o sim
obj_tb/sim
```

Substitute any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/sc_pkg.sv rtl/sc_checker.sv --top-module sc_checker`.
