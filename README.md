# MMF MAX-MIN calculator: matching degree for triangular, trapezoidal and Gaussian MFs at once

In a fuzzy inference processor, most of the time goes into one operation:
finding the **matching degree** (MD) between a fuzzified input and the
antecedent membership function (MF) of each rule. The MD is the height of the
highest point the two MFs share, the MAX over the universe of the MIN of the
two grades. Usual MAX-MIN circuits handle one MF shape. This calculator takes
one general five-point antecedent `A(a1..a5)` and one five-point input
`X(x1..x5)`. In a single pass it gives the MD of all three MF shapes that
these points describe:

| MF type     | points used | shape                                      | MD bits | levels |
|-------------|-------------|--------------------------------------------|---------|--------|
| triangular  | p1..p3      | feet p1, p3; peak p2                       | 3       | 8      |
| trapezoidal | p1..p4      | feet p1, p4; plateau p2..p3                | 4       | 16     |
| Gaussian    | p1..p5      | piecewise-linear, feet p1, p5; peak p3     | 5       | 32     |

The three grades are packed into one 12-bit word,
`h = {MD_gauss[4:0], MD_trap[3:0], MD_tri[2:0]}`.

No multiplier walks along the MFs. The MD comes from a few comparisons on
the order of the break points, plus one short division.

## How an MD is found

Two piecewise-linear MFs either do not overlap, or they coincide, or one
slope of X crosses the facing slope of A. For a crossing, each of the two
slopes is taken as a straight line from grade 0 to grade 1. If a rising line
through `(r0,0),(r1,1)` meets a falling line through `(f0,1),(f1,0)`, they
meet at height

    mu = (f1 - r0) / ((r1 - r0) + (f1 - f0)) = 1 - n/(n+d)

Here `n` and `d` are two horizontal distances between break points. The
discrete MD on `l` bits is

    MD = 2^l - floor(2^l * n / (n + d)),   saturated to 2^l - 1

Worked example: a triangle `a = (4,6,8)` against `x = (1,3,5)`. X lies to
the left, its falling slope 3..5 crosses A's rising slope 4..6, and
`n = a2-x2 = 3`, `d = x3-a1 = 1`. This gives `MD = 8 - 8*3/4 = 2`, so
`h = 000000000010`.

### The condition table

For each type the comparator bank (`mmf_cond_decoder`) checks these rows in
order. The first row that holds wins:

| row | type     | condition                      | n       | d       | slopes that cross            |
|-----|----------|--------------------------------|---------|---------|------------------------------|
| —   | all      | every used point equal         | —       | —       | top grade                    |
| —   | all      | `x_last < a1` or `a_last < x1` | —       | —       | MD = 0                       |
| eq1 | Gaussian | `a4 < x2` and `x1 < a5`        | `x2-a4` | `a5-x1` | X `x1→x2` / A `a4→a5`        |
| eq2 | Gaussian | `x4 < a2` and `a1 < x5`        | `a2-x4` | `x5-a1` | A `a1→a2` / X `x4→x5`        |
| —   | Gaussian | `x3 = a3`                      | —       | —       | peaks coincide: top grade    |
| eq3 | Gaussian | `a3 < x3` and `x2 <= a4`       | `x3-a3` | `a4-x2` | X `x2→x3` / A `a3→a4`        |
| eq4 | Gaussian | `x3 < a3` and `a2 <= x4`       | `a3-x3` | `x4-a2` | A `a2→a3` / X `x3→x4`        |
| eq5 | trapez.  | `a3 < x2` and `x1 < a4`        | `x2-a3` | `a4-x1` | X `x1→x2` / A `a3→a4`        |
| eq6 | trapez.  | `x3 < a2` and `a1 < x4`        | `a2-x3` | `x4-a1` | A `a1→a2` / X `x3→x4`        |
| —   | trapez.  | `x2 <= a3` and `a2 <= x3`      | —       | —       | plateaus overlap: top grade  |
| eq7 | triangle | `a2 < x2` and `x1 < a3`        | `x2-a2` | `a3-x1` | X `x1→x2` / A `a2→a3`        |
| eq8 | triangle | `x2 < a2` and `a1 < x3`        | `a2-x2` | `x3-a1` | A `a1→a2` / X `x2→x3`        |
| —   | triangle | `x2 = a2`                      | —       | —       | peaks coincide: top grade    |
| —   | all      | anything else                  | —       | —       | feet touch: MD = 0           |

The zero, complete-match and eq1–eq8 rows come from the method this design
implements. The rows marked "top grade" and the final fall-through row
complete the list so that every ordered input pair has exactly one result.

**The Gaussian is handled piecewise.** Eq1/eq2 treat the outer segments as
full 0-to-1 slopes, and eq3/eq4 treat the inner segments the same way. So the
Gaussian MD is not continuous as X slides across A. When `x2` passes `a4`,
the case changes from eq3, which ends at grade 0, to eq1, which starts near
the top grade. This follows from the equations themselves. Use the Gaussian
grade with that in mind.

### Discretisation (`md_grade_unit`)

The quotient `floor(2^l*n/(n+d))` comes from an `l`-step restoring division.
Whenever `d > 0`, `n < n+d`, so only fraction bits appear. The grade is
`2^l - q`, computed as `-q` on `l` bits. Special cases:

- `q = 0`, a crossing at the very top: the result would be `2^l`, which
  saturates to `2^l - 1`.
- `d = 0`: the slopes meet at grade 0, so MD = 0.
- `n = d = 0`, degenerate zero-width slopes: MD is the top grade.

Three instances run side by side, with `L = 3, 4, 5`.

## Timing and interface (`mmf_maxmin_calc`)

Two pipeline stages: comparator bank → register → three grade units →
register. A pair presented with `in_valid_i` at clock edge *k* appears with
`out_valid_o` after edge *k+2*. A new pair can be accepted on every cycle.
Outputs hold their value between valid results.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears the valid bits and the outputs) |
| `in_valid_i` | in | 1 | `a_i`, `x_i` carry a pair this cycle |
| `a_i`, `x_i` | in | 5 × 8 | `mf5_t`, element 0 = point 1. Points must be in order (`p1 <= … <= p5`) |
| `out_valid_o` | out | 1 | outputs hold a new result |
| `h_o` | out | 12 | `{MD_gauss, MD_trap, MD_tri}` |
| `md_tri_o`, `md_trap_o`, `md_gauss_o` | out | 3, 4, 5 | the same grades, separately |
| `case_tri_o`, `case_trap_o`, `case_gauss_o` | out | 4 | `md_case_e`: the row that decided each grade |
| `full_match_o` | out | 1 | all five points equal (complete matching) |

Shared constants and types (`PT_W`, `L_*`, `mf5_t`, `md_case_e`, `md_sel_t`)
are in `rtl/mmf_pkg.sv`. To change the point width, edit `PT_W`. The grade
widths are the `L_*` constants.

## Design choices and departures

- **Point width: 8 bits.** The method fixes no width. 8 bits covers the
  two-digit hex values used to illustrate it.
- **Complete match.** Every grade takes its top level (`h = FFF`), and
  `full_match_o` is raised. An alternative convention shows a complete match as
  `h = 1`. That convention is not used here, because it would rank a perfect
  match below most partial crossings. Use `full_match_o` if you need the
  flag.
- **Pipelining, valid handshake and reset** are choices of this design.
- **Eq1 and eq3–eq6.** The forms in the table are the two-line intersections
  named in the last column. Eq1 and eq2 are exact mirror images, and so are
  eq3 and eq4.
- **Eq3/eq4 ranges** are the full ranges over which those two intersections
  are valid. A narrower reading (`x2 <= a4 <= x3`, `a2 <= x4 <= a3`) would
  leave small shifts of X unclassified.
- **Unordered points** are not detected. The results are then meaningless.

## Not included

The calculator is one part of a fuzzy inference processor. The fuzzifier
that produces X, the rule engine (the method assumes 64 rules) and the
defuzzifier are not part of this RTL. Nothing defines their structure here.
Using the calculator for a 64-rule inference at 1 MFLIPS (one million fuzzy
inferences per second) takes 64 pairs per inference, so a clock of at least
64 MHz with one calculator.

## Files

| file | contents |
|------|----------|
| `rtl/mmf_pkg.sv` | widths, `mf5_t`, `md_case_e`, `md_sel_t` |
| `rtl/mmf_cond_decoder.sv` | shared comparator bank, the condition table above |
| `rtl/md_grade_unit.sv` | `l`-bit grade from `n`, `d` |
| `rtl/mmf_maxmin_calc.sv` | top: pipeline around the decoder and three grade units |
| `tb/mmf_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_md_grade_unit.sv` | grade unit against integer division; exhaustive small `n`,`d`, random 8-bit |
| `tb/tb_mmf_cond_decoder.sv` | directed vectors for every row, 20 000 random pairs; each crossing is also checked against the real-valued intersection of the two lines |
| `tb/tb_mmf_maxmin_calc.sv` | end to end at default sizes: complete match, complete mismatch, worked example, 30 000 random pairs with idle gaps; checks every result, its order and the 2-cycle latency, and that every row, bubbles, back-to-back pairs and saturation occurred |

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mmf_pkg.sv rtl/md_grade_unit.sv rtl/mmf_cond_decoder.sv \
        rtl/mmf_maxmin_calc.sv tb/mmf_ref_pkg.sv tb/tb_mmf_maxmin_calc.sv \
        --top-module tb_mmf_maxmin_calc
    ./obj_dir/Vtb_mmf_maxmin_calc

Each testbench ends with `TB_RESULT checks=N failures=M`. A watchdog stops a
run that hangs. The top carries one concurrent assertion: every accepted pair
comes out exactly two cycles later. Build with `--assert` to enable it. For
lint, use `verilator --lint-only -Wall` with the same `rtl/` files. Two
warnings remain, and neither affects the logic:

- `SYNCASYNCNET` on the top. That assertion's `disable iff (!rst_n)` uses the
  asynchronous reset.
- `UNUSEDPARAM`, when a submodule is linted on its own. It flags the
  package's grade-width constants that the submodule does not use.

## How far to trust it

All three testbenches pass, and each one fails on a deliberately broken copy
of its module. What they establish:

- the RTL matches the reference table and equations above
- the crossing rows agree with exact line intersections
- the worked example and the complete-match and mismatch cases come out as
  expected

What they cannot establish is that the table is the right MD for a Gaussian
in a fuzzy-systems sense. As noted above, the piecewise treatment of the
Gaussian is the weakest part of the method.
