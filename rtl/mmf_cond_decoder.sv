// mmf_cond_decoder: comparator bank of the MMF MAX-MIN calculator.
//
// Takes the general five-point antecedent MF A(a1..a5) and the five-point
// fuzzified input MF X(x1..x5) and, for each of the three MF types extracted
// from them (triangle a1..a3, trapezoid a1..a4, Gaussian a1..a5), decides
// which matching condition holds and selects the two segment lengths n, d of
// the cross-over equation MD = 2^l - 2^l * n/(n+d). One set of point
// comparisons serves all three types. Points must be ordered, p1 <= ... <= p5.
//
// Conditions, first match wins (numbering of the cross-over equations as in
// the design):
//   all       all used points equal                         -> full grade
//   all       X entirely left or right of A (x_last < a1
//             or a_last < x1)                               -> 0
//   Gaussian  eq.1  a4 < x2 and x1 < a5   n = x2-a4, d = a5-x1
//             eq.2  x4 < a2 and a1 < x5   n = a2-x4, d = x5-a1
//             x3 = a3 (peaks coincide)                      -> full grade
//             eq.3  a3 < x3 and x2 <= a4  n = x3-a3, d = a4-x2
//             eq.4  x3 < a3 and a2 <= x4  n = a3-x3, d = x4-a2
//   trapezoid eq.5  a3 < x2 and x1 < a4   n = x2-a3, d = a4-x1
//             eq.6  x3 < a2 and a1 < x4   n = a2-x3, d = x4-a1
//             x2 <= a3 and a2 <= x3 (plateaus overlap)      -> full grade
//   triangle  eq.7  a2 < x2 and x1 < a3   n = x2-a2, d = a3-x1
//             eq.8  x2 < a2 and a1 < x3   n = a2-x2, d = x3-a1
//             x2 = a2 (peaks coincide)                      -> full grade
//   anything left (feet touching at grade 0)                -> 0
// The equations and the first conditions of each type follow the design;
// the peak/plateau-overlap rows, the widened eq.3/eq.4 ranges and the
// fall-through to 0 are this implementation's completion of the case list.
//
// Purely combinational.
//
// Ports
//   a_i, x_i       antecedent and fuzzified-input MFs, index 0 = point 1
//   sel_tri_o      condition and segment lengths, triangular MF
//   sel_trap_o     same, trapezoidal MF
//   sel_gauss_o    same, Gaussian MF
//   full_match_o   all five points of A and X are equal (complete matching)
module mmf_cond_decoder
  import mmf_pkg::*;
(
  input  mf5_t    a_i,
  input  mf5_t    x_i,
  output md_sel_t sel_tri_o,
  output md_sel_t sel_trap_o,
  output md_sel_t sel_gauss_o,
  output logic    full_match_o
);

  // Point names as in the design: a1 = a_i[0] ... a5 = a_i[4].
  pt_t a1, a2, a3, a4, a5;
  pt_t x1, x2, x3, x4, x5;
  logic [4:0] eq;

  assign {a1, a2, a3, a4, a5} = {a_i[0], a_i[1], a_i[2], a_i[3], a_i[4]};
  assign {x1, x2, x3, x4, x5} = {x_i[0], x_i[1], x_i[2], x_i[3], x_i[4]};

  always_comb
    for (int i = 0; i < 5; i++) eq[i] = (a_i[i] == x_i[i]);

  assign full_match_o = &eq;

  function automatic md_sel_t mk(md_case_e k, pt_t n, pt_t d);
    md_sel_t s;
    s.kind = k;
    s.num  = n;
    s.dif  = d;
    return s;
  endfunction

  // Triangular MF (a1..a3).
  always_comb begin
    if (&eq[2:0])                  sel_tri_o = mk(MC_FULL, '0, '0);
    else if (x3 < a1 || a3 < x1)   sel_tri_o = mk(MC_ZERO, '0, '0);
    else if (a2 < x2 && x1 < a3)   sel_tri_o = mk(MC_EQ7, x2 - a2, a3 - x1);
    else if (x2 < a2 && a1 < x3)   sel_tri_o = mk(MC_EQ8, a2 - x2, x3 - a1);
    else if (x2 == a2)             sel_tri_o = mk(MC_FULL, '0, '0);
    else                           sel_tri_o = mk(MC_ZERO, '0, '0);
  end

  // Trapezoidal MF (a1..a4).
  always_comb begin
    if (&eq[3:0])                  sel_trap_o = mk(MC_FULL, '0, '0);
    else if (x4 < a1 || a4 < x1)   sel_trap_o = mk(MC_ZERO, '0, '0);
    else if (a3 < x2 && x1 < a4)   sel_trap_o = mk(MC_EQ5, x2 - a3, a4 - x1);
    else if (x3 < a2 && a1 < x4)   sel_trap_o = mk(MC_EQ6, a2 - x3, x4 - a1);
    else if (x2 <= a3 && a2 <= x3) sel_trap_o = mk(MC_FULL, '0, '0);
    else                           sel_trap_o = mk(MC_ZERO, '0, '0);
  end

  // Gaussian MF (a1..a5).
  always_comb begin
    if (&eq)                       sel_gauss_o = mk(MC_FULL, '0, '0);
    else if (x5 < a1 || a5 < x1)   sel_gauss_o = mk(MC_ZERO, '0, '0);
    else if (a4 < x2 && x1 < a5)   sel_gauss_o = mk(MC_EQ1, x2 - a4, a5 - x1);
    else if (x4 < a2 && a1 < x5)   sel_gauss_o = mk(MC_EQ2, a2 - x4, x5 - a1);
    else if (x3 == a3)             sel_gauss_o = mk(MC_FULL, '0, '0);
    else if (a3 < x3 && x2 <= a4)  sel_gauss_o = mk(MC_EQ3, x3 - a3, a4 - x2);
    else if (x3 < a3 && a2 <= x4)  sel_gauss_o = mk(MC_EQ4, a3 - x3, x4 - a2);
    else                           sel_gauss_o = mk(MC_ZERO, '0, '0);
  end

endmodule
