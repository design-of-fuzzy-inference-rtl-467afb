// mmf_ref_pkg: reference model of the MMF MAX-MIN calculator for the
// testbenches. ref_sel gives the condition and segment lengths of one MF type
// from the position of X relative to A; ref_md gives the l-bit grade with
// integer division, MD = 2^l - floor(2^l*n/(n+d)) saturated to 2^l - 1.
package mmf_ref_pkg;
  import mmf_pkg::*;

  // Reference: condition and (n, d) for a type using points 1..np.
  function automatic md_sel_t ref_sel(int np, int av[5], int xv[5]);
    md_sel_t s;
    bit all_eq = 1;
    int a1 = av[0], a2 = av[1], a3 = av[2], a4 = av[3], a5 = av[4];
    int x1 = xv[0], x2 = xv[1], x3 = xv[2], x4 = xv[3], x5 = xv[4];
    s = '{kind: MC_ZERO, default: '0};
    for (int i = 0; i < np; i++) if (av[i] != xv[i]) all_eq = 0;
    if (all_eq) begin s.kind = MC_FULL; return s; end
    if (xv[np-1] < a1 || av[np-1] < x1) return s;
    case (np)
      3: begin
        if (x2 > a2)      begin if (x1 < a3) begin s.kind = MC_EQ7; s.num = pt_t'(x2 - a2); s.dif = pt_t'(a3 - x1); end end
        else if (x2 < a2) begin if (x3 > a1) begin s.kind = MC_EQ8; s.num = pt_t'(a2 - x2); s.dif = pt_t'(x3 - a1); end end
        else s.kind = MC_FULL;
      end
      4: begin
        if (x2 > a3)      begin if (x1 < a4) begin s.kind = MC_EQ5; s.num = pt_t'(x2 - a3); s.dif = pt_t'(a4 - x1); end end
        else if (x3 < a2) begin if (x4 > a1) begin s.kind = MC_EQ6; s.num = pt_t'(a2 - x3); s.dif = pt_t'(x4 - a1); end end
        else s.kind = MC_FULL;
      end
      default: begin
        if (x2 > a4 && x1 < a5)      begin s.kind = MC_EQ1; s.num = pt_t'(x2 - a4); s.dif = pt_t'(a5 - x1); end
        else if (x4 < a2 && x5 > a1) begin s.kind = MC_EQ2; s.num = pt_t'(a2 - x4); s.dif = pt_t'(x5 - a1); end
        else if (x3 > a3)            begin if (x2 <= a4) begin s.kind = MC_EQ3; s.num = pt_t'(x3 - a3); s.dif = pt_t'(a4 - x2); end end
        else if (x3 < a3)            begin if (x4 >= a2) begin s.kind = MC_EQ4; s.num = pt_t'(a3 - x3); s.dif = pt_t'(x4 - a2); end end
        else s.kind = MC_FULL;
      end
    endcase
    return s;
  endfunction

  function automatic int ref_md(md_sel_t s, int l);
    int full = (1 << l) - 1;
    int n = int'(s.num), d = int'(s.dif), q;
    if (s.kind == MC_ZERO) return 0;
    if (s.kind == MC_FULL) return full;
    if (n + d == 0) return full;
    if (d == 0) return 0;
    q = (n * (1 << l)) / (n + d);
    return (q == 0) ? full : (1 << l) - q;
  endfunction

endpackage
