// tb_mmf_cond_decoder: self-checking test of the MMF comparator bank.
//
// Directed vectors: complete matching and complete mismatch from the
// design's timing diagram (A = 01,03,05,07,09 against X = A and against
// X = 0A,0C,0E,10,12), the triangular worked example (a = 4,6,8 against
// x = 1,3,5 gives n = 3, d = 1) and one hand-worked vector per crossing
// equation. Random ordered MFs are then checked two ways: the selected
// condition against a reference table written from the position of X
// relative to A, and, for every crossing, the grade d/(n+d) against the
// height of the intersection of the two facing straight lines computed in
// real arithmetic.
module tb_mmf_cond_decoder;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;

  mf5_t a, x;
  md_sel_t s_tri, s_trap, s_gauss;
  logic full;
  int checks = 0, failures = 0;
  int hits[md_case_e];

  mmf_cond_decoder dut (
    .a_i(a), .x_i(x), .sel_tri_o(s_tri), .sel_trap_o(s_trap),
    .sel_gauss_o(s_gauss), .full_match_o(full)
  );

  task automatic set(int a1, int a2, int a3, int a4, int a5,
                     int x1, int x2, int x3, int x4, int x5);
    a = '{pt_t'(a1), pt_t'(a2), pt_t'(a3), pt_t'(a4), pt_t'(a5)};
    x = '{pt_t'(x1), pt_t'(x2), pt_t'(x3), pt_t'(x4), pt_t'(x5)};
    #1;
  endtask

  task automatic expect_sel(string tag, md_sel_t got, md_case_e k, int n, int d);
    checks++;
    if (got.kind != k || (is_ratio(k) && (int'(got.num) != n || int'(got.dif) != d))) begin
      failures++;
      $display("FAIL %s: got %s n=%0d d=%0d, exp %s n=%0d d=%0d",
               tag, got.kind.name(), got.num, got.dif, k.name(), n, d);
    end
  endtask

  // Height at which a rising line through (r0,0),(r1,1) meets a falling
  // line through (f0,1),(f1,0).
  function automatic real line_cross(int r0, int r1, int f0, int f1);
    return real'(f1 - r0) / real'((r1 - r0) + (f1 - f0));
  endfunction

  // Crossing height implied by the decoder's (n, d) against the geometry.
  task automatic check_geometry(md_sel_t s, int av[5], int xv[5]);
    real h, g;
    if (!is_ratio(s.kind) || int'(s.num) + int'(s.dif) == 0) return;
    h = real'(s.dif) / real'(int'(s.num) + int'(s.dif));
    case (s.kind)
      MC_EQ1: g = line_cross(xv[0], xv[1], av[3], av[4]);
      MC_EQ2: g = line_cross(av[0], av[1], xv[3], xv[4]);
      MC_EQ3: g = line_cross(xv[1], xv[2], av[2], av[3]);
      MC_EQ4: g = line_cross(av[1], av[2], xv[2], xv[3]);
      MC_EQ5: g = line_cross(xv[0], xv[1], av[2], av[3]);
      MC_EQ6: g = line_cross(av[0], av[1], xv[2], xv[3]);
      MC_EQ7: g = line_cross(xv[0], xv[1], av[1], av[2]);
      default: g = line_cross(av[0], av[1], xv[1], xv[2]);
    endcase
    checks++;
    if (h - g > 1.0e-9 || g - h > 1.0e-9) begin
      failures++;
      $display("FAIL geometry %s: grade %f, lines cross at %f", s.kind.name(), h, g);
    end
  endtask

  task automatic check_random(int av[5], int xv[5]);
    set(av[0], av[1], av[2], av[3], av[4], xv[0], xv[1], xv[2], xv[3], xv[4]);
    expect_sel("tri",   s_tri,   ref_sel(3, av, xv).kind, int'(ref_sel(3, av, xv).num), int'(ref_sel(3, av, xv).dif));
    expect_sel("trap",  s_trap,  ref_sel(4, av, xv).kind, int'(ref_sel(4, av, xv).num), int'(ref_sel(4, av, xv).dif));
    expect_sel("gauss", s_gauss, ref_sel(5, av, xv).kind, int'(ref_sel(5, av, xv).num), int'(ref_sel(5, av, xv).dif));
    checks++;
    if (full != (av == xv)) begin failures++; $display("FAIL full_match"); end
    check_geometry(s_tri, av, xv);
    check_geometry(s_trap, av, xv);
    check_geometry(s_gauss, av, xv);
    hits[s_tri.kind]++; hits[s_trap.kind]++; hits[s_gauss.kind]++;
  endtask

  function automatic void rand_mf(output int v[5], input int base, input int step);
    v[0] = base + $urandom_range(0, step);
    for (int i = 1; i < 5; i++) v[i] = v[i-1] + $urandom_range(0, step);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int av[5], xv[5];
    // Complete matching (timing diagram).
    set(1, 3, 5, 7, 9, 1, 3, 5, 7, 9);
    expect_sel("match tri", s_tri, MC_FULL, 0, 0);
    expect_sel("match trap", s_trap, MC_FULL, 0, 0);
    expect_sel("match gauss", s_gauss, MC_FULL, 0, 0);
    checks++; if (!full) begin failures++; $display("FAIL full flag"); end
    // Complete mismatch (timing diagram).
    set(1, 3, 5, 7, 9, 'h0A, 'h0C, 'h0E, 'h10, 'h12);
    expect_sel("mismatch tri", s_tri, MC_ZERO, 0, 0);
    expect_sel("mismatch trap", s_trap, MC_ZERO, 0, 0);
    expect_sel("mismatch gauss", s_gauss, MC_ZERO, 0, 0);
    checks++; if (full) begin failures++; $display("FAIL full flag set"); end
    // Triangular worked example, a = 4,6,8 and x = 1,3,5.
    set(4, 6, 8, 200, 210, 1, 3, 5, 150, 160);
    expect_sel("example tri", s_tri, MC_EQ8, 3, 1);
    expect_sel("example trap", s_trap, MC_EQ6, 1, 146);
    expect_sel("example gauss", s_gauss, MC_EQ4, 3, 144);
    // One vector per crossing, A = 10,20,30,40,50.
    set(10, 20, 30, 40, 50, 45, 55, 65, 75, 85);  // X far right
    expect_sel("eq1", s_gauss, MC_EQ1, 15, 5);
    expect_sel("eq5 (far)", s_trap, MC_ZERO, 0, 0);
    set(10, 20, 30, 40, 50, 0, 1, 2, 15, 25);      // X far left
    expect_sel("eq2", s_gauss, MC_EQ2, 5, 15);
    set(10, 20, 30, 40, 50, 22, 32, 42, 52, 62);   // X shifted right by 12
    expect_sel("eq3", s_gauss, MC_EQ3, 12, 8);
    expect_sel("eq5", s_trap, MC_EQ5, 2, 18);
    expect_sel("eq7", s_tri, MC_EQ7, 12, 8);
    set(10, 20, 30, 40, 50, 3, 13, 23, 33, 43);    // X shifted left by 7
    expect_sel("eq4", s_gauss, MC_EQ4, 7, 13);
    expect_sel("eq6 (plateau overlap)", s_trap, MC_FULL, 0, 0);
    expect_sel("eq8", s_tri, MC_EQ8, 7, 13);
    set(10, 20, 30, 40, 50, 0, 5, 15, 25, 60);     // trapezoid left crossing
    expect_sel("eq6", s_trap, MC_EQ6, 5, 15);
    // Random ordered MFs, X placed near A so every condition occurs.
    for (int i = 0; i < 20000; i++) begin
      rand_mf(av, $urandom_range(0, 60), 15);
      rand_mf(xv, $urandom_range(0, 60), 15);
      if (i % 50 == 0) xv = av;
      check_random(av, xv);
    end
    // Each condition must have been met at least once.
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (!hits.exists(md_case_e'(k))) begin
        failures++; $display("FAIL condition %s never occurred", md_case_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
