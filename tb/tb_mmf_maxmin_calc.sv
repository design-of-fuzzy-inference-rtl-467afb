// tb_mmf_maxmin_calc: end-to-end test of the MMF MAX-MIN calculator at its
// default sizes.
//
// Replays the design's timing-diagram cases (complete matching with
// A = X = 01,03,05,07,09; complete mismatch against X = 0A,0C,0E,10,12; the
// triangular example a = 4,6,8, x = 1,3,5 with h = 000000000010), then a
// random stream of ordered MF pairs with random idle cycles. A scoreboard
// holds the expected result of every accepted pair, worked out with the
// reference model, and checks that it leaves the pipeline exactly two cycles
// after it entered, in order. Counts how often each mechanism occurred
// (every condition of every MF type, complete match, idle bubbles,
// back-to-back pairs, saturation of a crossing to the top grade) and fails a
// mechanism that never occurred.
module tb_mmf_maxmin_calc;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;

  localparam int LATENCY = 2;

  typedef struct {
    int     h;
    md_case_e kt, kp, kg;
    bit     full;
    int     t_in;
  } exp_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  mf5_t a, x;
  logic out_valid;
  logic [11:0] h;
  logic [L_TRI-1:0] md_tri;
  logic [L_TRAP-1:0] md_trap;
  logic [L_GAUSS-1:0] md_gauss;
  md_case_e c_tri, c_trap, c_gauss;
  logic full;

  int checks = 0, failures = 0, cycle = 0;
  exp_t q[$];
  int hit_tri[md_case_e], hit_trap[md_case_e], hit_gauss[md_case_e];
  int n_full = 0, n_bubble = 0, n_b2b = 0, n_sat = 0;
  logic prev_valid = 0;

  mmf_maxmin_calc dut (
    .clk, .rst_n, .in_valid_i(in_valid), .a_i(a), .x_i(x),
    .out_valid_o(out_valid), .h_o(h), .md_tri_o(md_tri), .md_trap_o(md_trap),
    .md_gauss_o(md_gauss), .case_tri_o(c_tri), .case_trap_o(c_trap),
    .case_gauss_o(c_gauss), .full_match_o(full)
  );

  always #5 clk = ~clk;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t expected(int av[5], int xv[5]);
    exp_t e;
    md_sel_t st = ref_sel(3, av, xv), sp = ref_sel(4, av, xv), sg = ref_sel(5, av, xv);
    e.h    = (ref_md(sg, 5) << 7) | (ref_md(sp, 4) << 3) | ref_md(st, 3);
    e.kt   = st.kind;
    e.kp   = sp.kind;
    e.kg   = sg.kind;
    e.full = (av == xv);
    e.t_in = cycle;
    return e;
  endfunction

  // Present one pair for one cycle (inputs change away from the clock edge).
  task automatic send(int av[5], int xv[5]);
    exp_t e;
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin a[i] = pt_t'(av[i]); x[i] = pt_t'(xv[i]); end
    in_valid = 1;
    e = expected(av, xv);
    e.t_in = cycle;
    q.push_back(e);
    if (prev_valid) n_b2b++;
    if (e.full) n_full++;
    hit_tri[e.kt]++; hit_trap[e.kp]++; hit_gauss[e.kg]++;
    begin
      md_sel_t s[3] = '{ref_sel(3, av, xv), ref_sel(4, av, xv), ref_sel(5, av, xv)};
      // A crossing saturates when floor(2^l*n/(n+d)) = 0, l = 3 + k.
      for (int k = 0; k < 3; k++)
        if (is_ratio(s[k].kind) && s[k].dif != 0 &&
            (int'(s[k].num) << (3 + k)) < int'(s[k].num) + int'(s[k].dif)) n_sat++;
    end
    prev_valid = 1;
  endtask

  task automatic idle(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 0;
      a = '{default: '0};
      x = '{default: '0};
      prev_valid = 0;
      n_bubble++;
    end
  endtask

  // Scoreboard: compare every output word with the oldest expected one.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL output with nothing expected at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (int'(h) != e.h || c_tri != e.kt || c_trap != e.kp || c_gauss != e.kg ||
            full != e.full || h != {md_gauss, md_trap, md_tri}) begin
          failures++;
          $display("FAIL cycle %0d: h=%03h (%s %s %s) full=%0d, exp %03h (%s %s %s) full=%0d",
                   cycle, h, c_gauss.name(), c_trap.name(), c_tri.name(), full,
                   e.h, e.kg.name(), e.kp.name(), e.kt.name(), e.full);
        end
        checks++;
        if (cycle - e.t_in != LATENCY) begin
          failures++; $display("FAIL latency %0d cycles, expected %0d", cycle - e.t_in, LATENCY);
        end
      end
    end
  end

  function automatic void rand_mf(output int v[5], input int base, input int step);
    v[0] = base + $urandom_range(0, step);
    for (int i = 1; i < 5; i++) v[i] = v[i-1] + $urandom_range(0, step);
  endfunction

  initial begin
    int av[5], xv[5];
    a = '{default: '0};
    x = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Timing-diagram cases.
    av = '{1, 3, 5, 7, 9};
    send(av, av);
    xv = '{'h0A, 'h0C, 'h0E, 'h10, 'h12};
    send(av, xv);
    av = '{4, 6, 8, 0, 0};     // only the triangle is defined
    xv = '{1, 3, 5, 0, 0};
    send(av, xv);
    idle(1);
    repeat (LATENCY) @(posedge clk);
    #1;
    // Directed check of the worked example: h = 000000000010.
    checks++;
    if (h !== 12'b000000000010) begin failures++; $display("FAIL worked example h=%b", h); end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL directed results missing"); end

    // Random stream.
    for (int i = 0; i < 30000; i++) begin
      rand_mf(av, $urandom_range(0, 80), 20);
      rand_mf(xv, $urandom_range(0, 80), 20);
      if ($urandom_range(0, 40) == 0) xv = av;
      send(av, xv);
      if ($urandom_range(0, 9) == 0) idle($urandom_range(1, 3));
    end
    idle(LATENCY + 2);

    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results never appeared", q.size()); end

    // Every mechanism must have occurred.
    for (int k = 0; k < 10; k++) begin
      automatic md_case_e c = md_case_e'(k);
      automatic bit ok;
      case (c)
        MC_EQ1, MC_EQ2, MC_EQ3, MC_EQ4: ok = hit_gauss.exists(c);
        MC_EQ5, MC_EQ6:                 ok = hit_trap.exists(c);
        MC_EQ7, MC_EQ8:                 ok = hit_tri.exists(c);
        default: ok = hit_tri.exists(c) && hit_trap.exists(c) && hit_gauss.exists(c);
      endcase
      checks++;
      if (!ok) begin failures++; $display("FAIL condition %s never occurred", c.name()); end
    end
    checks += 4;
    if (n_full == 0)   begin failures++; $display("FAIL no complete match"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no idle cycle"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back pairs"); end
    if (n_sat == 0)    begin failures++; $display("FAIL no saturated crossing"); end
    $display("complete matches %0d, idle cycles %0d, back-to-back %0d, saturated %0d",
             n_full, n_bubble, n_b2b, n_sat);
    for (int k = 0; k < 10; k++)
      $display("%-8s tri %0d trap %0d gauss %0d", md_case_e'(k),
               hit_tri.exists(md_case_e'(k)) ? hit_tri[md_case_e'(k)] : 0,
               hit_trap.exists(md_case_e'(k)) ? hit_trap[md_case_e'(k)] : 0,
               hit_gauss.exists(md_case_e'(k)) ? hit_gauss[md_case_e'(k)] : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
