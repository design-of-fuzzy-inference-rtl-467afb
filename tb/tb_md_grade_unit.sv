// tb_md_grade_unit: self-checking test of md_grade_unit.
//
// Three instances (l = 3, 4, 5 bits) are driven with the same segment
// lengths. The expected grade is worked out with integer division,
// MD = 2^l - floor(2^l*n/(n+d)) saturated to 2^l - 1, independently of the
// restoring divider in the unit. Covers the worked example of the design
// (n = 3, d = 1, l = 3 gives MD = 2), all small n/d pairs exhaustively, a
// random sweep of 8-bit lengths, and the MC_ZERO / MC_FULL overrides.
module tb_md_grade_unit;
  import mmf_pkg::*;

  md_case_e kind;
  pt_t      num, dif;
  logic [2:0] md3;
  logic [3:0] md4;
  logic [4:0] md5;
  int checks = 0, failures = 0;

  md_grade_unit #(.W(PT_W), .L(3)) dut3 (.kind_i(kind), .num_i(num), .dif_i(dif), .md_o(md3));
  md_grade_unit #(.W(PT_W), .L(4)) dut4 (.kind_i(kind), .num_i(num), .dif_i(dif), .md_o(md4));
  md_grade_unit #(.W(PT_W), .L(5)) dut5 (.kind_i(kind), .num_i(num), .dif_i(dif), .md_o(md5));

  function automatic int ref_md(md_case_e k, int n, int d, int l);
    int full = (1 << l) - 1;
    int q;
    if (k == MC_ZERO) return 0;
    if (k == MC_FULL) return full;
    if (n + d == 0) return full;
    if (d == 0) return 0;
    q = (n * (1 << l)) / (n + d);
    return (q == 0) ? full : (1 << l) - q;
  endfunction

  task automatic check(md_case_e k, int n, int d);
    kind = k; num = pt_t'(n); dif = pt_t'(d);
    #1;
    checks += 3;
    if (int'(md3) != ref_md(k, n, d, 3)) begin
      failures++; $display("FAIL l=3 k=%s n=%0d d=%0d got %0d exp %0d", k.name(), n, d, md3, ref_md(k, n, d, 3));
    end
    if (int'(md4) != ref_md(k, n, d, 4)) begin
      failures++; $display("FAIL l=4 k=%s n=%0d d=%0d got %0d exp %0d", k.name(), n, d, md4, ref_md(k, n, d, 4));
    end
    if (int'(md5) != ref_md(k, n, d, 5)) begin
      failures++; $display("FAIL l=5 k=%s n=%0d d=%0d got %0d exp %0d", k.name(), n, d, md5, ref_md(k, n, d, 5));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: a = (4,6,8), x = (1,3,5): n = a2-x2 = 3, d = x3-a1 = 1.
    check(MC_EQ8, 3, 1);
    checks++;
    if (md3 !== 3'd2) begin failures++; $display("FAIL worked example md3=%0d", md3); end
    // Half-way crossing: grade 1/2 on every resolution.
    check(MC_EQ1, 5, 5);
    checks++;
    if (md3 !== 3'd4 || md4 !== 4'd8 || md5 !== 5'd16) begin
      failures++; $display("FAIL half grade %0d %0d %0d", md3, md4, md5);
    end
    for (int n = 0; n < 20; n++)
      for (int d = 0; d < 20; d++) check(MC_EQ5, n, d);
    for (int i = 0; i < 2000; i++) check(MC_EQ3, $urandom_range(0, 255), $urandom_range(0, 255));
    check(MC_ZERO, 0, 0);
    check(MC_ZERO, 3, 7);
    check(MC_FULL, 9, 1);
    check(MC_FULL, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
