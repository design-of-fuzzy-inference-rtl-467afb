// mmf_maxmin_calc: multi-membership-function (MMF) MAX-MIN calculator.
//
// The matching degree (MD) between a fuzzified input and an antecedent MF is
// the height of the highest point the two MFs share (the MAX of their MIN).
// Instead of one MF type per circuit, this calculator takes one general
// five-point antecedent A(a1..a5) and one five-point input X(x1..x5) and
// computes, in the same pass, the MD of the triangular (points 1-3),
// trapezoidal (points 1-4) and Gaussian (points 1-5) MFs that these points
// describe. Each MD is found from a short list of conditions on the order of
// the points (no overlap, complete match, or one of eight slope-crossing
// cases) and, for a crossing, from the closed form
// MD = 2^l - 2^l * n/(n+d) with l = 3, 4 and 5 bits for the triangle,
// trapezoid and Gaussian.
//
// Structure: a shared comparator bank (mmf_cond_decoder) selects the
// condition and the two segment lengths per type; three md_grade_unit
// instances turn them into l-bit grades. Two pipeline registers, one after
// the comparator bank and one after the grade units, give a latency of two
// clock cycles and a throughput of one A/X pair per cycle.
//
// Ports
//   clk, rst_n      clock, asynchronous active-low reset (clears valids)
//   in_valid_i      a_i and x_i hold a pair to evaluate this cycle
//   a_i, x_i        antecedent and fuzzified-input MF points, ordered
//   out_valid_o     outputs below hold the result of the pair presented two
//                   cycles earlier
//   h_o             {MD Gaussian[4:0], MD trapezoid[3:0], MD triangle[2:0]}
//   md_*_o          the same three grades separately
//   case_*_o        condition that decided each grade (for monitoring)
//   full_match_o    all five points equal (complete matching)
//
// The 12-bit h word, the grade widths and the equations follow the design.
// The point width (8 bits), the valid handshake, the reset, the two-stage
// pipeline and the separate complete-match flag (the design shows this state
// as h = 1) are this implementation's choices; here a complete match gives
// every grade its top level.
//
// A concurrent assertion checks the two-cycle latency of every accepted
// pair; its disable-iff on the asynchronous reset is the only reason lint
// reports rst_n as used both synchronously and asynchronously.
module mmf_maxmin_calc
  import mmf_pkg::*;
#(
  // Width of the packed result word h.
  localparam int unsigned H_W = L_GAUSS + L_TRAP + L_TRI
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid_i,
  input  mf5_t                a_i,
  input  mf5_t                x_i,
  output logic                out_valid_o,
  output logic [H_W-1:0]      h_o,
  output logic [L_TRI-1:0]    md_tri_o,
  output logic [L_TRAP-1:0]   md_trap_o,
  output logic [L_GAUSS-1:0]  md_gauss_o,
  output md_case_e            case_tri_o,
  output md_case_e            case_trap_o,
  output md_case_e            case_gauss_o,
  output logic                full_match_o
);

  // ---- stage 1: comparator bank ------------------------------------------
  md_sel_t sel_tri, sel_trap, sel_gauss;
  logic    full_match;

  mmf_cond_decoder u_dec (
    .a_i          (a_i),
    .x_i          (x_i),
    .sel_tri_o    (sel_tri),
    .sel_trap_o   (sel_trap),
    .sel_gauss_o  (sel_gauss),
    .full_match_o (full_match)
  );

  md_sel_t s1_tri, s1_trap, s1_gauss;
  logic    s1_full, s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_tri   <= '{kind: MC_ZERO, default: '0};
      s1_trap  <= '{kind: MC_ZERO, default: '0};
      s1_gauss <= '{kind: MC_ZERO, default: '0};
      s1_full  <= 1'b0;
    end else if (in_valid_i) begin
      s1_tri   <= sel_tri;
      s1_trap  <= sel_trap;
      s1_gauss <= sel_gauss;
      s1_full  <= full_match;
    end
  end

  // ---- stage 2: grade units ----------------------------------------------
  logic [L_TRI-1:0]   g_tri;
  logic [L_TRAP-1:0]  g_trap;
  logic [L_GAUSS-1:0] g_gauss;

  md_grade_unit #(.W(PT_W), .L(L_TRI)) u_grade_tri (
    .kind_i (s1_tri.kind), .num_i (s1_tri.num), .dif_i (s1_tri.dif), .md_o (g_tri)
  );
  md_grade_unit #(.W(PT_W), .L(L_TRAP)) u_grade_trap (
    .kind_i (s1_trap.kind), .num_i (s1_trap.num), .dif_i (s1_trap.dif), .md_o (g_trap)
  );
  md_grade_unit #(.W(PT_W), .L(L_GAUSS)) u_grade_gauss (
    .kind_i (s1_gauss.kind), .num_i (s1_gauss.num), .dif_i (s1_gauss.dif), .md_o (g_gauss)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid_o <= 1'b0;
    else        out_valid_o <= s1_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_tri_o     <= '0;
      md_trap_o    <= '0;
      md_gauss_o   <= '0;
      case_tri_o   <= MC_ZERO;
      case_trap_o  <= MC_ZERO;
      case_gauss_o <= MC_ZERO;
      full_match_o <= 1'b0;
    end else if (s1_valid) begin
      md_tri_o     <= g_tri;
      md_trap_o    <= g_trap;
      md_gauss_o   <= g_gauss;
      case_tri_o   <= s1_tri.kind;
      case_trap_o  <= s1_trap.kind;
      case_gauss_o <= s1_gauss.kind;
      full_match_o <= s1_full;
    end
  end

  assign h_o = {md_gauss_o, md_trap_o, md_tri_o};

  // Every accepted pair leaves the pipeline exactly two cycles later.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid_i |-> ##2 out_valid_o);

endmodule
