// md_grade_unit: discrete matching degree of one membership-function type.
//
// For a cross-over condition the two MFs meet where their facing slopes
// intersect. With n and d the two horizontal segment lengths that enter the
// equation, the grade of the crossing is 1 - n/(n+d), and the discrete MD on
// L bits is
//
//     MD = 2^L - floor(2^L * n / (n + d))
//
// saturated to 2^L - 1, the top level of the L-bit grade (a grade of exactly
// 1 cannot be written on L bits). The quotient floor(2^L*n/(n+d)) is formed
// by an L-step restoring division of n by n+d (n < n+d whenever d > 0, so
// only fraction bits are produced). d = 0 means the slopes touch at grade 0
// and gives MD = 0; n = d = 0 (degenerate, zero-width slopes) gives the top
// level. MC_ZERO gives 0 and MC_FULL gives the top level.
//
// The equation is the one of the design; the truncating division, the
// saturation of the top level and the handling of zero-length segments are
// this implementation's choices.
//
// Purely combinational; the caller registers the result.
//
// Ports
//   kind_i  condition that holds for this MF type (mmf_pkg::md_case_e)
//   num_i   segment length n of the equation
//   dif_i   segment length d of the equation
//   md_o    L-bit matching degree
module md_grade_unit
  import mmf_pkg::*;
#(
  parameter int unsigned W = PT_W,
  parameter int unsigned L = L_TRI
) (
  input  md_case_e       kind_i,
  input  logic [W-1:0]   num_i,
  input  logic [W-1:0]   dif_i,
  output logic [L-1:0]   md_o
);

  localparam logic [L-1:0] MD_MAX = '1;

  logic [W:0]   den;
  logic [W+1:0] rem;
  logic [L-1:0] q;

  // L-step restoring division: q = floor(2^L * num / den) for num < den.
  always_comb begin
    den = {1'b0, num_i} + {1'b0, dif_i};
    rem = {2'b00, num_i};
    q   = '0;
    for (int i = L - 1; i >= 0; i--) begin
      rem = rem << 1;
      if (rem >= {1'b0, den}) begin
        rem  = rem - {1'b0, den};
        q[i] = 1'b1;
      end
    end
  end

  always_comb begin
    unique case (kind_i)
      MC_ZERO: md_o = '0;
      MC_FULL: md_o = MD_MAX;
      default: begin
        if (den == '0)             md_o = MD_MAX;   // zero-width slopes
        else if (dif_i == '0)      md_o = '0;       // slopes meet at grade 0
        else if (q == '0)          md_o = MD_MAX;   // 2^L saturates
        else                       md_o = (~q) + L'(1);  // 2^L - q
      end
    endcase
  end

endmodule
