// mmf_pkg: types and constants shared by the multi-membership-function
// (MMF) MAX-MIN calculator.
//
// A membership function (MF) is described by up to five break points on the
// universe of discourse, p1 <= p2 <= ... <= p5. The triangular MF uses the
// first three points (feet p1, p3, peak p2), the trapezoidal MF the first four
// (feet p1, p4, plateau p2..p3) and the Gaussian MF all five (a piecewise-
// linear approximation with its peak at p3). The matching degree (MD) of each
// type is discretised to 3, 4 and 5 bits respectively, as the design
// specifies; the point width of 8 bits is this design's own choice.
package mmf_pkg;

  // Width of one MF break point.
  localparam int unsigned PT_W = 8;

  // Number of MD bits (levels 2^l) per MF type.
  localparam int unsigned L_TRI   = 3;
  localparam int unsigned L_TRAP  = 4;
  localparam int unsigned L_GAUSS = 5;

  typedef logic [PT_W-1:0] pt_t;

  // Five-point MF, index 0 holds p1.
  typedef pt_t mf5_t [5];

  // Which of the matching conditions decided an MD.
  typedef enum logic [3:0] {
    MC_ZERO    = 4'd0,   // MFs do not overlap: MD = 0
    MC_FULL    = 4'd1,   // all used points equal, or peaks/plateaus overlap
    MC_EQ1     = 4'd2,   // Gaussian, X right of A, outer segments   (eq. 1)
    MC_EQ2     = 4'd3,   // Gaussian, X left of A, outer segments    (eq. 2)
    MC_EQ3     = 4'd4,   // Gaussian, X right of A, inner segments   (eq. 3)
    MC_EQ4     = 4'd5,   // Gaussian, X left of A, inner segments    (eq. 4)
    MC_EQ5     = 4'd6,   // trapezoid, X right of A                  (eq. 5)
    MC_EQ6     = 4'd7,   // trapezoid, X left of A                   (eq. 6)
    MC_EQ7     = 4'd8,   // triangle, X right of A                   (eq. 7)
    MC_EQ8     = 4'd9    // triangle, X left of A                    (eq. 8)
  } md_case_e;

  // Decision for one MF type: the condition and the two segment lengths of
  // the cross-over equation MD = 2^l - 2^l * num / (num + dif).
  typedef struct packed {
    md_case_e  kind;
    pt_t       num;
    pt_t       dif;
  } md_sel_t;

  function automatic logic is_ratio(md_case_e k);
    return !(k inside {MC_ZERO, MC_FULL});
  endfunction

endpackage
