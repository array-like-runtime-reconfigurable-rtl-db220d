// mcu: Metric Computation Unit for one level of the FSD search tree.
//
// Level LEVEL (0 = last detected stream, NT-1 = first) of one search path:
//   b      = y'_i - sum_{j>i} R_ij * s_j          (interference cancellation)
//   s_i    = candidate            (full-expansion level, LEVEL == NT-1)
//          = slice(b / R_ii)      (single-expansion levels)
//   e      = b - R_ii * s_i
//   m_out  = m_in + |e|^2                          (the metric adder)
// The unit is matched to its level: it holds exactly NT-1-LEVEL complex
// multipliers, so upper levels of the tree are cheaper than lower ones. The
// symbols s_j are odd integers of at most 3 bits of magnitude, so each
// product is a small shift-and-add in hardware.
//
// The slicer avoids a divider: each axis of b is compared with R_ii times the
// decision thresholds 0, +-2, +-4, +-6 of the current modulation and the
// number of thresholds exceeded gives the level. Ties go to the lower level.
// R_ii is taken as real and positive (the imaginary part of r_row[LEVEL] is
// ignored), as a QR decomposition with a positive diagonal delivers.
//
// All levels share one port list: the top-level unit does not use mode, and
// the single-expansion units do not use cand.
// Purely combinational; the pipeline registers sit between the levels of
// detector_array and behind it.
// The equations follow the fixed sphere decoder; the threshold slicer and the
// widths are this design's choices.
module mcu
  import fsd_pkg::*;
#(
  parameter int LEVEL = NT-1
) (
  input  cplx_t            y_i,     // y'_LEVEL
  input  cplx_t [NT-1:0]   r_row,   // row LEVEL of R
  input  sym_t  [NT-1:0]   s_in,    // symbols decided at levels above
  input  mod_e             mode,    // modulation of this tone
  input  sym_t             cand,    // candidate (used at full expansion only)
  input  metric_t          m_in,    // metric accumulated above
  output sym_t  [NT-1:0]   s_out,   // s_in with entry LEVEL filled in
  output metric_t          m_out
);

  localparam bit FULL_EXP = (LEVEL == NT-1);

  logic signed [W_B-1:0] b_re, b_im;
  logic signed [W_B-1:0] e_re, e_im;
  logic signed [W_IN-1:0] rii;
  sym_t s_i;

  assign rii = r_row[LEVEL].re;

  // Interference cancellation with the symbols already decided.
  always_comb begin
    b_re = W_B'(y_i.re);
    b_im = W_B'(y_i.im);
    for (int j = LEVEL + 1; j < NT; j++) begin
      b_re = b_re - W_B'(r_row[j].re * s_in[j].re) + W_B'(r_row[j].im * s_in[j].im);
      b_im = b_im - W_B'(r_row[j].re * s_in[j].im) - W_B'(r_row[j].im * s_in[j].re);
    end
  end

  // Symbol decision for this level.
  if (FULL_EXP) begin : g_full
    assign s_i = cand;
  end else begin : g_slice
    mcu_slicer u_re (.x(b_re), .rii(rii), .mode(mode), .s(s_i.re));
    mcu_slicer u_im (.x(b_im), .rii(rii), .mode(mode), .s(s_i.im));
  end

  // Partial Euclidean distance and metric accumulation.
  always_comb begin
    e_re  = b_re - W_B'(rii * s_i.re);
    e_im  = b_im - W_B'(rii * s_i.im);
    m_out = m_in + W_M'(e_re * e_re) + W_M'(e_im * e_im);
    s_out = s_in;
    s_out[LEVEL] = s_i;
  end

endmodule
