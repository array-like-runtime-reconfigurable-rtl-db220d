// fsd_pkg: types, widths and constellation helpers shared by the fixed
// sphere decoder (FSD) detector.
//
// The detector works on one OFDM tone at a time: a rotated receive vector
// y' = Q^H y and the upper-triangular channel factor R of a 4x4 spatially
// multiplexed link, plus the modulation of that tone (QPSK, 16-QAM, 64-QAM).
// Constellation points are held as odd integers on each axis
// (+-1, +-3, ..., +-7); the scale of the constellation is assumed to be
// folded into R by the QR pre-processing, so no normalisation is done here.
//
// Widths: inputs are W_IN-bit signed components. W_B and W_M are chosen so
// that no intermediate can overflow for any input: |R_ij*s_j| per component
// is below 2*2^(W_IN-1)*7, three of them plus y' stay below 2^(W_IN+6), and
// a metric is a sum of four squared-magnitude terms.
package fsd_pkg;

  localparam int NT   = 4;           // spatial streams / tree levels (4x4)
  localparam int W_IN = 12;          // signed width of y' and R components
  localparam int W_B  = W_IN + 7;    // signed width of residuals
  localparam int W_M  = 2*W_B + 2;   // unsigned width of path metrics
  localparam int W_S  = 4;           // signed width of a symbol coordinate
  localparam int W_TAG = 6;          // tone tag (52 data tones per symbol)

  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_16QAM = 2'd1,
    MOD_64QAM = 2'd2
  } mod_e;

  typedef struct packed {
    logic signed [W_IN-1:0] re;
    logic signed [W_IN-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [W_S-1:0] re;
    logic signed [W_S-1:0] im;
  } sym_t;

  typedef logic [W_M-1:0] metric_t;

  // One tone as delivered to the detector. r[i][j] is row i, column j of R;
  // only j >= i is used and r[i][i].re is the (real, positive) diagonal.
  typedef struct packed {
    logic [W_TAG-1:0]        tag;
    mod_e                    mode;
    cplx_t [NT-1:0]          y;
    cplx_t [NT-1:0][NT-1:0]  r;
  } tone_t;

  // Constellation size eta for a mode.
  function automatic int unsigned mod_eta(mod_e m);
    case (m)
      MOD_QPSK:  return 4;
      MOD_16QAM: return 16;
      default:   return 64;
    endcase
  endfunction

  // Levels per axis, sqrt(eta).
  function automatic int unsigned mod_levels(mod_e m);
    case (m)
      MOD_QPSK:  return 2;
      MOD_16QAM: return 4;
      default:   return 8;
    endcase
  endfunction

  // Passes needed per tone with m parallel paths: ceil(eta/m).
  function automatic int unsigned mod_passes(mod_e m, int unsigned par);
    return (mod_eta(m) + par - 1) / par;
  endfunction

  // Constellation point number idx (0..eta-1): low log2(L) bits pick the
  // in-phase level, the rest the quadrature level; level l maps to 2l-(L-1).
  function automatic sym_t mod_point(mod_e m, int unsigned idx);
    int unsigned l;
    sym_t s;
    l = mod_levels(m);
    s.re = W_S'(2*int'(idx % l) - int'(l - 1));
    s.im = W_S'(2*int'(idx / l) - int'(l - 1));
    return s;
  endfunction

endpackage
