// fsd_ref_pkg: reference model and stimulus for the FSD detector testbenches.
//
// The reference works on plain integers and decides every single-expansion
// level by brute force: it tries every point of the constellation and keeps
// the one with the smallest squared distance (first one found on a tie,
// scanning quadrature level then in-phase level upwards), so it shares no
// code with the threshold slicer of the RTL. rand_tone() builds random tones:
// either full-range values that exercise the widest intermediates, or a
// "channel" tone y' = R s (+ small noise) from a known transmitted vector s
// with R small enough that y' fits in the input width.
package fsd_ref_pkg;
  import fsd_pkg::*;

  typedef int ivec_t [NT];

  function automatic int ref_levels(mod_e m);
    if (m == MOD_QPSK)  return 2;
    if (m == MOD_16QAM) return 4;
    return 8;
  endfunction

  function automatic int ref_eta(mod_e m);
    return ref_levels(m) * ref_levels(m);
  endfunction

  function automatic void ref_point(mod_e m, int idx, output int pr, output int pi);
    int l;
    l  = ref_levels(m);
    pr = -(l - 1) + 2 * (idx % l);
    pi = -(l - 1) + 2 * (idx / l);
  endfunction

  // One tree level: residual, decision (brute force or given), PED.
  function automatic void ref_level(input int yr, input int yi,
                                    input int rr[NT], input int ri[NT],
                                    input int lvl, input ivec_t sr, input ivec_t si,
                                    input mod_e m, input bit full, input int cr, input int ci,
                                    output int dr, output int di, output longint ped);
    longint br, bi, best, d, er, ei;
    int l, pr, pi;
    br = yr; bi = yi;
    for (int j = lvl + 1; j < NT; j++) begin
      br -= longint'(rr[j]) * sr[j] - longint'(ri[j]) * si[j];
      bi -= longint'(rr[j]) * si[j] + longint'(ri[j]) * sr[j];
    end
    if (full) begin
      dr = cr; di = ci;
    end else begin
      l = ref_levels(m);
      best = -1;
      for (int q = 0; q < l; q++)
        for (int p = 0; p < l; p++) begin
          pr = 2*p - (l-1); pi = 2*q - (l-1);
          er = br - longint'(rr[lvl]) * pr;
          ei = bi - longint'(rr[lvl]) * pi;
          d  = er*er + ei*ei;
          if (best < 0 || d < best) begin best = d; dr = pr; di = pi; end
        end
    end
    er  = br - longint'(rr[lvl]) * dr;
    ei  = bi - longint'(rr[lvl]) * di;
    ped = er*er + ei*ei;
  endfunction

  // Whole path for top-level candidate number idx.
  function automatic void ref_path(input tone_t t, input int idx,
                                   output ivec_t sr, output ivec_t si, output longint metric);
    int rr[NT], ri[NT];
    int cr, ci, dr, di;
    longint ped;
    sr = '{default: 0}; si = '{default: 0};
    metric = 0;
    ref_point(t.mode, idx, cr, ci);
    for (int lvl = NT - 1; lvl >= 0; lvl--) begin
      for (int j = 0; j < NT; j++) begin
        rr[j] = int'(t.r[lvl][j].re);
        ri[j] = int'(t.r[lvl][j].im);
      end
      ref_level(int'(t.y[lvl].re), int'(t.y[lvl].im), rr, ri, lvl, sr, si,
                t.mode, lvl == NT - 1, cr, ci, dr, di, ped);
      sr[lvl] = dr; si[lvl] = di;
      metric += ped;
    end
  endfunction

  // Full FSD decision: best of all eta paths, lowest candidate on a tie.
  function automatic void ref_detect(input tone_t t,
                                     output ivec_t sr, output ivec_t si, output longint metric);
    ivec_t pr, pi;
    longint pm;
    metric = -1;
    for (int idx = 0; idx < ref_eta(t.mode); idx++) begin
      ref_path(t, idx, pr, pi, pm);
      if (metric < 0 || pm < metric) begin metric = pm; sr = pr; si = pi; end
    end
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // Random tone. channel = 0: full-range y' and R. channel = 1: y' = R s + n
  // with |R| components <= 36 and |n| <= noise; s is returned in txr/txi.
  function automatic tone_t rand_tone(input mod_e m, input int tag, input bit channel,
                                      input int noise, output ivec_t txr, output ivec_t txi);
    tone_t t;
    int lim, l, acr, aci;
    t = '0;
    t.mode = m;
    t.tag  = W_TAG'(tag);
    lim = channel ? 36 : 2047;
    l = ref_levels(m);
    for (int i = 0; i < NT; i++) begin
      txr[i] = 2*rnd(0, l-1) - (l-1);
      txi[i] = 2*rnd(0, l-1) - (l-1);
    end
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++) begin
        if (j == i) begin
          t.r[i][j].re = W_IN'(rnd(1, lim));
          t.r[i][j].im = '0;
        end else if (j > i) begin
          t.r[i][j].re = W_IN'(rnd(-lim, lim));
          t.r[i][j].im = W_IN'(rnd(-lim, lim));
        end
      end
    for (int i = 0; i < NT; i++) begin
      if (channel) begin
        acr = rnd(-noise, noise); aci = rnd(-noise, noise);
        for (int j = i; j < NT; j++) begin
          acr += int'(t.r[i][j].re) * txr[j] - int'(t.r[i][j].im) * txi[j];
          aci += int'(t.r[i][j].re) * txi[j] + int'(t.r[i][j].im) * txr[j];
        end
        t.y[i].re = W_IN'(acr);
        t.y[i].im = W_IN'(aci);
      end else begin
        t.y[i].re = W_IN'(rnd(-2048, 2047));
        t.y[i].im = W_IN'(rnd(-2048, 2047));
      end
    end
    return t;
  endfunction

  function automatic mod_e pick_mode();
    case ($urandom % 3)
      0:       return MOD_QPSK;
      1:       return MOD_16QAM;
      default: return MOD_64QAM;
    endcase
  endfunction

endpackage
