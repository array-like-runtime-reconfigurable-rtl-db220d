// tb_mcu: self-checking test of the Metric Computation Unit.
//
// Instantiates one MCU per tree level (3 = full expansion, 2..0 = single
// expansion with 1..3 interference terms), drives random full-range and
// channel-like inputs for all three modulations, and compares the decided
// symbol, the untouched upper symbols and the accumulated metric with the
// brute-force reference of fsd_ref_pkg. Purely combinational: values are
// checked 1 ns after they are applied.
module tb_mcu;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;

  cplx_t            y_i   [NT];
  cplx_t [NT-1:0]   r_row [NT];
  sym_t  [NT-1:0]   s_in  [NT];
  mod_e             mode;
  sym_t             cand;
  metric_t          m_in;
  sym_t  [NT-1:0]   s_out [NT];
  metric_t          m_out [NT];

  int checks = 0, failures = 0;

  for (genvar lv = 0; lv < NT; lv++) begin : g_dut
    mcu #(.LEVEL(lv)) dut (
      .y_i(y_i[lv]), .r_row(r_row[lv]), .s_in(s_in[lv]), .mode, .cand,
      .m_in, .s_out(s_out[lv]), .m_out(m_out[lv]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tone_t t;
    ivec_t txr, txi, sr, si;
    int rr[NT], ri[NT];
    int cr, ci, dr, di;
    longint ped;
    int l;
    for (int n = 0; n < 3000; n++) begin
      mode = pick_mode();
      t = rand_tone(mode, 0, n % 2 == 1, 0, txr, txi);
      l = ref_levels(mode);
      ref_point(mode, rnd(0, ref_eta(mode) - 1), cr, ci);
      cand = '{re: W_S'(cr), im: W_S'(ci)};
      m_in = W_M'(rnd(0, 1 << 30));
      for (int lv = 0; lv < NT; lv++) begin
        y_i[lv]   = t.y[lv];
        r_row[lv] = t.r[lv];
        for (int j = 0; j < NT; j++) begin
          // upper symbols: the transmitted ones, or random for full-range tones
          sr[j] = (n % 2 == 1) ? txr[j] : 2*rnd(0, l-1) - (l-1);
          si[j] = (n % 2 == 1) ? txi[j] : 2*rnd(0, l-1) - (l-1);
          s_in[lv][j] = '{re: W_S'(sr[j]), im: W_S'(si[j])};
        end
      end
      #1;
      for (int lv = 0; lv < NT; lv++) begin
        for (int j = 0; j < NT; j++) begin
          rr[j] = int'(t.r[lv][j].re);
          ri[j] = int'(t.r[lv][j].im);
          sr[j] = int'(s_in[lv][j].re);
          si[j] = int'(s_in[lv][j].im);
        end
        ref_level(int'(t.y[lv].re), int'(t.y[lv].im), rr, ri, lv, sr, si, mode,
                  lv == NT-1, cr, ci, dr, di, ped);
        check(int'(s_out[lv][lv].re) == dr && int'(s_out[lv][lv].im) == di,
              $sformatf("level %0d mode %s symbol (%0d,%0d) want (%0d,%0d)", lv, mode.name(),
                        s_out[lv][lv].re, s_out[lv][lv].im, dr, di));
        check(longint'(m_out[lv]) == longint'(m_in) + ped,
              $sformatf("level %0d mode %s metric %0d want %0d", lv, mode.name(),
                        m_out[lv], longint'(m_in) + ped));
        for (int j = lv + 1; j < NT; j++)
          check(s_out[lv][j] == s_in[lv][j], $sformatf("level %0d upper symbol %0d changed", lv, j));
      end
      // noiseless channel with the right upper symbols: the slicer must
      // recover the transmitted symbol and add nothing to the metric
      if (n % 2 == 1)
        for (int lv = 0; lv < NT - 1; lv++)
          check(int'(s_out[lv][lv].re) == txr[lv] && int'(s_out[lv][lv].im) == txi[lv] &&
                m_out[lv] == m_in, $sformatf("level %0d noiseless decision", lv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
