// tb_detector_array: self-checking test of the systolic MCU array.
//
// Two arrays of M = 3 columns are driven with the same stream: one with the
// default SYS = 3 register ranks between tree levels, one combinational
// (SYS = 0). A new random tone (any modulation) and new random top-level
// candidates are applied every cycle, so every level of the systolic array
// works on a different pass at once. Every column's symbol vector and metric
// are compared with the reference path computation of fsd_ref_pkg, SYS cycles
// later for the pipelined array and at once for the combinational one.
// Noiseless channel tones must give the transmitted vector with zero metric
// in the column whose candidate is the transmitted first-level symbol.
module tb_detector_array;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;

  localparam int M   = 3;
  localparam int SYS = NT - 1;

  logic                     clk = 0;
  tone_t                    tone = '0;
  sym_t    [M-1:0]          cand = '0;
  sym_t    [M-1:0][NT-1:0]  path_sym,    comb_sym;
  metric_t [M-1:0]          path_metric, comb_metric;

  int checks = 0, failures = 0;
  int hits = 0;

  detector_array #(.M(M)) dut (.clk, .tone, .cand, .path_sym, .path_metric);
  detector_array #(.M(M), .SYS(0)) dut_comb (.clk, .tone, .cand,
                                             .path_sym(comb_sym), .path_metric(comb_metric));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected column results, one entry per applied cycle.
  typedef struct {
    sym_t    [M-1:0][NT-1:0] sym;
    metric_t [M-1:0]         met;
    int                      hit_col;   // column that must be exact, or -1
    sym_t    [NT-1:0]        tx;
  } exp_t;

  function automatic bit col_ok(sym_t [NT-1:0] got_s, metric_t got_m,
                                sym_t [NT-1:0] want_s, metric_t want_m);
    return got_s == want_s && got_m == want_m;
  endfunction

  initial begin
    exp_t   q [$];
    exp_t   e, cur;
    ivec_t  txr, txi, sr, si;
    longint met;
    int     idx, cr, ci, l;
    bit     chan;
    for (int n = 0; n < 2000 + SYS; n++) begin
      @(negedge clk);
      // outputs of the pass applied SYS cycles ago
      if (q.size() == SYS) begin
        e = q.pop_front();
        for (int c = 0; c < M; c++)
          check(col_ok(path_sym[c], path_metric[c], e.sym[c], e.met[c]),
                $sformatf("cycle %0d column %0d metric %0d want %0d", n, c,
                          path_metric[c], e.met[c]));
        if (e.hit_col >= 0) begin
          check(path_metric[e.hit_col] == '0 && path_sym[e.hit_col] == e.tx,
                $sformatf("cycle %0d noiseless vector not recovered", n));
          hits++;
        end
      end
      // combinational array, still showing the previous pass
      if (n > 0)
        for (int c = 0; c < M; c++)
          check(col_ok(comb_sym[c], comb_metric[c], cur.sym[c], cur.met[c]),
                $sformatf("cycle %0d combinational column %0d", n, c));
      // new pass
      chan = (n % 2 == 1);
      tone = rand_tone(pick_mode(), n % 52, chan, 0, txr, txi);
      l = ref_levels(tone.mode);
      cur.hit_col = chan ? n % M : -1;
      for (int j = 0; j < NT; j++) cur.tx[j] = '{re: W_S'(txr[j]), im: W_S'(txi[j])};
      for (int c = 0; c < M; c++) begin
        idx = rnd(0, ref_eta(tone.mode) - 1);
        if (c == cur.hit_col)
          idx = (txr[NT-1] + l - 1) / 2 + l * ((txi[NT-1] + l - 1) / 2);
        ref_point(tone.mode, idx, cr, ci);
        cand[c] = '{re: W_S'(cr), im: W_S'(ci)};
        ref_path(tone, idx, sr, si, met);
        cur.met[c] = metric_t'(met);
        for (int j = 0; j < NT; j++) cur.sym[c][j] = '{re: W_S'(sr[j]), im: W_S'(si[j])};
      end
      q.push_back(cur);
    end
    check(hits > 0, "no noiseless tone checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
