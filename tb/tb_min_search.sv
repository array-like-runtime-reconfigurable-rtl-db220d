// tb_min_search: self-checking test of the minimum-metric selection.
//
// Default M = 3. Feeds groups of 1..22 passes ("tones") of M random paths,
// with small metric ranges so that equal metrics are frequent, a partially
// valid last pass, and random idle cycles between and inside tones. The
// expected winner is found by scanning all valid paths in candidate order
// and keeping the first strict minimum. Checks the result, tag and
// modulation one cycle after the last pass, and that out_valid is never
// raised at any other time.
module tb_min_search;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;

  localparam int M = 3;

  logic                     clk = 0, rst_n = 0;
  logic                     in_valid = 0, in_first = 0, in_last = 0;
  logic    [M-1:0]          in_path_valid = '0;
  sym_t    [M-1:0][NT-1:0]  in_path_sym = '0;
  metric_t [M-1:0]          in_path_metric = '0;
  logic    [W_TAG-1:0]      in_tag = '0;
  mod_e                     in_mode = MOD_QPSK;
  logic                     out_valid;
  sym_t    [NT-1:0]         out_sym;
  metric_t                  out_metric;
  logic    [W_TAG-1:0]      out_tag;
  mod_e                     out_mode;

  int checks = 0, failures = 0, results = 0;

  min_search #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, compared on every cycle that out_valid is high.
  sym_t [NT-1:0] exp_sym [$];
  metric_t       exp_met [$];
  int            exp_tag [$];
  mod_e          exp_mode [$];

  always @(negedge clk) if (rst_n && out_valid) begin
    check(exp_sym.size() > 0, "result without a tone");
    if (exp_sym.size() > 0) begin
      check(out_sym == exp_sym[0], "symbols");
      check(out_metric == exp_met[0], "metric");
      check(int'(out_tag) == exp_tag[0],
            $sformatf("tag %0d metric %0d want %0d sym %h want %h", out_tag, out_metric, exp_met[0], out_sym, exp_sym[0]));
      check(out_mode == exp_mode[0], "mode not carried");
      void'(exp_sym.pop_front()); void'(exp_met.pop_front()); void'(exp_tag.pop_front()); void'(exp_mode.pop_front());
      results++;
    end
  end

  initial begin
    sym_t [NT-1:0] best_s;
    metric_t best_m;
    bit have;
    int np, nv;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      np = rnd(1, 22);
      nv = rnd(1, M);          // valid paths in the last pass
      have = 0;
      for (int p = 0; p < np; p++) begin
        @(negedge clk);
        in_valid = 1;
        in_first = (p == 0);
        in_last  = (p == np - 1);
        in_tag   = W_TAG'(t);
        in_mode  = mod_e'(t % 3);
        for (int c = 0; c < M; c++) begin
          in_path_valid[c]  = (p < np - 1) || (c < nv);
          in_path_metric[c] = metric_t'(rnd(0, (t % 2) ? 20 : 1 << 30));
          for (int j = 0; j < NT; j++)
            in_path_sym[c][j] = '{re: W_S'(rnd(-7, 7)), im: W_S'(rnd(-7, 7))};
          if (in_path_valid[c] && (!have || in_path_metric[c] < best_m)) begin
            have = 1; best_m = in_path_metric[c]; best_s = in_path_sym[c];
          end
        end
        if (in_last) begin
          exp_sym.push_back(best_s); exp_mode.push_back(in_mode); exp_met.push_back(best_m); exp_tag.push_back(t % (1 << W_TAG));
        end
        @(posedge clk);
        // random bubble inside or after a tone
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          in_valid = 0;
          in_path_metric = '0;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    check(results == 1000, $sformatf("%0d results, want 1000", results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
