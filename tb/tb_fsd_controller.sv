// tb_fsd_controller: self-checking test of the tone sequencer.
//
// Default M = 3. Tones of random modulation are offered with random idle
// gaps and sometimes held valid while the controller is busy. A model of the
// expected schedule checks for every issued cycle: the tone issued, the pass
// number (first/last flags), each column's candidate (point p*M + c of the
// tone's modulation) and its valid flag, and that a tone of constellation
// size eta occupies exactly ceil(eta/M) cycles. Counts mode switches between
// consecutive tones, partial last passes and back-pressure stalls.
module tb_fsd_controller;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;

  localparam int M = 3;

  logic           clk = 0, rst_n = 0;
  logic           in_valid = 0, in_ready;
  tone_t          in_tone = '0;
  logic           out_valid, out_first, out_last;
  tone_t          out_tone;
  sym_t  [M-1:0]  out_cand;
  logic  [M-1:0]  out_cand_valid;

  int checks = 0, failures = 0;
  int n_switch = 0, n_partial = 0, n_stall = 0, n_tones = 0;

  fsd_controller #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected issue stream.
  tone_t exp_q [$];
  tone_t cur;
  int    pass = -1;
  mod_e  last_mode = MOD_QPSK;

  always @(posedge clk) if (rst_n) begin
    // check what is on the issue port in this cycle
    if (out_valid) begin
      if (pass < 0) begin
        check(exp_q.size() > 0, "issue without a tone");
        if (exp_q.size() > 0) begin
          cur = exp_q.pop_front();
          pass = 0;
          if (n_tones > 0 && cur.mode != last_mode) n_switch++;
          last_mode = cur.mode;
          n_tones++;
        end
      end
      check(out_tone == cur, "wrong tone issued");
      check(out_first == (pass == 0), $sformatf("first flag wrong in pass %0d", pass));
      check(out_last == (pass == (ref_eta(cur.mode) + M - 1) / M - 1),
            $sformatf("last flag wrong in pass %0d mode %s", pass, cur.mode.name()));
      for (int c = 0; c < M; c++) begin
        int pr, pi;
        ref_point(cur.mode, pass * M + c, pr, pi);
        check(out_cand_valid[c] == (pass * M + c < ref_eta(cur.mode)),
              $sformatf("candidate valid wrong pass %0d col %0d", pass, c));
        if (pass * M + c < ref_eta(cur.mode))
          check(int'(out_cand[c].re) == pr && int'(out_cand[c].im) == pi,
                $sformatf("candidate wrong pass %0d col %0d", pass, c));
        else if (c == M - 1) n_partial++;
      end
      pass = out_last ? -1 : pass + 1;
    end else begin
      check(pass < 0, "issue stopped in the middle of a tone");
    end
    // accepted tone
    if (in_valid && in_ready) exp_q.push_back(in_tone);
    if (in_valid && !in_ready) n_stall++;
  end

  initial begin
    ivec_t txr, txi;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_tone  = rand_tone(pick_mode(), n % 52, 0, 0, txr, txi);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      if ($urandom % 3 == 0) repeat ($urandom % 5) @(negedge clk);
    end
    repeat (30) @(posedge clk);
    check(n_tones == 300, $sformatf("%0d tones issued, want 300", n_tones));
    check(n_switch > 0 && n_partial > 0 && n_stall > 0,
          $sformatf("mechanisms switch=%0d partial=%0d stall=%0d", n_switch, n_partial, n_stall));
    $display("mode switches %0d, partial passes %0d, stalled cycles %0d", n_switch, n_partial, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
