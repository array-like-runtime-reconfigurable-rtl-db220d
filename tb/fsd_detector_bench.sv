// fsd_detector_bench: stimulus and checking for a whole fsd_detector.
//
// Connected to the ports of a detector built with parallelism M and K
// pipeline stages (the wrapping testbench instantiates both). It runs:
//   1. one MIMO-OFDM symbol (52 data tones) per modulation, offered at full
//      rate: the 52 tones must occupy exactly 52*ceil(eta/M) cycles; the
//      throughput this gives at the clock frequencies quoted for the design
//      point (FREQ_*) is compared with the published figures (PUB_TPUT_*)
//      and with the 802.11n requirement of 52 tones x 4 streams x log2(eta)
//      bits per 3.6 us, and the symbol must fit the 3000 ns design target;
//   2. MIXED tones of random modulation with random idle gaps, so that the
//      modulation changes on the fly and tones wait for a busy array.
// When finished it prints the TB_RESULT line and raises done; the wrapping
// testbench then ends the simulation. Every result is compared with the brute-force FSD reference, and must
// appear exactly P+K cycles after its tone was accepted (P = ceil(eta/M)).
// Half of the tones are noiseless channel tones, whose decision must be the
// transmitted vector with zero metric. Mechanisms counted (each must occur):
// mode switch, partial last pass, input stall, back-to-back tones, idle gap.
module fsd_detector_bench
  import fsd_pkg::*;
  import fsd_ref_pkg::*;
#(
  parameter int  M = 3,
  parameter int  K = 8,
  parameter int  MIXED = 300,
  parameter real FREQ_QPSK = 38.8,      // MHz, design point clock per mode
  parameter real FREQ_16   = 116.3,
  parameter real FREQ_64   = 426.6,
  parameter real PUB_TPUT_QPSK = 155.0, // Mb/s, published achieved throughput
  parameter real PUB_TPUT_16   = 310.13,
  parameter real PUB_TPUT_64   = 465.38
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              in_valid,
  input  logic              in_ready,
  output tone_t             in_tone,
  input  logic              out_valid,
  input  sym_t  [NT-1:0]    out_sym,
  input  metric_t           out_metric,
  input  logic [W_TAG-1:0]  out_tag,
  input  mod_e              out_mode,
  output logic              done        // raised once the result line is printed
);

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_switch = 0, n_partial = 0, n_stall = 0, n_b2b = 0, n_gap = 0, n_out = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1;
  end

  // Scoreboard of accepted tones, in order.
  tone_t  sb_tone [$];
  longint sb_cyc  [$];
  bit     sb_chan [$];
  sym_t [NT-1:0] sb_tx [$];
  bit            cur_chan;
  sym_t [NT-1:0] cur_tx;

  longint last_acc = -1000;
  int     last_p = 0;
  mod_e   last_mode = MOD_QPSK;
  bit     any_acc = 0;
  longint first_acc_cyc, last_acc_cyc;

  always @(posedge clk) cyc <= cyc + 1;

  // Input side, sampled at the rising edge.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      int p;
      p = (ref_eta(in_tone.mode) + M - 1) / M;
      if (any_acc && in_tone.mode != last_mode) n_switch++;
      if (ref_eta(in_tone.mode) % M != 0) n_partial++;
      if (any_acc && cyc == last_acc + last_p) n_b2b++;
      if (any_acc && cyc > last_acc + last_p) n_gap++;
      if (any_acc) check(cyc >= last_acc + last_p, "tone accepted while the array was busy");
      last_acc = cyc; last_p = p; last_mode = in_tone.mode; any_acc = 1;
      last_acc_cyc = cyc;
      sb_tone.push_back(in_tone); sb_cyc.push_back(cyc);
      sb_chan.push_back(cur_chan); sb_tx.push_back(cur_tx);
    end
    if (in_valid && !in_ready) n_stall++;
  end

  // Output side, sampled after the edge that raised out_valid.
  always @(negedge clk) if (rst_n && out_valid) begin
    tone_t  t;
    ivec_t  er, ei;
    sym_t [NT-1:0] tx;
    longint em, lat;
    bit ok;
    n_out++;
    check(sb_tone.size() > 0, "result without a tone");
    if (sb_tone.size() > 0) begin
      t = sb_tone.pop_front();
      lat = (cyc - 1) - sb_cyc.pop_front();
      tx = sb_tx.pop_front();
      ref_detect(t, er, ei, em);
      ok = (longint'(out_metric) == em) && (out_tag == t.tag) && (out_mode == t.mode);
      for (int j = 0; j < NT; j++)
        ok &= (int'(out_sym[j].re) == er[j]) && (int'(out_sym[j].im) == ei[j]);
      check(ok, $sformatf("tag %0d mode %s metric %0d want %0d", out_tag, t.mode.name(),
                          out_metric, em));
      check(lat == longint'((ref_eta(t.mode) + M - 1) / M + K),
            $sformatf("tag %0d latency %0d cycles, want %0d", out_tag, lat,
                      (ref_eta(t.mode) + M - 1) / M + K));
      if (sb_chan.pop_front()) begin
        ok = (out_metric == '0);
        for (int j = 0; j < NT; j++)
          ok &= (out_sym[j] == tx[j]);
        check(ok, $sformatf("tag %0d noiseless tone not decided to the sent vector", out_tag));
      end
    end
  end

  task automatic send(mod_e m, int tag);
    ivec_t txr, txi;
    cur_chan = ($urandom % 2) == 1;
    in_tone  = rand_tone(m, tag, cur_chan, 0, txr, txi);
    for (int j = 0; j < NT; j++) cur_tx[j] = '{re: W_S'(txr[j]), im: W_S'(txi[j])};
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    while (sb_tone.size() > 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    mod_e   modes [3];
    real    freq  [3];
    real    pub   [3];
    real    req, tput;
    int     p, bits;
    longint span;
    modes = '{MOD_QPSK, MOD_16QAM, MOD_64QAM};
    freq = '{FREQ_QPSK, FREQ_16, FREQ_64};
    pub  = '{PUB_TPUT_QPSK, PUB_TPUT_16, PUB_TPUT_64};
    rst_n = 0; in_valid = 0; in_tone = '0; done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. one MIMO-OFDM symbol per modulation at full rate
    foreach (modes[i]) begin
      any_acc = 0;
      @(negedge clk);
      first_acc_cyc = cyc;
      for (int n = 0; n < 52; n++) send(modes[i], n);
      drain();
      p    = (ref_eta(modes[i]) + M - 1) / M;
      span = last_acc_cyc + p - first_acc_cyc;
      check(span == 52 * p, $sformatf("%s: 52 tones took %0d cycles, want %0d",
                                      modes[i].name(), span, 52 * p));
      bits = 52 * NT * $clog2(ref_eta(modes[i]));
      tput = real'(bits) * freq[i] / real'(span);
      req  = real'(bits) / 3.6;
      $display("%s: %0d cycles per symbol, %0.1f ns at %0.1f MHz, %0.2f Mb/s (needs %0.1f)",
               modes[i].name(), span, real'(span) * 1000.0 / freq[i], freq[i], tput, req);
      check(real'(span) * 1000.0 / freq[i] <= 3000.0,
            $sformatf("%s: symbol takes over the 3000 ns design target", modes[i].name()));
      check(tput >= req, $sformatf("%s throughput %0.2f below %0.2f Mb/s", modes[i].name(), tput, req));
      check(tput > pub[i] * 0.995 && tput < pub[i] * 1.005,
            $sformatf("%s throughput %0.2f, published %0.2f", modes[i].name(), tput, pub[i]));
    end

    // 2. mixed modulations, random gaps
    for (int n = 0; n < MIXED; n++) begin
      send(pick_mode(), n % 52);
      if ($urandom % 4 == 0) repeat (1 + $urandom % 30) @(negedge clk);
    end
    drain();

    check(n_out == 156 + MIXED, $sformatf("%0d results, want %0d", n_out, 156 + MIXED));
    $display("mechanisms: mode switches %0d, partial last passes %0d, input stalls %0d, back-to-back %0d, idle gaps %0d",
             n_switch, n_partial, n_stall, n_b2b, n_gap);
    check(n_switch > 0, "no mode switch");
    check(n_stall > 0, "no input stall");
    check(n_b2b > 0, "no back-to-back tones");
    check(n_gap > 0, "no idle gap");
    if (M != 1 && M != 2 && M != 4) check(n_partial > 0, "no partial last pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1;
  end
endmodule
