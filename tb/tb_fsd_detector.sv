// tb_fsd_detector: end-to-end test of the detector at its default
// parameters (M = 3 parallel paths, K = 8 pipeline stages, the area-optimised
// design point). Runs one 52-tone MIMO-OFDM symbol in each of QPSK, 16-QAM
// and 64-QAM at full rate, then 300 tones of mixed modulation; checking is in
// fsd_detector_bench, whose M and K must match the detector's defaults.
module tb_fsd_detector;
  import fsd_pkg::*;

  logic              clk = 0;
  logic              rst_n, in_valid, in_ready, out_valid;
  tone_t             in_tone;
  sym_t  [NT-1:0]    out_sym;
  metric_t           out_metric;
  logic [W_TAG-1:0]  out_tag;
  mod_e              out_mode;
  logic              done;

  always #1 clk = ~clk;

  fsd_detector dut (.*);

  fsd_detector_bench #(.M(3), .K(8)) bench (.*);

  initial begin
    #1 wait (done === 1'b1);
    $finish;
  end
endmodule
