// tb_fsd_detector_power: end-to-end test of the power-optimised design point,
// M = 4 parallel paths and K = 5 pipeline stages, with its clock frequencies
// (18, 71.8 and 287.3 MHz for QPSK, 16-QAM, 64-QAM) and published
// throughputs. With M = 4 every pass is full, so no partial pass occurs.
module tb_fsd_detector_power;
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

  fsd_detector #(.M(4), .K(5)) dut (.*);

  fsd_detector_bench #(.M(4), .K(5), .FREQ_QPSK(18.0), .FREQ_16(71.8), .FREQ_64(287.3),
                       .PUB_TPUT_QPSK(144.0), .PUB_TPUT_16(287.2), .PUB_TPUT_64(430.95))
    bench (.*);

  initial begin
    #1 wait (done === 1'b1);
    $finish;
  end
endmodule
