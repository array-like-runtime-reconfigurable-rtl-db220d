// mcu_slicer: one axis of the MCU's nearest-point decision.
//
// Returns the odd level s in {-(L-1), ..., L-1} (L = 2, 4 or 8 levels per
// axis for QPSK, 16-QAM, 64-QAM) nearest to x / rii without dividing: x is
// compared with rii * t for the L-1 thresholds t = -(L-2), ..., L-2 (step 2)
// and the count c of thresholds that x strictly exceeds gives s = 2c-(L-1).
// rii must be positive. Combinational.
module mcu_slicer
  import fsd_pkg::*;
(
  input  logic signed [W_B-1:0]  x,
  input  logic signed [W_IN-1:0] rii,
  input  mod_e                   mode,
  output logic signed [W_S-1:0]  s
);

  always_comb begin
    int unsigned lv;
    int unsigned cnt;
    logic signed [W_B-1:0] thr;
    lv  = mod_levels(mode);
    cnt = 0;
    for (int t = 1; t < 8; t++) begin
      thr = W_B'(rii * W_S'(2*t - int'(lv)));
      if (t < int'(lv) && x > thr) cnt++;
    end
    s = W_S'(2*int'(cnt) - int'(lv - 1));
  end

endmodule
