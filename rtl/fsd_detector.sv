// fsd_detector: runtime-reconfigurable fixed sphere decoder (FSD) MIMO
// detector for 4x4 spatial multiplexing in an 802.11n-style MIMO-OFDM
// receiver.
//
// For every data tone the detector receives the rotated receive vector
// y' = Q^H y and the upper-triangular factor R of the channel (H = QR) and
// decides the 4 transmitted QAM symbols. The FSD search fully expands the
// first-detected stream (all eta constellation points) and follows each of
// these eta branches down the tree with a single nearest-point decision per
// level; the branch with the smallest Euclidean metric ||y' - Rs||^2 wins.
// The search has a fixed, data-independent cost, so the throughput is fixed
// for a given modulation.
//
// Dataflow, all forward:
//   fsd_controller  holds a tone for ceil(eta/M) passes and hands M top-level
//                   candidates per pass to the array
//   detector_array  M columns x 4 levels of Metric Computation Units, with
//                   min(K,3) of the K pipeline ranks between its levels
//   retime_pipe     the other K-min(K,3) ranks (retimed into the MCUs), and
//                   the control of each pass delayed beside the array
//   min_search      minimum over the M columns and over the passes
// The modulation (QPSK, 16-QAM, 64-QAM) is carried with each tone, so the
// detector switches mode on the fly between consecutive tones.
//
// Interface: tones in through in_valid/in_ready/in_tone; one result per tone
// on out_valid (single-cycle pulse, no back-pressure) with the decided
// symbols, the winning metric, the tone's tag and modulation, in tone order.
// Timing: a tone occupies the array for P = ceil(eta/M) cycles; its result
// appears P+K cycles after the clock edge that accepted it. Back-to-back
// tones are accepted every P cycles. Defaults M=3, K=8 are the published
// area-optimised design point (M=4, K=5 is its power-optimised one).
// Synchronous active-low reset.
module fsd_detector
  import fsd_pkg::*;
#(
  parameter int M = 3,              // parallelism m: paths per pass
  parameter int K = 8               // pipeline stages k
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  tone_t             in_tone,
  output logic              out_valid,
  output sym_t  [NT-1:0]    out_sym,
  output metric_t           out_metric,
  output logic [W_TAG-1:0]  out_tag,
  output mod_e              out_mode
);

  // Issue stage.
  logic                iss_valid, iss_first, iss_last;
  tone_t               iss_tone;
  sym_t  [M-1:0]       iss_cand;
  logic  [M-1:0]       iss_cand_valid;

  fsd_controller #(.M(M)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_tone,
    .out_valid      (iss_valid),
    .out_tone       (iss_tone),
    .out_cand       (iss_cand),
    .out_cand_valid (iss_cand_valid),
    .out_first      (iss_first),
    .out_last       (iss_last)
  );

  // Array: SYS of the K ranks sit between tree levels (systolic), the other
  // K-SYS behind the array. The control of each pass is delayed beside the
  // array by the same SYS ranks.
  localparam int SYS = (K < NT-1) ? K : NT-1;

  typedef struct packed {
    logic                     first;
    logic                     last;
    logic [W_TAG-1:0]         tag;
    mod_e                     mode;
    logic    [M-1:0]          pvalid;
  } ctrl_t;

  sym_t    [M-1:0][NT-1:0] arr_sym;
  metric_t [M-1:0]         arr_metric;
  ctrl_t                   ctl_in, ctl_arr;
  logic                    arr_valid;

  detector_array #(.M(M), .SYS(SYS)) u_array (
    .clk,
    .tone        (iss_tone),
    .cand        (iss_cand),
    .path_sym    (arr_sym),
    .path_metric (arr_metric)
  );

  assign ctl_in = '{first: iss_first, last: iss_last, tag: iss_tone.tag,
                    mode: iss_tone.mode, pvalid: iss_cand_valid};

  retime_pipe #(.K(SYS), .W($bits(ctrl_t))) u_ctl_pipe (
    .clk, .rst_n,
    .in_valid  (iss_valid),
    .in_data   (ctl_in),
    .out_valid (arr_valid),
    .out_data  (ctl_arr)
  );

  // Remaining ranks, carrying the paths and their control.
  typedef struct packed {
    ctrl_t                    ctl;
    sym_t    [M-1:0][NT-1:0]  psym;
    metric_t [M-1:0]          pmetric;
  } stage_t;

  stage_t pipe_in, pipe_out;
  logic   pipe_valid;

  assign pipe_in = '{ctl: ctl_arr, psym: arr_sym, pmetric: arr_metric};

  retime_pipe #(.K(K - SYS), .W($bits(stage_t))) u_pipe (
    .clk, .rst_n,
    .in_valid  (arr_valid),
    .in_data   (pipe_in),
    .out_valid (pipe_valid),
    .out_data  (pipe_out)
  );

  // Decision.
  min_search #(.M(M)) u_min (
    .clk, .rst_n,
    .in_valid       (pipe_valid),
    .in_first       (pipe_out.ctl.first),
    .in_last        (pipe_out.ctl.last),
    .in_path_valid  (pipe_out.ctl.pvalid),
    .in_path_sym    (pipe_out.psym),
    .in_path_metric (pipe_out.pmetric),
    .in_tag         (pipe_out.ctl.tag),
    .in_mode        (pipe_out.ctl.mode),
    .out_valid, .out_sym, .out_metric, .out_tag, .out_mode
  );

endmodule
