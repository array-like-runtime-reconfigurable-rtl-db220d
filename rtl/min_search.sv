// min_search: minimum-metric selection of the FSD detector.
//
// Each cycle the array delivers M candidate paths of one pass. A comparator
// tree picks the valid path with the smallest metric (on equal metrics the
// lower column wins), and a running minimum register compares it with the
// best path of the earlier passes of the same tone (on equal metrics the
// earlier pass wins, so the overall winner is the lowest-numbered candidate
// among the minima). On the first pass of a tone the running minimum is
// restarted; on the last pass the result (symbol vector, metric, tag,
// modulation) is registered to the output with out_valid high for one cycle.
//
// Latency: one cycle after the last pass of a tone. No back-pressure: the
// detector runs at fixed throughput. Synchronous active-low reset of the
// valid flag. The selection follows the fixed sphere decoder (the path with
// the least Euclidean distance is the decision); tie-breaking is this
// design's choice.
module min_search
  import fsd_pkg::*;
#(
  parameter int M = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic                      in_last,
  input  logic    [M-1:0]           in_path_valid,
  input  sym_t    [M-1:0][NT-1:0]   in_path_sym,
  input  metric_t [M-1:0]           in_path_metric,
  input  logic    [W_TAG-1:0]       in_tag,
  input  mod_e                      in_mode,
  output logic                      out_valid,
  output sym_t    [NT-1:0]          out_sym,
  output metric_t                   out_metric,
  output logic    [W_TAG-1:0]       out_tag,
  output mod_e                      out_mode
);

  sym_t [NT-1:0] lane_sym,  best_sym_q,  sel_sym;
  metric_t       lane_met,  best_met_q,  sel_met;
  logic          lane_any;

  // Best valid path of this pass.
  always_comb begin
    lane_any = 1'b0;
    lane_sym = in_path_sym[0];
    lane_met = in_path_metric[0];
    for (int c = 0; c < M; c++) begin
      if (in_path_valid[c] && (!lane_any || in_path_metric[c] < lane_met)) begin
        lane_any = 1'b1;
        lane_sym = in_path_sym[c];
        lane_met = in_path_metric[c];
      end
    end
  end

  // Combine with the best of the earlier passes of this tone.
  always_comb begin
    if (in_first || (lane_any && lane_met < best_met_q)) begin
      sel_sym = lane_sym;
      sel_met = lane_met;
    end else begin
      sel_sym = best_sym_q;
      sel_met = best_met_q;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      best_sym_q <= sel_sym;
      best_met_q <= sel_met;
    end
    if (in_valid && in_last) begin
      out_sym    <= sel_sym;
      out_metric <= sel_met;
      out_tag    <= in_tag;
      out_mode   <= in_mode;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && in_last;
  end

endmodule
