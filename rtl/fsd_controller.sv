// fsd_controller: tone sequencer and full-expansion candidate generator.
//
// Accepts one tone (y', R, modulation, tag) through a valid/ready handshake
// and then issues it to the detector array for P = ceil(eta/M) consecutive
// cycles ("passes"). In pass p, column c of the array receives constellation
// point number p*M + c of the tone's own modulation as its top-level
// candidate; columns whose number reaches eta are flagged invalid (only the
// last pass can be partial). first/last mark the first and last pass.
//
// The modulation travels with each tone, so the detector is reconfigured on
// the fly: a tone of another modulation can follow directly, without a flush
// or an idle cycle. in_ready is high when idle or during the last pass of the
// current tone, so back-to-back tones keep the array busy every cycle and a
// tone of modulation eta occupies exactly ceil(eta/M) cycles.
//
// Outputs are driven from registers only (tone, pass counter, active flag).
// Synchronous active-low reset. The pass schedule follows the published
// processing-time formula; the handshake is this design's choice.
module fsd_controller
  import fsd_pkg::*;
#(
  parameter int M = 3               // parallelism: paths per pass
) (
  input  logic                clk,
  input  logic                rst_n,
  // tone input
  input  logic                in_valid,
  output logic                in_ready,
  input  tone_t               in_tone,
  // issue to the array
  output logic                out_valid,
  output tone_t               out_tone,
  output sym_t  [M-1:0]       out_cand,
  output logic  [M-1:0]       out_cand_valid,
  output logic                out_first,
  output logic                out_last
);

  // Pass counter wide enough for the 64-QAM pass count.
  localparam int W_P = $clog2((64 + M - 1) / M + 1);

  logic           active_q;
  logic [W_P-1:0] pass_q;
  tone_t          tone_q;
  logic           last_pass;

  assign last_pass = (int'(pass_q) == int'(mod_passes(tone_q.mode, M)) - 1);
  assign in_ready  = !active_q || last_pass;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      pass_q   <= '0;
      tone_q   <= '0;
    end else if (active_q && !last_pass) begin
      pass_q <= pass_q + 1'b1;
    end else if (in_valid) begin
      active_q <= 1'b1;
      pass_q   <= '0;
      tone_q   <= in_tone;
    end else begin
      active_q <= 1'b0;
    end
  end

  always_comb begin
    out_valid = active_q;
    out_tone  = tone_q;
    out_first = (pass_q == '0);
    out_last  = last_pass;
    for (int c = 0; c < M; c++) begin
      int unsigned idx;
      idx = int'(pass_q) * M + c;
      out_cand_valid[c] = active_q && (idx < mod_eta(tone_q.mode));
      out_cand[c]       = mod_point(tone_q.mode, idx);
    end
  end

  // A tone is held unchanged until its last pass has been issued.
  assert property (@(posedge clk) disable iff (!rst_n)
                   active_q && !last_pass |=> $stable(tone_q) && active_q)
    else $error("fsd_controller: tone changed before its last pass");

endmodule
