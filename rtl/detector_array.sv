// detector_array: the systolic array of Metric Computation Units of the FSD
// detector.
//
// M columns, one per search path, each a chain of NT MCUs ordered from the
// top of the tree (level NT-1, full expansion with the column's candidate)
// down to level 0 (single expansion by slicing). Every MCU is matched to its
// level, and data flows only forward: each column hands its partial symbol
// vector and metric down to the next level, and the tone (y', R, modulation)
// travels down beside the columns. All columns see the same tone; only the
// top-level candidate differs. M paths are evaluated per pass, so a tone of
// constellation size eta needs ceil(eta/M) passes.
//
// Pipelining: SYS register ranks (0..NT-1) sit between tree levels, the first
// one below the top level, so the array is systolic: with SYS = NT-1 each
// level works on a different pass in the same cycle. A new pass can enter
// every cycle and its results leave SYS cycles later. SYS = 0 gives a purely
// combinational array. The registers hold data only (no reset); the valid and
// control bits of a pass are delayed beside the array by the caller. Any
// further pipeline ranks of the design sit behind the array (retime_pipe) and
// are moved into the MCUs by retiming. The column/row organisation follows
// the published design; the rank placement is this design's choice.
// The tone's tag is not used here (it travels beside the array).
module detector_array
  import fsd_pkg::*;
#(
  parameter int M   = 3,            // parallelism: paths per pass
  parameter int SYS = NT-1          // register ranks between tree levels
) (
  input  logic                      clk,
  input  tone_t                     tone,
  input  sym_t    [M-1:0]           cand,        // top-level candidates
  output sym_t    [M-1:0][NT-1:0]   path_sym,    // detected vector per path
  output metric_t [M-1:0]           path_metric  // Euclidean metric per path
);

  // Boundary below level lv (between lv and lv-1) is number NT-1-lv; it is
  // registered when that number is below SYS.
  function automatic bit reg_below(int lv);
    return (NT - 1 - lv) < SYS;
  endfunction

  // tone_at[lv]: the tone as seen by level lv.
  tone_t tone_at [NT];
  assign tone_at[NT-1] = tone;

  for (genvar lv = NT-1; lv > 0; lv--) begin : g_tone
    if (reg_below(lv)) begin : g_reg
      always_ff @(posedge clk) tone_at[lv-1] <= tone_at[lv];
    end else begin : g_wire
      assign tone_at[lv-1] = tone_at[lv];
    end
  end

  for (genvar c = 0; c < M; c++) begin : g_col
    // *_in[lv]: what level lv receives from above; *_out[lv]: what it yields.
    sym_t    [NT-1:0] s_in  [NT];
    sym_t    [NT-1:0] s_out [NT];
    metric_t          m_in  [NT];
    metric_t          m_out [NT];

    assign s_in[NT-1] = '0;
    assign m_in[NT-1] = '0;

    for (genvar lv = NT-1; lv >= 0; lv--) begin : g_lvl
      mcu #(.LEVEL(lv)) u_mcu (
        .y_i   (tone_at[lv].y[lv]),
        .r_row (tone_at[lv].r[lv]),
        .s_in  (s_in[lv]),
        .mode  (tone_at[lv].mode),
        .cand  (cand[c]),
        .m_in  (m_in[lv]),
        .s_out (s_out[lv]),
        .m_out (m_out[lv])
      );

      if (lv > 0) begin : g_link
        if (reg_below(lv)) begin : g_reg
          always_ff @(posedge clk) begin
            s_in[lv-1] <= s_out[lv];
            m_in[lv-1] <= m_out[lv];
          end
        end else begin : g_wire
          assign s_in[lv-1] = s_out[lv];
          assign m_in[lv-1] = m_out[lv];
        end
      end
    end

    assign path_sym[c]    = s_out[0];
    assign path_metric[c] = m_out[0];
  end

endmodule
