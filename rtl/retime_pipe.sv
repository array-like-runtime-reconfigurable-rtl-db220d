// retime_pipe: the k pipeline stages of the detector.
//
// A K-deep chain of registers carrying a W-bit payload and a valid bit. The
// detector uses it twice: behind the systolic array for the pipeline ranks
// that are not between tree levels (a synthesis flow with register retiming
// moves them into the MCUs, so that the array's combinational delay C_d is
// cut into k+1 roughly equal pieces and the clock period becomes C_d/(k+1)),
// and beside the array to delay the control of each pass by as many cycles
// as the array's own ranks. Functionally the chain adds
// exactly K cycles of latency and never stalls, so throughput is unchanged.
// K = 0 gives a plain wire. The valid bits are reset (active-low, synchronous);
// the payload is not.
module retime_pipe #(
  parameter int K = 8,              // pipeline stages inserted (k)
  parameter int W = 8               // payload width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  if (K == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [K-1:0]        v_q;
    logic [K-1:0][W-1:0] d_q;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        v_q <= '0;
      end else begin
        v_q[0] <= in_valid;
        for (int i = 1; i < K; i++) v_q[i] <= v_q[i-1];
      end
    end

    always_ff @(posedge clk) begin
      d_q[0] <= in_data;
      for (int i = 1; i < K; i++) d_q[i] <= d_q[i-1];
    end

    assign out_valid = v_q[K-1];
    assign out_data  = d_q[K-1];
  end

endmodule
