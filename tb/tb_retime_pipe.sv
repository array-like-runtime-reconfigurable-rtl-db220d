// tb_retime_pipe: self-checking test of the k-stage pipeline.
//
// Runs the default K = 8 chain with a 16-bit payload. A random stream with
// random valid gaps is driven; a scoreboard of what went in K cycles earlier
// checks that every output valid and payload equals the input delayed by
// exactly K cycles, and that a reset in the middle clears all valid bits.
module tb_retime_pipe;
  localparam int K = 8;
  localparam int W = 16;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         in_valid = 0;
  logic [W-1:0] in_data = '0;
  logic         out_valid;
  logic [W-1:0] out_data;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic         hv [$];
  logic [W-1:0] hd [$];

  retime_pipe #(.K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // history holds the inputs sampled at the last K rising edges
      if (hv.size() == K) begin
        check(out_valid == hv[0], $sformatf("cycle %0d valid %0b want %0b", n, out_valid, hv[0]));
        if (hv[0]) check(out_data == hd[0], $sformatf("cycle %0d data %h want %h", n, out_data, hd[0]));
      end
      if (n == 1000) begin
        rst_n = 0;
        in_valid = 1;
        @(posedge clk); #1;
        @(negedge clk);
        check(out_valid == 0, "valid not cleared by reset");
        rst_n = 1;
        hv.delete(); hd.delete();
        for (int i = 0; i < K; i++) begin hv.push_back(0); hd.push_back('0); end
        // the edge just taken under reset left stage 0 clear as well
        hv.pop_front(); hd.pop_front();
      end
      in_valid = ($urandom % 4) != 0;
      in_data  = W'($urandom);
      @(posedge clk);
      hv.push_back(in_valid); hd.push_back(in_data);
      if (hv.size() > K) begin hv.pop_front(); hd.pop_front(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
