// Testbench for feature_extract: feeds a stream of normalized samples, some of them not
// taken (fire low), and checks every input vector against a reference history: elements
// 0..HIST-1 are the last HIST latencies (oldest first, zeros after reset) and the rest the
// state values, each rounded from Q3.12 to Q0.7 and clipped at 127.
module tb_feature_extract;
  import lstm_ref_pkg::*;
  localparam int HIST = 10, NS = 6, IN = HIST + NS;
  logic clk = 0, rst_n = 0, fire = 0;
  logic signed [15:0] lat_n = 0; logic signed [15:0] state_n [NS];
  logic [IN-1:0][7:0] vec;
  int checks = 0, failures = 0;
  int hist [$];
  always #5 clk = ~clk;
  feature_extract #(.HIST(HIST), .NS(NS)) dut (.*);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int s = 0; s < NS; s++) state_n[s] = 0;
    for (int i = 0; i < HIST; i++) hist.push_back(0);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int lq;
      @(negedge clk);
      lat_n = 16'($urandom_range(4096, 0));
      for (int s = 0; s < NS; s++) state_n[s] = 16'($urandom_range(4096, 0));
      fire = ($urandom_range(3, 0) != 0);
      #1;
      lq = int'(rq(lat_n, 5, 8));
      for (int i = 0; i < HIST - 1; i++) begin
        checks++;
        if (int'(vec[i]) != hist[i+1]) begin failures++; $display("n=%0d vec[%0d]=%0d exp %0d", n, i, vec[i], hist[i+1]); end
      end
      checks++;
      if (int'(vec[HIST-1]) != lq) begin failures++; $display("newest %0d exp %0d", vec[HIST-1], lq); end
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (int'(vec[HIST+s]) != int'(rq(state_n[s], 5, 8))) begin failures++; $display("state %0d", s); end
      end
      if (fire) begin void'(hist.pop_front()); hist.push_back(lq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
