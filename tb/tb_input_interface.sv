// Testbench for input_interface: a random source and a random sink exchange samples; the
// sink must receive every sample once, in order and unchanged, and the stall counter must
// equal the number of cycles the source was held off.
module tb_input_interface;
  localparam int NS = 6;
  logic clk = 0, rst_n = 0, s_valid = 0, s_ready, m_valid, m_ready = 0;
  logic [15:0] s_latency = 0, m_latency; logic [15:0] s_state [NS], m_state [NS];
  logic [31:0] stall_cycles;
  int checks = 0, failures = 0, sent = 0, got = 0, stalls = 0;
  always #5 clk = ~clk;
  input_interface #(.NS(NS)) dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // source: sample n has latency n and state n*7+s
  always @(negedge clk) if (rst_n) begin
    if (!s_valid || s_ready_q) begin
      s_valid <= ($urandom_range(3, 0) != 0) && sent < 500;
    end
  end
  logic s_ready_q;
  always @(posedge clk) begin
    s_ready_q <= s_ready;
    if (rst_n && s_valid && s_ready) sent <= sent + 1;
    if (rst_n && s_valid && !s_ready) stalls <= stalls + 1;
    if (rst_n && m_valid && m_ready) begin
      checks += 1 + NS;
      if (m_latency != 16'(got)) begin failures++; $display("got %0d exp %0d", m_latency, got); end
      for (int s = 0; s < NS; s++) if (m_state[s] != 16'(got * 7 + s)) begin failures++; $display("state"); end
      got <= got + 1;
    end
  end
  always_comb begin
    s_latency = 16'(sent);
    for (int s = 0; s < NS; s++) s_state[s] = 16'(sent * 7 + s);
  end
  always @(negedge clk) m_ready <= ($urandom_range(2, 0) != 0);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (got == 500);
    repeat (3) @(negedge clk);
    checks++;
    if (stall_cycles != 32'(stalls) || stalls == 0) begin failures++; $display("stalls %0d vs %0d", stall_cycles, stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
