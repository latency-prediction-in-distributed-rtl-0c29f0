// Testbench for act_lut: reads every entry of the sigmoid and tanh tables and compares it
// with the function evaluated in floating point and rounded the same way; also checks the
// one-clock read latency.
module tb_act_lut;
  import lstm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] addr = 0, ds, dt;
  always #5 clk = ~clk;
  act_lut #(.FUNC(1'b0)) u_sig  (.clk, .addr, .dout(ds));
  act_lut #(.FUNC(1'b1)) u_tanh (.clk, .addr, .dout(dt));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      int s;
      @(negedge clk); addr = 8'(a);
      @(posedge clk); #1;
      s = (a < 128) ? a : a - 256;
      checks += 2;
      if ($signed(ds) != sig_ref(s))  begin failures++; $display("sig[%0d] %0d vs %0d", s, $signed(ds), sig_ref(s)); end
      if ($signed(dt) != tanh_ref(s)) begin failures++; $display("tanh[%0d] %0d vs %0d", s, $signed(dt), tanh_ref(s)); end
    end
    // latency: the output must not follow the address before the clock edge
    @(negedge clk); addr = 8'd0; @(posedge clk); #1;
    @(negedge clk); addr = 8'd100; #1;
    checks++;
    if ($signed(ds) != sig_ref(0)) begin failures++; $display("read not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
