// Testbench for output_layer: random output weights, bias and hidden state; checks the
// normalized result against round((W.h + b*128) / 2) clipped to 16 bit, the raw result
// against lat_min + y*range/4096 clipped to 0..65535, and the H+2 clock latency.
module tb_output_layer;
  import lstm_ref_pkg::*;
  localparam int H = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done, wo_we = 0;
  logic [3:0] h_raddr, wo_addr = 0;
  logic [7:0] h_rdata, wo_data = 0, b_out = 0;
  logic [15:0] lat_min = 0, lat_range = 0, y_raw;
  logic signed [15:0] y_norm;
  logic [7:0] hmem [H]; int wv [H];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_layer #(.H(H)) dut (.*);
  always_ff @(posedge clk) h_rdata <= hmem[h_raddr];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      longint acc, yn, yr; int cyc; int wr = (trial < 30) ? 20 : 127;
      for (int j = 0; j < H; j++) begin
        wv[j] = $urandom_range(2*wr, 0) - wr;
        @(negedge clk); wo_we = 1; wo_addr = 4'(j); wo_data = 8'(wv[j]);
        hmem[j] = 8'($urandom_range(254, 0) - 127);
      end
      @(negedge clk); wo_we = 0;
      b_out = 8'($urandom_range(2*wr, 0) - wr);
      lat_min = 16'($urandom_range(5000, 0)); lat_range = 16'($urandom_range(60000, 1));
      acc = longint'($signed(b_out)) * 128;
      for (int j = 0; j < H; j++) acc += longint'(wv[j]) * $signed(hmem[j]);
      yn = rq(acc, 1, 16);
      yr = longint'(lat_min) + ((yn * longint'(lat_range) + 2048) >>> 12);
      if (yr < 0) yr = 0;
      if (yr > 65535) yr = 65535;
      start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (y_norm != 16'(yn)) begin failures++; $display("y_norm %0d vs %0d", y_norm, yn); end
      if (y_raw != 16'(yr)) begin failures++; $display("y_raw %0d vs %0d", y_raw, yr); end
      if (cyc != H + 2) begin failures++; $display("latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
