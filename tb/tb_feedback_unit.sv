// Testbench for feedback_unit: random predictions, measured latencies and thresholds; the
// error y_pred - y_true is checked against a reference that normalizes y_true in floating
// point (within 1 LSB), and the threshold flag against |error| > delta for the error the
// unit reports. Covers misses on both sides of the threshold, and the boundary cases
// |error| == delta (not a miss) and |error| == delta + 1 (a miss).
module tb_feedback_unit;
  logic clk = 0, rst_n = 0, fb_valid = 0, err_valid, exceed;
  logic [15:0] y_true_raw = 0, lat_min = 0, delta = 0;
  logic signed [15:0] y_pred = 0; logic [31:0] lat_recip = 0;
  logic signed [16:0] err;
  int checks = 0, failures = 0, n_exceed = 0, n_within = 0;
  always #5 clk = ~clk;
  feedback_unit dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int range; real yt, e;
      lat_min = 16'($urandom_range(1000, 0)); range = $urandom_range(20000, 100);
      lat_recip = 32'(longint'($floor((2.0 ** 28) / range + 0.5)));
      y_true_raw = 16'(lat_min + $urandom_range(range, 0));
      y_pred = 16'($urandom_range(4096, 0));
      delta = 16'($urandom_range(1000, 0));
      fb_valid = 1; @(negedge clk); fb_valid = 0;
      checks += 3;
      if (!err_valid) begin failures++; $display("no err_valid"); end
      yt = (real'(int'(y_true_raw)) - real'(int'(lat_min))) / range * 4096.0;
      e  = real'(y_pred) - yt;
      if (real'(err) - e > 1.01 || e - real'(err) > 1.01) begin failures++; $display("err %0d vs %f", err, e); end
      if (exceed != (((err < 0) ? -err : err) > $signed({1'b0, delta}))) begin failures++; $display("exceed"); end
      if (exceed) n_exceed++; else n_within++;
      @(negedge clk);
      checks++;
      if (err_valid) begin failures++; $display("err_valid not a pulse"); end
    end
    // threshold boundary: repeat a sample with delta = |err| (within) and |err| - 1 (miss)
    for (int i = 0; i < 500; i++) begin
      int mag;
      lat_min = 16'($urandom_range(1000, 0));
      lat_recip = 32'(longint'($floor((2.0 ** 28) / 5000 + 0.5)));
      y_true_raw = 16'(lat_min + $urandom_range(5000, 0));
      y_pred = 16'($urandom_range(4096, 0));
      delta = 0;
      fb_valid = 1; @(negedge clk); fb_valid = 0;
      mag = (err < 0) ? -int'(err) : int'(err);
      @(negedge clk);
      delta = 16'(mag);
      fb_valid = 1; @(negedge clk); fb_valid = 0;
      checks++;
      if (exceed) begin failures++; $display("|err| == delta flagged"); end
      @(negedge clk);
      if (mag > 0) begin
        delta = 16'(mag - 1);
        fb_valid = 1; @(negedge clk); fb_valid = 0;
        checks++;
        if (!exceed) begin failures++; $display("|err| == delta + 1 not flagged"); end
        @(negedge clk);
      end
    end
    checks++;
    if (n_exceed == 0 || n_within == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
