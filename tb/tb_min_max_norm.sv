// Testbench for min_max_norm: random raw values, minima and ranges; the expected result is
// computed in floating point, (u - min)/(max - min) * 4096 clipped to [0, 4096], and the
// hardware, which multiplies by a rounded reciprocal, must be within 1 LSB of it.
module tb_min_max_norm;
  logic [15:0] u, min; logic [31:0] recip; logic signed [15:0] y;
  int checks = 0, failures = 0;
  min_max_norm dut (.*);
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int range; real e; int ei;
      min   = 16'($urandom_range(30000, 0));
      range = (i % 4 == 0) ? $urandom_range(20, 1) : $urandom_range(30000, 1);
      recip = 32'(longint'($floor((2.0 ** 28) / range + 0.5)));
      u     = 16'($urandom_range(65535, 0));
      if (i % 2 == 0) u = 16'(min + $urandom_range(range, 0));
      #1;
      e = (real'(int'(u)) - real'(int'(min))) / range * 4096.0;
      if (e < 0.0) e = 0.0;
      if (e > 4096.0) e = 4096.0;
      checks++;
      if ((real'(y) - e > 1.01) || (e - real'(y) > 1.01) || y < 0 || y > 4096) begin
        failures++; $display("u=%0d min=%0d range=%0d y=%0d exp=%f", u, min, range, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
