// Testbench for quantizer: random and corner inputs through three configurations used in
// the design (accumulator to LUT index, product to Q0.7 with symmetric clipping, Q0.7 to
// Q3.12 widening), compared with an integer reference.
module tb_quantizer;
  import lstm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [31:0] d1; logic signed [7:0] o1; logic s1;
  logic signed [15:0] d2; logic signed [7:0] o2; logic s2;
  logic signed [7:0]  d3; logic signed [15:0] o3; logic s3;

  quantizer #(.IN_W(32), .IN_FRAC(13), .OUT_W(8), .OUT_FRAC(4)) u1 (.din(d1), .dout(o1), .sat(s1));
  quantizer #(.IN_W(16), .IN_FRAC(14), .OUT_W(8), .OUT_FRAC(7), .SYM_SAT(1'b1)) u2 (.din(d2), .dout(o2), .sat(s2));
  quantizer #(.IN_W(8), .IN_FRAC(7), .OUT_W(16), .OUT_FRAC(12)) u3 (.din(d3), .dout(o3), .sat(s3));

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(longint got, longint exp, bit gs, string what);
    longint e2;
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int corner [6] = '{0, 255, 256, -257, 1048575, -1048576};
    for (int i = 0; i < 2006; i++) begin
      longint r1;
      d1 = (i < 6) ? corner[i] : ((i % 3 == 0) ? $urandom : 32'($signed($urandom) >>> ($urandom % 24)));
      d2 = 16'($urandom);
      d3 = 8'($urandom);
      #1;
      r1 = rq(longint'(d1), 9, 8);
      chk(o1, r1, s1, "acc->idx");
      chk(s1, (r1 != ((longint'(d1) + 256) >>> 9)) ? 1 : 0, 0, "sat flag");
      chk(o2, rq(longint'(d2), 7, 8, 1'b1), s2, "prod->h");
      chk(o3, longint'(d3) * 32, s3, "widen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
