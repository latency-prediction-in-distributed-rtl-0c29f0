// Testbench for weight_mem: random writes and reads against an array model, including the
// read-before-write behaviour when reading and writing the same word in one cycle.
module tb_weight_mem;
  localparam int D = 200;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0, wdata = 0, rdata;
  logic [7:0] model [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  weight_mem #(.WIDTH(8), .DEPTH(D)) dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] exp;
      @(negedge clk);
      raddr = 8'($urandom_range(D-1, 0));
      we = $urandom_range(1, 0) == 1;
      waddr = ($urandom_range(3, 0) == 0) ? raddr : 8'($urandom_range(D-1, 0));
      wdata = 8'($urandom);
      exp = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata != exp) begin failures++; $display("read %0d: %0h vs %0h", raddr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
