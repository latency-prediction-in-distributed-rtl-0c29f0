// Testbench for state_regs: writes h into the non-current bank and c in place, checks that
// reads return the current bank with one clock latency, that swap and init switch banks,
// and that the output port sees the same bank as the core read port.
module tb_state_regs;
  localparam int H = 8;
  logic clk = 0, rst_n = 0, init = 0, swap = 0, h_we = 0, c_we = 0;
  logic [2:0] h_raddr = 0, h_waddr = 0, c_raddr = 0, c_waddr = 0, o_raddr = 0;
  logic [7:0] h_rdata, h_wdata = 0, o_rdata;
  logic [15:0] c_rdata, c_wdata = 0;
  int checks = 0, failures = 0;
  logic [7:0] bank [2][H]; logic [15:0] cref [H]; int cur = 0;

  always #5 clk = ~clk;
  state_regs #(.H(H)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d vs %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0; cur = 0;
    for (int round = 0; round < 6; round++) begin
      // write the next state into the other bank
      for (int j = 0; j < H; j++) begin
        h_we = 1; h_waddr = 3'(j); h_wdata = 8'($urandom); bank[1-cur][j] = h_wdata;
        c_we = 1; c_waddr = 3'(j); c_wdata = 16'($urandom); cref[j] = c_wdata;
        @(negedge clk);
      end
      h_we = 0; c_we = 0;
      // the current bank must be untouched
      for (int j = 0; j < H; j++) begin
        if (round > 0) begin
          h_raddr = 3'(j); o_raddr = 3'(j); @(negedge clk);
          chk(h_rdata, bank[cur][j], "old bank");
          chk(o_rdata, bank[cur][j], "old bank o");
        end
      end
      if (round == 3) begin
        init = 1; @(negedge clk); init = 0; cur = 0;
        continue;
      end
      swap = 1; @(negedge clk); swap = 0; cur = 1 - cur;
      for (int j = 0; j < H; j++) begin
        h_raddr = 3'(j); o_raddr = 3'(H-1-j); c_raddr = 3'(j); @(negedge clk);
        chk(h_rdata, bank[cur][j], "new bank");
        chk(o_rdata, bank[cur][H-1-j], "o port");
        chk(c_rdata, cref[j], "c");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
