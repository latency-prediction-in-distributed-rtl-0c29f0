// Testbench for adam_update: loads random output weights and a random output bias, then
// runs a series of updates with random errors and hidden states. Every weight and bias
// write-back (address, 8-bit value, 16-bit master) is compared with the reference model of
// the fixed-point Adam rule (the bias with an input of 1.0), and the duration of an update
// is checked. A large learning rate makes the 8-bit
// weights move within a few updates.
module tb_adam_update;
  import lstm_ref_pkg::*;
  localparam int H = 8, K1 = 6554, K2 = 66, ALPHA = 3000, EPS = 1;
  logic clk = 0, rst_n = 0, init_we = 0, bo_init_we = 0, start = 0, busy, done, wo_we, bo_we;
  logic [2:0] init_addr = 0, h_raddr, wo_addr;
  logic [7:0] init_data = 0, h_rdata, wo_data, bo_init_data = 0, bo_data;
  logic signed [16:0] err = 0;
  logic signed [15:0] wo_master;
  logic [7:0] hmem [H];
  int checks = 0, failures = 0, nwrites = 0, nbias = 0;
  longint mw [], m1 [], m2 [];
  int exp_q [H+1];

  always #5 clk = ~clk;
  adam_update #(.H(H), .K1(K1), .K2(K2), .ALPHA_Q14(ALPHA), .EPS_Q24(EPS)) dut (.*);
  always_ff @(posedge clk) h_rdata <= hmem[h_raddr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (wo_we) begin
    nwrites++;
    checks += 2;
    if ($signed(wo_data) != exp_q[wo_addr]) begin failures++; $display("w[%0d] %0d vs %0d", wo_addr, $signed(wo_data), exp_q[wo_addr]); end
    if (wo_master != 16'(mw[wo_addr])) begin failures++; $display("master[%0d] %0d vs %0d", wo_addr, wo_master, mw[wo_addr]); end
  end
  always @(posedge clk) if (bo_we) begin
    nbias++;
    checks += 3;
    if (wo_we) begin failures++; $display("weight and bias written together"); end
    if ($signed(bo_data) != exp_q[H]) begin failures++; $display("bias %0d vs %0d", $signed(bo_data), exp_q[H]); end
    if (wo_master != 16'(mw[H])) begin failures++; $display("bias master %0d vs %0d", wo_master, mw[H]); end
  end

  initial begin
    mw = new[H+1]; m1 = new[H+1]; m2 = new[H+1];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int j = 0; j < H; j++) begin
      @(negedge clk); init_we = 1; init_addr = 3'(j); init_data = 8'($urandom_range(100, 0) - 50);
      mw[j] = longint'($signed(init_data)) * 256; m1[j] = 0; m2[j] = 0;
    end
    @(negedge clk); init_we = 0; bo_init_we = 1; bo_init_data = 8'($urandom_range(100, 0) - 50);
    mw[H] = longint'($signed(bo_init_data)) * 256; m1[H] = 0; m2[H] = 0;
    @(negedge clk); bo_init_we = 0;
    for (int u = 0; u < 12; u++) begin
      int cyc;
      err = 17'($urandom_range(8000, 0) - 4000);
      if (u == 5) err = 17'sd40000;   // saturating gradient
      for (int j = 0; j < H; j++) hmem[j] = 8'($urandom_range(254, 0) - 127);
      for (int j = 0; j < H; j++) exp_q[j] = adam_ref(mw, m1, m2, j, longint'(err), longint'($signed(hmem[j])), K1, K2, ALPHA, EPS);
      exp_q[H] = adam_ref(mw, m1, m2, H, longint'(err), 128, K1, K2, ALPHA, EPS);
      nwrites = 0; nbias = 0;
      start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (nwrites != H) begin failures++; $display("writes %0d", nwrites); end
      if (nbias != 1) begin failures++; $display("bias writes %0d", nbias); end
      if (cyc != (H + 1) * 53 + 1) begin failures++; $display("update took %0d clocks, expected %0d", cyc, (H + 1) * 53 + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
