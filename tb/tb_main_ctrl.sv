// Testbench for main_ctrl: bus writes to every region (decode of gate, bias and output
// weight writes, quantization of the 16-bit Q3.12 parameter words to 8-bit Q1.6 with
// rounding and saturation, the clip status bit), register write/read-back, and the prediction sequence with the other
// blocks' events driven from here: auto start after a new sample, manual start, the
// feedback path with and without a miss, and the update, and the output bias: its bus
// write strobe to the update unit and its write-back by the update. Checks the start/lock/unlock
// strobes, y_valid and the counters.
module tb_main_ctrl;
  import lstm_pkg::*;
  localparam int IN = 4, H = 8;
  logic clk = 0, rst_n = 0;
  logic bus_valid = 0, bus_we = 0; logic [23:0] bus_addr = 0; logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid;
  logic w_we, b_we, wo_we; logic [1:0] w_gate, b_gate; logic [6:0] w_addr; logic [2:0] b_addr, wo_addr;
  logic [7:0] p_data, b_out; logic [15:0] norm_min [N_CH]; logic [31:0] norm_recip [N_CH];
  logic [15:0] lat_range, delta; logic [31:0] stall_cycles = 32'd77;
  logic signed [15:0] y_norm = 16'sd1234; logic [15:0] y_raw = 16'd4321;
  logic new_sample = 0, win_ready = 0, cache_lock, cache_unlock, eng_start, eng_done = 0;
  logic bo_init_we, upd_bo_we = 0; logic [7:0] upd_bo_data = 0;
  logic out_start, out_done = 0, y_valid, err_valid = 0, err_exceed = 0, upd_start, upd_done = 0, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  main_ctrl #(.IN(IN), .H(H)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d vs %0d", what, got, exp); end
  endtask

  task automatic bwrite(logic [23:0] a, logic [31:0] d);
    bus_valid = 1; bus_we = 1; bus_addr = a; bus_wdata = d; #1;
  endtask

  task automatic bread(logic [23:0] a, output logic [31:0] d);
    @(negedge clk); bus_valid = 1; bus_we = 0; bus_addr = a;
    @(negedge clk); bus_valid = 0;
    chk(bus_rvalid, 1, "rvalid");
    d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    // parameter memory decode
    for (int g = 0; g < 4; g++) begin
      @(negedge clk); bwrite({4'(WI_REGION + 4'(g)), 20'(5 + g)}, 32'((100 + g) * 64));
      chk(w_we, 1, "w_we"); chk(w_gate, g, "w_gate"); chk(w_addr, 5 + g, "w_addr"); chk(p_data, 100 + g, "p_data");
      chk(b_we, 0, "b_we idle"); chk(wo_we, 0, "wo_we idle");
    end
    @(negedge clk); bwrite({BIAS_REGION, 20'(2 * H + 3)}, 32'd9);
    chk(bo_init_we, 0, "bias init idle"); chk(b_we, 1, "b_we"); chk(b_gate, 2, "b_gate"); chk(b_addr, 3, "b_addr"); chk(w_we, 0, "w_we idle");
    @(negedge clk); bwrite({WOUT_REGION, 20'd6}, 32'd55);
    chk(wo_we, 1, "wo_we"); chk(wo_addr, 6, "wo_addr");
    // registers
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_DELTA}, 32'd300);
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_BOUT}, 32'h0000_FC00);   // -16/64 in Q3.12
    chk(bo_init_we, 1, "bias init strobe");
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_RANGE}, 32'd5000);
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_MIN0 + 8'd3}, 32'd17);
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_RECIP0 + 8'd6}, 32'd123456);
    @(negedge clk); bus_valid = 0;
    chk(delta, 300, "delta"); chk(b_out, 8'hF0, "b_out"); chk(lat_range, 5000, "range");
    chk(norm_min[3], 17, "min3"); chk(norm_recip[6], 123456, "recip6");
    bread({REG_REGION, 12'd0, R_MIN0 + 8'd3}, d); chk(d, 17, "read min3");
    bread({REG_REGION, 12'd0, R_RESULT}, d); chk(d, {16'd1234, 16'd4321}, "read result");
    bread({REG_REGION, 12'd0, R_N_STALL}, d); chk(d, 77, "read stall");
    // parameter quantization Q3.12 -> Q1.6: round to nearest (ties up), saturate
    bread({REG_REGION, 12'd0, R_STATUS}, d); chk(d[1], 0, "no clip yet");
    for (int i = 0; i < 300; i++) begin
      int v, e;
      v = (i < 4) ? ((i < 2) ? 32767 - i : -32768 + i) : int'($urandom_range(20000, 0)) - 10000;
      e = (v + 32) >>> 6;
      if (e > 127) e = 127;
      if (e < -128) e = -128;
      @(negedge clk); bwrite({WOUT_REGION, 20'd1}, 32'(v) & 32'hFFFF);
      chk($signed(p_data), e, "quantized parameter");
    end
    @(negedge clk); bus_valid = 0;
    bread({REG_REGION, 12'd0, R_STATUS}, d); chk(d[1], 1, "clip recorded");
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_STATUS}, 32'd0);
    @(negedge clk); bus_valid = 0;
    bread({REG_REGION, 12'd0, R_STATUS}, d); chk(d[1], 0, "clip cleared");
    // output bias written back by the online update
    @(negedge clk); upd_bo_we = 1; upd_bo_data = 8'h1C;
    @(negedge clk); upd_bo_we = 0;
    chk(b_out, 8'h1C, "b_out from update");
    bread({REG_REGION, 12'd0, R_BOUT}, d); chk(d, 32'h1C, "read b_out");

    // auto mode, no feedback: a new sample starts a prediction once the window is full
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_CTRL}, 32'h1);
    @(negedge clk); bus_valid = 0; new_sample = 1;
    @(negedge clk); new_sample = 0;
    chk(eng_start, 0, "no start without full window");
    win_ready = 1; #1;
    chk(eng_start, 1, "auto start"); chk(cache_lock, 1, "lock");
    @(negedge clk); chk(busy, 1, "busy");
    repeat (3) begin chk(eng_start, 0, "single start"); @(negedge clk); end
    eng_done = 1; #1; chk(cache_unlock, 1, "unlock"); chk(out_start, 1, "out start");
    @(negedge clk); eng_done = 0; out_done = 1;
    @(negedge clk); out_done = 0; chk(y_valid, 1, "y_valid"); chk(busy, 0, "idle again");
    @(negedge clk); chk(y_valid, 0, "y_valid pulse");
    bread({REG_REGION, 12'd0, R_N_INFER}, d); chk(d, 1, "n_infer");

    // feedback and update enabled, manual start
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_CTRL}, 32'h106);
    @(negedge clk); bus_valid = 0; #1; chk(eng_start, 1, "manual start");
    @(negedge clk); eng_done = 1; @(negedge clk); eng_done = 0; out_done = 1;
    @(negedge clk); out_done = 0; chk(y_valid, 1, "y_valid 2");
    repeat (3) begin @(negedge clk); chk(busy, 1, "waiting for feedback"); end
    err_valid = 1; err_exceed = 1; #1; chk(upd_start, 1, "update start on miss");
    @(negedge clk); err_valid = 0; err_exceed = 0; chk(busy, 1, "updating");
    upd_done = 1; @(negedge clk); upd_done = 0; chk(busy, 0, "idle after update");
    bread({REG_REGION, 12'd0, R_N_UPDATE}, d); chk(d, 1, "n_update");

    // a hit within delta does not update
    @(negedge clk); bwrite({REG_REGION, 12'd0, R_CTRL}, 32'h106);
    @(negedge clk); bus_valid = 0;
    @(negedge clk); eng_done = 1; @(negedge clk); eng_done = 0; out_done = 1;
    @(negedge clk); out_done = 0;
    err_valid = 1; err_exceed = 0; #1; chk(upd_start, 0, "no update on hit");
    @(negedge clk); err_valid = 0; chk(busy, 0, "idle after hit");
    bread({REG_REGION, 12'd0, R_N_INFER}, d); chk(d, 3, "n_infer 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
