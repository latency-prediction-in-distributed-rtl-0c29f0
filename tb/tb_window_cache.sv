// Testbench for window_cache: writes numbered vectors, pins a window with lock, keeps
// writing until the cache stalls, reads the pinned window back element by element and
// checks it is the WIN vectors that were newest at lock time (oldest first), that wr_ready
// drops exactly when the free slots are used up, and that unlock releases the stall.
module tb_window_cache;
  localparam int IN = 4, WIN = 5, DEPTH = 8;
  logic clk = 0, rst_n = 0, wr_valid = 0, wr_ready, lock = 0, unlock = 0, locked, win_ready;
  logic [IN-1:0][7:0] wr_vec = '0;
  logic [2:0] rd_step = 0; logic [1:0] rd_col = 0; logic [7:0] rd_data;
  int checks = 0, failures = 0, stalls = 0;
  int written = 0;   // number of vectors written so far; vector n holds bytes n*4+k

  always #5 clk = ~clk;
  window_cache #(.IN(IN), .WIN(WIN), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d vs %0d", what, got, exp); end
  endtask

  task automatic write_one();
    for (int k = 0; k < IN; k++) wr_vec[k] = 8'(written * IN + k);
    wr_valid = 1;
    @(negedge clk);
    wr_valid = 0;
    written++;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      int first, extra;
      int n = (round == 0) ? WIN + 2 : $urandom_range(6, 1);
      for (int i = 0; i < n; i++) begin
        chk(wr_ready, 1, "ready while unlocked");
        write_one();
      end
      chk(win_ready, 1, "win_ready");
      first = written - WIN;
      lock = 1; @(negedge clk); lock = 0;
      chk(locked, 1, "locked");
      // fill the free slots; the cache must stall after DEPTH - WIN of them
      extra = 0;
      while (wr_ready && extra < DEPTH) begin write_one(); extra++; end
      chk(extra, DEPTH - WIN, "free slots while locked");
      wr_valid = 1; @(negedge clk); wr_valid = 0; stalls++;
      chk(wr_ready, 0, "stall holds");
      // read the pinned window
      for (int t = 0; t < WIN; t++) begin
        for (int k = 0; k < IN; k++) begin
          rd_step = 3'(t); rd_col = 2'(k);
          @(negedge clk);
          chk(rd_data, ((first + t) * IN + k) & 255, "window element");
        end
      end
      unlock = 1; @(negedge clk); unlock = 0;
      chk(wr_ready, 1, "ready after unlock");
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
