// Testbench for lstm_core on its own: the weight, bias and window memories and the state
// register are modelled here as plain arrays with one-cycle reads. Random weights and
// inputs, comparison of the final hidden state with the integer reference model, and a
// check of the latency WIN*(H*(IN+H)+7)+1 and of back-to-back inferences.
module tb_lstm_core;
  import lstm_ref_pkg::*;
  localparam int IN = 3, H = 6, WIN = 5, K = IN + H;
  localparam int HB = $clog2(H), WB = $clog2(H*K), TB = $clog2(WIN), XB = $clog2(IN);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [WB-1:0] w_raddr; logic [3:0][7:0] w_rdata, b_rdata; logic [HB-1:0] b_raddr;
  logic [TB-1:0] x_step; logic [XB-1:0] x_col; logic [7:0] x_rdata;
  logic st_init, st_swap, h_we, c_we;
  logic [HB-1:0] h_raddr, h_waddr, c_raddr, c_waddr;
  logic [7:0] h_rdata, h_wdata; logic [15:0] c_rdata, c_wdata;

  int checks = 0, failures = 0;
  int w [4][]; int b [4][]; int x []; int href [];
  int wm [4][H*K]; int bm [4][H]; int xm [WIN*IN];
  logic [7:0] hb [2][H]; logic [15:0] cm [H]; logic cur;

  always #5 clk = ~clk;
  lstm_core #(.IN(IN), .H(H), .WIN(WIN)) dut (.*);

  always_ff @(posedge clk) begin
    for (int g = 0; g < 4; g++) begin
      w_rdata[g] <= 8'(wm[g][w_raddr]);
      b_rdata[g] <= 8'(bm[g][b_raddr]);
    end
    x_rdata <= 8'(xm[int'(x_step)*IN + int'(x_col)]);
    h_rdata <= hb[cur][h_raddr];
    c_rdata <= cm[c_raddr];
    if (h_we) hb[!cur][h_waddr] <= h_wdata;
    if (c_we) cm[c_waddr] <= c_wdata;
    if (st_init) cur <= 0; else if (st_swap) cur <= !cur;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 4; g++) begin w[g] = new[H*K]; b[g] = new[H]; end
    x = new[WIN*IN];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      int wr = (trial == 0) ? 10 : (trial == 1) ? 50 : 127;
      int cyc;
      for (int g = 0; g < 4; g++) begin
        foreach (w[g][i]) w[g][i] = $urandom_range(2*wr, 0) - wr;
        foreach (b[g][i]) b[g][i] = $urandom_range(2*wr, 0) - wr;
      end
      foreach (x[i]) x[i] = $urandom_range(127, 0);
      for (int g = 0; g < 4; g++) begin
        for (int i = 0; i < H*K; i++) wm[g][i] = w[g][i];
        for (int i = 0; i < H; i++)   bm[g][i] = b[g][i];
      end
      for (int i = 0; i < WIN*IN; i++) xm[i] = x[i];
      lstm_run(IN, H, WIN, w, b, x, href);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      checks++;
      if (!busy) begin failures++; $display("not busy after start"); end
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != WIN*(H*K+7)+1) begin failures++; $display("latency %0d vs %0d", cyc, WIN*(H*K+7)+1); end
      for (int j = 0; j < H; j++) begin
        checks++;
        if ($signed(hb[cur][j]) != href[j]) begin
          failures++; $display("trial %0d h[%0d] %0d vs %0d", trial, j, $signed(hb[cur][j]), href[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
