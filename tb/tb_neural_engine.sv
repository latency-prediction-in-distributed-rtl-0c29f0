// Testbench for neural_engine: loads random 8-bit weights and biases through the load
// ports, supplies a random input window, runs inferences and compares the final hidden
// state with the integer reference model, element by element. Also checks the latency
// WIN*(H*(IN+H)+7)+1 clocks from start to done. Small sizes keep the run short; trial 0
// uses small weights, the later ones large weights so the LUT ends and saturation are hit.
module tb_neural_engine;
  import lstm_ref_pkg::*;
  localparam int IN = 5, H = 12, WIN = 4, K = IN + H;
  localparam int HB = $clog2(H), WB = $clog2(H*K), TB = $clog2(WIN), XB = $clog2(IN);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic w_we = 0, b_we = 0;
  logic [1:0] w_gate = 0, b_gate = 0;
  logic [WB-1:0] w_addr = 0;
  logic [HB-1:0] b_addr = 0, o_raddr = 0;
  logic [7:0] w_data = 0, b_data = 0, x_rdata, o_rdata;
  logic [TB-1:0] x_step;
  logic [XB-1:0] x_col;

  int checks = 0, failures = 0;
  int w [4][]; int b [4][]; int x []; int href [];
  int xmem [WIN*IN];

  always #5 clk = ~clk;

  neural_engine #(.IN(IN), .H(H), .WIN(WIN)) dut (.*);

  always_ff @(posedge clk) x_rdata <= 8'(xmem[int'(x_step)*IN + int'(x_col)]);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_trial(int wr);
    int cyc;
    for (int g = 0; g < 4; g++) begin
      w[g] = new[H*K]; b[g] = new[H];
      for (int i = 0; i < H*K; i++) w[g][i] = $urandom_range(2*wr, 0) - wr;
      for (int i = 0; i < H; i++)   b[g][i] = $urandom_range(2*wr, 0) - wr;
    end
    x = new[WIN*IN];
    for (int i = 0; i < WIN*IN; i++) begin x[i] = $urandom_range(127, 0); xmem[i] = x[i]; end
    for (int g = 0; g < 4; g++) begin
      for (int i = 0; i < H*K; i++) begin
        @(negedge clk); w_we = 1; w_gate = 2'(g); w_addr = WB'(i); w_data = 8'(w[g][i]);
      end
      for (int i = 0; i < H; i++) begin
        @(negedge clk); w_we = 0; b_we = 1; b_gate = 2'(g); b_addr = HB'(i); b_data = 8'(b[g][i]);
      end
      @(negedge clk); w_we = 0; b_we = 0;
    end
    lstm_run(IN, H, WIN, w, b, x, href);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != WIN*(H*K+7)+1) begin
      failures++; $display("latency %0d expected %0d", cyc, WIN*(H*K+7)+1);
    end
    for (int j = 0; j < H; j++) begin
      @(negedge clk); o_raddr = HB'(j);
      @(negedge clk);
      checks++;
      if ($signed(o_rdata) != href[j]) begin
        failures++; $display("wr=%0d h[%0d] = %0d expected %0d", wr, j, $signed(o_rdata), href[j]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_trial(8);
    run_trial(40);
    run_trial(127);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
