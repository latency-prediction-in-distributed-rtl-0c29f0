// End-to-end testbench of the whole predictor at a reduced size (HIST=4, H=8, WIN=4,
// DEPTH=8): loads all parameters over the bus as
// 16-bit words that the chip must round to the 8-bit values the reference uses, and
// drives samples, checks every prediction bit for bit against the reference model (LSTM,
// output neuron, de-normalization) and its latency, and counts the mechanisms: manual and
// automatic starts, sample collection overlapping an inference, input stall when the
// window cache is full, feedback within delta, online updates of the output weights and bias.
// Twelve feedback rounds with misses of the same sign let the updates move the 8-bit output
// weights, and later predictions are checked against the updated weights.
module tb_lstm_latency_predictor;
  import lstm_pkg::*;
  import lstm_ref_pkg::*;
  localparam int HIST = 4, H = 8, WIN = 4, DEPTH = 8;
  localparam int IN = HIST + N_STATE, K = IN + H;
  localparam int NFB = 16;            // feedback rounds
  localparam int LAT_MIN = 100, LAT_RANGE = 5000;
  localparam int K1 = 6554, K2 = 66, ALPHA = 16, EPS = 1;
  localparam int DELTA = 200;
  localparam longint WATCHDOG = 2000000;

  logic clk = 0, rst_n = 0;
  logic bus_valid = 0, bus_we = 0; logic [23:0] bus_addr = 0; logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid;
  logic s_valid = 0, s_ready; logic [15:0] s_latency = 0; logic [15:0] s_state [N_STATE];
  logic y_valid; logic [15:0] y_latency; logic signed [15:0] y_norm;
  logic fb_valid = 0; logic [15:0] fb_latency = 0; logic busy;

  always #5 clk = ~clk;

  lstm_latency_predictor #(.HIST(HIST), .H(H), .WIN(WIN), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pred = 0, n_manual = 0, n_auto = 0, n_stall = 0, n_overlap = 0, n_hit = 0, n_miss = 0,
      n_update = 0, n_wchange = 0;

  // reference model state
  int w [4][]; int b [4][]; int wout []; int wout0 []; int bout;
  longint mw [], m1 [], m2 [];
  longint recip [N_CH]; longint cmin [N_CH];
  int sent_q [$];          // raw samples sent, N_CH values each
  int histq [$];           // latency history (Q0.7), HIST entries
  int vec_q [$];           // every input vector stored in the cache, IN values each
  int win_q [$];           // pinned windows waiting for their result, WIN*IN values each
  longint lock_t [$];
  int href []; longint last_yn;
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  // ---------------- reference tracking of the cache contents ----------------
  always @(posedge clk) if (rst_n) begin
    if (s_valid && !s_ready) n_stall++;
    if (dut.cache_lock) begin
      int nv;
      nv = vec_q.size() / IN;
      for (int t = 0; t < WIN; t++)
        for (int k = 0; k < IN; k++) win_q.push_back(vec_q[(nv - WIN + t) * IN + k]);
      lock_t.push_back(cyc);
    end
    if (dut.new_sample) begin
      int v [N_CH]; int lq;
      if (busy) n_overlap++;
      for (int c = 0; c < N_CH; c++) v[c] = sent_q.pop_front();
      lq = int'(rq(norm_ref(v[0], cmin[0], recip[0]), 5, 8));
      void'(histq.pop_front());
      histq.push_back(lq);
      for (int i = 0; i < HIST; i++) vec_q.push_back(histq[i]);
      for (int s = 0; s < N_STATE; s++) vec_q.push_back(int'(rq(norm_ref(v[s+1], cmin[s+1], recip[s+1]), 5, 8)));
    end
    if (y_valid) begin
      int x []; longint acc, yr, lt;
      n_pred++;
      x = new[WIN*IN];
      for (int i = 0; i < WIN*IN; i++) x[i] = win_q.pop_front();
      lt = lock_t.pop_front();
      lstm_run(IN, H, WIN, w, b, x, href);
      acc = longint'(bout) * 128;
      for (int j = 0; j < H; j++) acc += longint'(wout[j]) * href[j];
      last_yn = rq(acc, 1, 16);
      yr = LAT_MIN + ((last_yn * LAT_RANGE + 2048) >>> 12);
      if (yr < 0) yr = 0;
      if (yr > 65535) yr = 65535;
      chk(y_norm, last_yn, "y_norm");
      chk(y_latency, yr, "y_latency");
      chk(cyc - lt, WIN * (H * K + 7) + 1 + H + 3, "prediction latency");
    end
  end

  // ---------------- stimulus helpers ----------------
  // a 16-bit Q3.12 bus word that rounds to the Q1.6 value q (ties upward): q*64 + [-32, 31]
  function automatic logic [31:0] pword(int q);
    return 32'(q * 64 + int'($urandom_range(63, 0)) - 32) & 32'hFFFF;
  endfunction

  task automatic bus_wr(logic [23:0] a, logic [31:0] d);
    @(negedge clk); bus_valid = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_valid = 0; bus_we = 0;
  endtask

  task automatic send_sample(bit wait_accept);
    int v [N_CH];
    v[0] = $urandom_range(LAT_MIN + LAT_RANGE, LAT_MIN);
    for (int s = 1; s < N_CH; s++) v[s] = $urandom_range(65535, 0);
    for (int c = 0; c < N_CH; c++) sent_q.push_back(v[c]);
    @(negedge clk);
    s_valid = 1; s_latency = 16'(v[0]);
    for (int s = 0; s < N_STATE; s++) s_state[s] = 16'(v[s+1]);
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    @(negedge clk);
    s_valid = 0;
    if (wait_accept) repeat (3) @(negedge clk);
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 8) begin @(negedge clk); quiet = (busy || s_valid) ? 0 : quiet + 1; end
  endtask

  task automatic feedback(longint raw);
    longint ytn, e;
    @(negedge clk); fb_valid = 1; fb_latency = 16'(raw);
    @(negedge clk); fb_valid = 0;
    ytn = norm_ref(raw, cmin[0], recip[0]);
    e = last_yn - ytn;
    if (((e < 0) ? -e : e) > DELTA) begin
      n_miss++;
      for (int j = 0; j < H; j++) begin
        int nw = adam_ref(mw, m1, m2, j, e, href[j], K1, K2, ALPHA, EPS);
        if (nw != wout[j]) n_wchange++;
        wout[j] = nw;
      end
      begin
        int nb = adam_ref(mw, m1, m2, H, e, 128, K1, K2, ALPHA, EPS);   // bias: input 1.0
        if (nb != bout) n_wchange++;
        bout = nb;
      end
    end else n_hit++;
  endtask

  initial begin
    for (int s = 0; s < N_STATE; s++) s_state[s] = 0;
    for (int i = 0; i < HIST; i++) histq.push_back(0);
    for (int g = 0; g < 4; g++) begin w[g] = new[H*K]; b[g] = new[H]; end
    wout = new[H]; wout0 = new[H]; mw = new[H+1]; m1 = new[H+1]; m2 = new[H+1];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- configuration over the shared bus ----
    cmin[0] = LAT_MIN; recip[0] = (longint'(1) <<< 28) / LAT_RANGE;
    for (int c = 1; c < N_CH; c++) begin cmin[c] = 1000 * c; recip[c] = (longint'(1) <<< 28) / 30000; end
    for (int c = 0; c < N_CH; c++) begin
      bus_wr({REG_REGION, 12'd0, R_MIN0 + 8'(c)}, 32'(cmin[c]));
      bus_wr({REG_REGION, 12'd0, R_RECIP0 + 8'(c)}, 32'(recip[c]));
    end
    bus_wr({REG_REGION, 12'd0, R_RANGE}, LAT_RANGE);
    bus_wr({REG_REGION, 12'd0, R_DELTA}, DELTA);
    bout = $urandom_range(40, 0) - 20;
    bus_wr({REG_REGION, 12'd0, R_BOUT}, pword(bout));
    mw[H] = longint'(bout) * 256; m1[H] = 0; m2[H] = 0;
    // weights: one write per clock
    @(negedge clk);
    for (int g = 0; g < 4; g++) begin
      for (int i = 0; i < H*K; i++) begin
        w[g][i] = $urandom_range(60 * 2, 0) - 60;
        bus_valid = 1; bus_we = 1; bus_addr = {4'(WI_REGION + 4'(g)), 20'(i)}; bus_wdata = pword(w[g][i]);
        @(negedge clk);
      end
      for (int i = 0; i < H; i++) begin
        b[g][i] = $urandom_range(40, 0) - 20;
        bus_valid = 1; bus_we = 1; bus_addr = {BIAS_REGION, 20'(g * H + i)}; bus_wdata = pword(b[g][i]);
        @(negedge clk);
      end
    end
    for (int j = 0; j < H; j++) begin
      wout[j] = $urandom_range(60 * 2, 0) - 60; wout0[j] = wout[j];
      mw[j] = longint'(wout[j]) * 256; m1[j] = 0; m2[j] = 0;
      bus_valid = 1; bus_we = 1; bus_addr = {WOUT_REGION, 20'(j)}; bus_wdata = pword(wout[j]);
      @(negedge clk);
    end
    bus_valid = 0; bus_we = 0;

    // ---- phase 1: fill the window, start one prediction by hand ----
    for (int i = 0; i < WIN; i++) send_sample(1'b1);
    bus_wr({REG_REGION, 12'd0, R_CTRL}, 32'h100);
    n_manual++;
    wait (y_valid); wait_idle();

    // ---- phase 2: automatic mode, samples back to back: inference and sample collection
    //      overlap until the cache is full and the input stalls ----
    bus_wr({REG_REGION, 12'd0, R_CTRL}, 32'h1);
    begin
      int n_before = n_pred;
      for (int i = 0; i < DEPTH + 2; i++) send_sample(1'b0);
      wait_idle();
      n_auto += n_pred - n_before;
    end

    // ---- phase 3: feedback and online update ----
    bus_wr({REG_REGION, 12'd0, R_CTRL}, 32'h7);
    for (int r = 0; r < NFB; r++) begin
      longint yr;
      send_sample(1'b0);
      wait (y_valid); @(negedge clk);
      yr = y_latency;
      if (r % 4 == 3) feedback(yr);                                   // within delta
      else            feedback((yr > LAT_MIN + 2500) ? LAT_MIN : LAT_MIN + LAT_RANGE); // miss
      wait_idle();
    end
    begin
      logic [31:0] d;
      @(negedge clk); bus_valid = 1; bus_we = 0; bus_addr = {REG_REGION, 12'd0, R_N_UPDATE};
      @(negedge clk); bus_valid = 0; d = bus_rdata;
      chk(d, n_miss, "update counter");
      n_update = int'(d);
      @(negedge clk); bus_valid = 1; bus_we = 0; bus_addr = {REG_REGION, 12'd0, R_N_INFER};
      @(negedge clk); bus_valid = 0; d = bus_rdata;
      chk(d, n_pred, "prediction counter");
    end

    // ---- final prediction with the updated output weights and bias ----
    bus_wr({REG_REGION, 12'd0, R_CTRL}, 32'h1);
    send_sample(1'b0);
    wait (y_valid); wait_idle();

    $display("predictions=%0d manual=%0d auto=%0d stall_cycles=%0d overlapped_samples=%0d hits=%0d misses=%0d updates=%0d weight_changes=%0d",
             n_pred, n_manual, n_auto, n_stall, n_overlap, n_hit, n_miss, n_update, n_wchange);
    chk(n_manual > 0, 1, "manual start happened");
    chk(n_auto > 1, 1, "automatic starts happened");
    chk(n_stall > 0, 1, "input stall happened");
    chk(n_overlap > 0, 1, "sample collection overlapped inference");
    chk(n_hit > 0, 1, "feedback within delta happened");
    chk(n_update > 0, 1, "online update happened");
    if (1) chk(n_wchange > 0, 1, "an update changed an 8-bit output weight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
