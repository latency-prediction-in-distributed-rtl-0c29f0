// LSTM latency predictor: top level. Predicts the response latency of the next task of a
// distributed control system from the recent history of task latencies and the system
// state, with a single-layer LSTM (128 hidden units, 8-bit fixed-point weights) run over a
// sliding window of the last 10 input vectors, and fine-tunes its output layer online when
// a prediction misses by more than a threshold.
// Data path: input interface -> min-max normalization (one unit per raw channel) ->
// feature extraction (16-element vector: 10 latencies + 6 state values) -> window cache ->
// neural engine (LSTM) -> result output (linear neuron, de-normalization) -> scheduler.
// The measured latency returns through the feedback unit, which may start the Adam update
// of the output weights and bias. A main control module sequences all of this and holds the
// configuration registers on the shared bus, through which the host also loads all weights.
// Interfaces:
//   bus_*   shared configuration bus (see main_ctrl and lstm_pkg for the map)
//   s_*     raw samples, valid/ready; latency in 0.01 ms units, N_STATE state readings
//   y_*     prediction for the scheduler: y_valid pulse, y_latency in raw units,
//           y_norm normalized (Q3.12)
//   fb_*    measured latency of the predicted task (only used when feedback is enabled)
// Timing at the default size: one prediction takes WIN*(H*(IN+H)+7)+1 = 184,391 clocks in the
// engine plus H+2 in the output layer; an online update takes (H+1)*53+1 clocks (53 per
// output weight and for the bias).
module lstm_latency_predictor
  import lstm_pkg::*;
#(
  parameter int unsigned HIST  = 10,   // latency history length in an input vector
  parameter int unsigned H     = 128,  // LSTM hidden units
  parameter int unsigned WIN   = 10,   // sliding window (time steps per prediction)
  parameter int unsigned DEPTH = 16,   // window cache entries
  localparam int unsigned IN   = HIST + N_STATE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // shared bus
  input  logic                 bus_valid,
  input  logic                 bus_we,
  input  logic [23:0]          bus_addr,
  input  logic [31:0]          bus_wdata,
  output logic [31:0]          bus_rdata,
  output logic                 bus_rvalid,
  // sample input
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic [RAWW-1:0]      s_latency,
  input  logic [RAWW-1:0]      s_state [N_STATE],
  // prediction output
  output logic                 y_valid,
  output logic [RAWW-1:0]      y_latency,
  output logic signed [NW-1:0] y_norm,
  // feedback
  input  logic                 fb_valid,
  input  logic [RAWW-1:0]      fb_latency,
  output logic                 busy
);
  localparam int unsigned K  = IN + H;
  localparam int unsigned HB = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned WB = $clog2(H * K);
  localparam int unsigned TB = (WIN > 1) ? $clog2(WIN) : 1;
  localparam int unsigned XB = (IN > 1) ? $clog2(IN) : 1;

  // ---------------- control ----------------
  logic          w_we, b_we, bus_wo_we;
  logic [1:0]    w_gate, b_gate;
  logic [WB-1:0] w_addr;
  logic [HB-1:0] b_addr, bus_wo_addr;
  logic [DW-1:0] p_data, b_out;
  logic [RAWW-1:0] norm_min [N_CH];
  logic [31:0]     norm_recip [N_CH];
  logic [RAWW-1:0] lat_range;
  logic [NW-1:0]   delta;
  logic [31:0]     stall_cycles;
  logic new_sample, win_ready, cache_lock, cache_unlock, eng_start, eng_done, out_start, out_done;
  logic err_valid, err_exceed, upd_start, upd_done;

  // ---------------- input path ----------------
  logic            m_valid, m_ready;
  logic [RAWW-1:0] m_latency;
  logic [RAWW-1:0] m_state [N_STATE];
  logic signed [NW-1:0] lat_n;
  logic signed [NW-1:0] state_n [N_STATE];
  logic [IN-1:0][DW-1:0] vec;
  logic            cache_locked;

  input_interface #(.NS(N_STATE)) u_in (
    .clk, .rst_n, .s_valid, .s_ready, .s_latency, .s_state,
    .m_valid, .m_ready, .m_latency, .m_state, .stall_cycles);

  min_max_norm u_norm_lat (.u(m_latency), .min(norm_min[0]), .recip(norm_recip[0]), .y(lat_n));
  for (genvar s = 0; s < N_STATE; s++) begin : g_norm
    min_max_norm u_norm (.u(m_state[s]), .min(norm_min[s+1]), .recip(norm_recip[s+1]), .y(state_n[s]));
  end

  feature_extract #(.HIST(HIST), .NS(N_STATE)) u_feat (
    .clk, .rst_n, .fire(new_sample), .lat_n, .state_n, .vec);

  logic [TB-1:0] x_step;
  logic [XB-1:0] x_col;
  logic [DW-1:0] x_rdata;

  window_cache #(.IN(IN), .WIN(WIN), .DEPTH(DEPTH)) u_cache (
    .clk, .rst_n, .wr_valid(m_valid), .wr_ready(m_ready), .wr_vec(vec),
    .lock(cache_lock), .unlock(cache_unlock), .locked(cache_locked), .win_ready,
    .rd_step(x_step), .rd_col(x_col), .rd_data(x_rdata));

  assign new_sample = m_valid && m_ready;

  // ---------------- neural engine ----------------
  logic          eng_busy;
  logic [HB-1:0] h_raddr, out_h_raddr, upd_h_raddr;
  logic [DW-1:0] h_rdata;
  logic          upd_busy;

  neural_engine #(.IN(IN), .H(H), .WIN(WIN)) u_engine (
    .clk, .rst_n, .start(eng_start), .busy(eng_busy), .done(eng_done),
    .w_we, .w_gate, .w_addr, .w_data(p_data),
    .b_we, .b_gate, .b_addr, .b_data(p_data),
    .x_step, .x_col, .x_rdata,
    .o_raddr(h_raddr), .o_rdata(h_rdata));

  assign h_raddr = upd_busy ? upd_h_raddr : out_h_raddr;

  // ---------------- result output ----------------
  logic          wo_we, upd_wo_we, out_busy;
  logic [HB-1:0] wo_addr, upd_wo_addr;
  logic [DW-1:0] wo_data, upd_wo_data, upd_bo_data;
  logic          bo_init_we, upd_bo_we;

  assign wo_we   = upd_wo_we | bus_wo_we;
  assign wo_addr = upd_wo_we ? upd_wo_addr : bus_wo_addr;
  assign wo_data = upd_wo_we ? upd_wo_data : p_data;

  output_layer #(.H(H)) u_out (
    .clk, .rst_n, .start(out_start), .busy(out_busy), .done(out_done),
    .h_raddr(out_h_raddr), .h_rdata,
    .wo_we, .wo_addr, .wo_data, .b_out,
    .lat_min(norm_min[0]), .lat_range, .y_norm, .y_raw(y_latency));

  // ---------------- feedback and online update ----------------
  logic signed [NW:0] err;

  feedback_unit u_fb (
    .clk, .rst_n, .fb_valid, .y_true_raw(fb_latency), .y_pred(y_norm),
    .lat_min(norm_min[0]), .lat_recip(norm_recip[0]), .delta,
    .err_valid, .err, .exceed(err_exceed));

  adam_update #(.H(H)) u_adam (
    .clk, .rst_n, .init_we(bus_wo_we), .init_addr(bus_wo_addr), .init_data(p_data),
    .start(upd_start), .err, .busy(upd_busy), .done(upd_done),
    .h_raddr(upd_h_raddr), .h_rdata,
    .wo_we(upd_wo_we), .wo_addr(upd_wo_addr), .wo_data(upd_wo_data), .wo_master(),   // master copy stays inside the update unit
    .bo_init_we, .bo_init_data(p_data), .bo_we(upd_bo_we), .bo_data(upd_bo_data));

  // ---------------- main control ----------------
  main_ctrl #(.IN(IN), .H(H)) u_ctrl (
    .clk, .rst_n, .bus_valid, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .w_we, .w_gate, .w_addr, .b_we, .b_gate, .b_addr,
    .wo_we(bus_wo_we), .wo_addr(bus_wo_addr), .p_data,
    .norm_min, .norm_recip, .lat_range, .delta, .b_out, .bo_init_we, .upd_bo_we, .upd_bo_data,
    .stall_cycles, .y_norm, .y_raw(y_latency),
    .new_sample, .win_ready, .cache_lock, .cache_unlock,
    .eng_start, .eng_done, .out_start, .out_done, .y_valid,
    .err_valid, .err_exceed, .upd_start, .upd_done, .busy);

  // the engine, output layer and update never run at the same time
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                !(eng_busy && (out_busy || upd_busy)) && !(out_busy && upd_busy));
  // the final hidden state is only read while the window cache is released
  a_unlocked:  assert property (@(posedge clk) disable iff (!rst_n) (out_busy || upd_busy) |-> !cache_locked);
endmodule
