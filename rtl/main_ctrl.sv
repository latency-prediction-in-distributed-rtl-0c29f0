// Main control module: the configuration/status register file on the shared bus and the
// sequencer that runs the prediction loop
//   collect a sample -> predict -> send the prediction to the scheduler ->
//   receive the measured latency -> if |error| > delta, update the model online.
// Bus (slave side): single-cycle word writes (bus_valid & bus_we); reads return the register
// on bus_rdata with bus_rvalid one clock after the request. Address map in lstm_pkg:
// addr[23:20] selects the control registers or one of the parameter memories, whose
// writes are forwarded to the neural engine (gate weights, biases) and to the output layer
// and online update (output weights). Parameter memories are write-only over the bus.
// Every parameter (gate weight, bias, output weight, BOUT) is written as a 16-bit Q3.12
// value in bus_wdata[15:0] and quantized here to 8-bit Q1.6 by round to nearest with
// saturation (the quantization rule of the source design); STATUS[1] records that a value
// was clipped and is cleared by a write to STATUS.
// The output bias register BOUT is also rewritten by the online update (upd_bo_*); a bus
// write to it strobes bo_init_we so that the update unit reloads its master copy.
// Sequencer: in auto mode a prediction starts after every newly stored sample once the
// window cache holds a full window; writing CTRL[8] starts one by hand. The cache window is
// pinned from the start of the engine until the engine finishes. With CTRL[1] set the
// controller waits for the feedback latency; with CTRL[2] also set, a miss larger than delta
// triggers the Adam update of the output weights before the next prediction.
// The shared bus between the main control module and the interfaces and the prediction
// loop follow the source design; the register map, the handshakes and the one-at-a-time
// sequencing are this design's choices.
module main_ctrl
  import lstm_pkg::*;
#(
  parameter int unsigned IN  = 16,
  parameter int unsigned H   = 128,
  localparam int unsigned K  = IN + H,
  localparam int unsigned HB = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned WB = $clog2(H * K)
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
  // parameter writes
  output logic                 w_we,
  output logic [1:0]           w_gate,
  output logic [WB-1:0]        w_addr,
  output logic                 b_we,
  output logic [1:0]           b_gate,
  output logic [HB-1:0]        b_addr,
  output logic                 wo_we,
  output logic [HB-1:0]        wo_addr,
  output logic [DW-1:0]        p_data,
  // configuration
  output logic [RAWW-1:0]      norm_min   [N_CH],
  output logic [31:0]          norm_recip [N_CH],
  output logic [RAWW-1:0]      lat_range,
  output logic [NW-1:0]        delta,
  output logic [DW-1:0]        b_out,
  output logic                 bo_init_we,   // bus write of the output bias
  input  logic                 upd_bo_we,    // output bias written by the online update
  input  logic [DW-1:0]        upd_bo_data,
  // status sources
  input  logic [31:0]          stall_cycles,
  input  logic signed [NW-1:0] y_norm,
  input  logic [RAWW-1:0]      y_raw,
  // sequencing
  input  logic                 new_sample,
  input  logic                 win_ready,
  output logic                 cache_lock,
  output logic                 cache_unlock,
  output logic                 eng_start,
  input  logic                 eng_done,
  output logic                 out_start,
  input  logic                 out_done,
  output logic                 y_valid,
  input  logic                 err_valid,
  input  logic                 err_exceed,
  output logic                 upd_start,
  input  logic                 upd_done,
  output logic                 busy
);
  typedef enum logic [2:0] {M_IDLE, M_ENGINE, M_OUT, M_WAIT_FB, M_UPDATE} mstate_e;
  mstate_e state;

  logic        auto_en, fb_en, upd_en, start_cmd, pending;
  logic [31:0] n_infer, n_update;
  logic        p_sat, p_clip, clip_seen;
  logic [3:0]  region;
  logic [7:0]  ridx;
  logic        wr;
  logic        go;

  assign region = bus_addr[23:20];
  assign ridx   = bus_addr[7:0];
  assign wr     = bus_valid && bus_we;

  // parameter memory writes
  assign w_we    = wr && (region >= WI_REGION) && (region <= WO_REGION);
  assign w_gate  = 2'(region - WI_REGION);
  assign w_addr  = WB'(bus_addr[19:0]);
  assign b_we    = wr && (region == BIAS_REGION);
  assign b_gate  = 2'(32'(bus_addr[19:0]) / H);
  assign b_addr  = HB'(32'(bus_addr[19:0]) % H);
  assign wo_we   = wr && (region == WOUT_REGION);
  assign wo_addr = HB'(bus_addr[19:0]);
  // parameters arrive as 16-bit Q3.12 words and are quantized to 8-bit Q1.6 on the way in
  quantizer #(.IN_W(16), .IN_FRAC(PFRAC), .OUT_W(DW), .OUT_FRAC(WFRAC)) u_q_param (
    .din(bus_wdata[15:0]), .dout(p_data), .sat(p_sat));
  assign p_clip = p_sat && (w_we || b_we || wo_we || bo_init_we);
  assign bo_init_we = wr && (region == REG_REGION) && (ridx == R_BOUT);

  // register writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      auto_en   <= 1'b0;
      fb_en     <= 1'b0;
      upd_en    <= 1'b0;
      start_cmd <= 1'b0;
      delta     <= '0;
      b_out     <= '0;
      lat_range <= '0;
      for (int c = 0; c < N_CH; c++) begin
        norm_min[c]   <= '0;
        norm_recip[c] <= 32'd4096;   // 2^28 / 65536: full 16-bit range
      end
    end else begin
      if (go) start_cmd <= 1'b0;
      if (upd_bo_we) b_out <= upd_bo_data;
      if (wr && region == REG_REGION) begin
        unique case (ridx)
          R_CTRL: begin
            auto_en <= bus_wdata[0];
            fb_en   <= bus_wdata[1];
            upd_en  <= bus_wdata[2];
            if (bus_wdata[8]) start_cmd <= 1'b1;
          end
          R_DELTA: delta     <= bus_wdata[NW-1:0];
          R_BOUT:  b_out     <= p_data;
          R_RANGE: lat_range <= bus_wdata[RAWW-1:0];
          default: begin
            for (int c = 0; c < N_CH; c++) begin
              if (ridx == R_MIN0 + 8'(c))   norm_min[c]   <= bus_wdata[RAWW-1:0];
              if (ridx == R_RECIP0 + 8'(c)) norm_recip[c] <= bus_wdata;
            end
          end
        endcase
      end
    end
  end

  // register reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rvalid <= 1'b0;
      bus_rdata  <= '0;
    end else begin
      bus_rvalid <= bus_valid && !bus_we;
      if (bus_valid && !bus_we) begin
        bus_rdata <= '0;
        if (region == REG_REGION) begin
          unique case (ridx)
            R_CTRL:     bus_rdata <= {23'd0, start_cmd, 5'd0, upd_en, fb_en, auto_en};
            R_STATUS:   bus_rdata <= {24'd0, 1'b0, state, 2'd0, clip_seen, busy};
            R_DELTA:    bus_rdata <= 32'(delta);
            R_RESULT:   bus_rdata <= {y_norm, y_raw};
            R_N_INFER:  bus_rdata <= n_infer;
            R_N_UPDATE: bus_rdata <= n_update;
            R_N_STALL:  bus_rdata <= stall_cycles;
            R_BOUT:     bus_rdata <= 32'(b_out);
            R_RANGE:    bus_rdata <= 32'(lat_range);
            default: begin
              for (int c = 0; c < N_CH; c++) begin
                if (ridx == R_MIN0 + 8'(c))   bus_rdata <= 32'(norm_min[c]);
                if (ridx == R_RECIP0 + 8'(c)) bus_rdata <= norm_recip[c];
              end
            end
          endcase
        end
      end
    end
  end

  // sequencer
  assign go           = (state == M_IDLE) && win_ready && (start_cmd || (auto_en && pending));
  assign cache_lock   = go;
  assign eng_start    = go;
  assign cache_unlock = (state == M_ENGINE) && eng_done;
  assign out_start    = (state == M_ENGINE) && eng_done;
  assign upd_start    = (state == M_WAIT_FB) && err_valid && err_exceed && upd_en;
  assign busy         = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      pending  <= 1'b0;
      y_valid  <= 1'b0;
      n_infer  <= '0;
      n_update <= '0;
      clip_seen <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (p_clip) clip_seen <= 1'b1;
      else if (wr && region == REG_REGION && ridx == R_STATUS) clip_seen <= 1'b0;
      if (new_sample)  pending <= 1'b1;
      else if (go)     pending <= 1'b0;
      unique case (state)
        M_IDLE:   if (go) state <= M_ENGINE;
        M_ENGINE: if (eng_done) state <= M_OUT;
        M_OUT: if (out_done) begin
          y_valid <= 1'b1;
          n_infer <= n_infer + 1'b1;
          state   <= fb_en ? M_WAIT_FB : M_IDLE;
        end
        M_WAIT_FB: if (err_valid) begin
          state <= upd_start ? M_UPDATE : M_IDLE;
        end
        M_UPDATE: if (upd_done) begin
          n_update <= n_update + 1'b1;
          state    <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
