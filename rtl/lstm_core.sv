// LSTM core unit: runs one single-layer LSTM over a window of WIN input vectors,
//   i = sig(Wi x + Ui h + bi)   f = sig(Wf x + Uf h + bf)
//   g = tanh(Wg x + Ug h + bg)  o = sig(Wo x + Uo h + bo)
//   c = f*c + i*g               h = o*tanh(c)
// starting from h = c = 0, as in the source design. The four gates are computed in parallel:
// four weight memories are read with one shared address and four multiply-accumulate lanes
// work side by side. Each lane walks one row of [W U] (K = IN + H columns, operand x(t) for the
// first IN columns and h(t-1) for the rest), one column per clock, and the row loop runs
// over the H hidden units. The arithmetic is an assembly line with these stages:
//   issue  address weights, bias, x and h(t-1)
//   S1     8x8-bit products of the four gates
//   S2     accumulate (bias added on the first column, scaled to the accumulator format)
//   P0     requantize the sums to LUT indices, read the activation LUTs and c(t-1)
//   P1     c(t) = f*c(t-1) + i*g, written back
//   P2     tanh(c(t)) LUT read
//   P3     h(t) = o*tanh(c(t)), written to the other h bank
// Rows follow each other with no gap; the post-processing (P0-P3) of one row overlaps the
// multiply-accumulate of the next. Between time steps the core lets the pipeline drain, so
// that step t+1 sees all of h(t), then swaps the h banks.
// Interface: `start` (one cycle, while idle) begins an inference; `done` pulses once the last
// step's h is in the current bank of the state register. All memories it reads have one
// cycle of latency.
// Timing: an inference takes WIN * (H*(IN+H) + 7) + 1 clocks from `start` to `done`.
// The pipeline split, number formats (see lstm_pkg) and drain between steps are this
// design's choices; the source design names the pipelined, gate-parallel structure, the
// LUT activations and the 8-bit weights.
module lstm_core
  import lstm_pkg::*;
#(
  parameter int unsigned IN  = 16,
  parameter int unsigned H   = 128,
  parameter int unsigned WIN = 10,
  localparam int unsigned K   = IN + H,
  localparam int unsigned HB  = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned KB  = $clog2(K),
  localparam int unsigned WB  = $clog2(H * K),
  localparam int unsigned TB  = (WIN > 1) ? $clog2(WIN) : 1,
  localparam int unsigned XB  = (IN > 1) ? $clog2(IN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // weight memories (one per gate, shared address) and biases
  output logic [WB-1:0]        w_raddr,
  input  logic [N_GATES-1:0][DW-1:0] w_rdata,
  output logic [HB-1:0]        b_raddr,
  input  logic [N_GATES-1:0][DW-1:0] b_rdata,
  // input window: element `x_col` of the vector of step `x_step` (0 = oldest)
  output logic [TB-1:0]        x_step,
  output logic [XB-1:0]        x_col,
  input  logic [DW-1:0]        x_rdata,
  // state register
  output logic                 st_init,
  output logic                 st_swap,
  output logic [HB-1:0]        h_raddr,
  input  logic [DW-1:0]        h_rdata,
  output logic                 h_we,
  output logic [HB-1:0]        h_waddr,
  output logic [DW-1:0]        h_wdata,
  output logic [HB-1:0]        c_raddr,
  input  logic [CW-1:0]        c_rdata,
  output logic                 c_we,
  output logic [HB-1:0]        c_waddr,
  output logic [CW-1:0]        c_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;
  state_e state;

  logic [HB-1:0] row;
  logic [KB-1:0] col;
  logic [TB-1:0] step;
  logic          first_step;

  // ---------------- issue ----------------
  logic iss_valid;
  assign iss_valid = (state == S_ISSUE);
  assign w_raddr   = WB'(row) * WB'(K) + WB'(col);
  assign b_raddr   = row;
  assign x_step    = step;
  assign x_col     = XB'(col);
  assign h_raddr   = (32'(col) >= IN) ? HB'(32'(col) - IN) : '0;

  // ---------------- S1: products ----------------
  logic          s1_valid, s1_first, s1_last, s1_isx;
  logic [HB-1:0] s1_row;
  logic signed [DW-1:0] s1_a;
  logic signed [2*DW-1:0] s1_prod [N_GATES];

  always_comb begin
    if (s1_isx)          s1_a = signed'(x_rdata);
    else if (first_step) s1_a = '0;
    else                 s1_a = signed'(h_rdata);
    for (int g = 0; g < N_GATES; g++)
      s1_prod[g] = signed'(w_rdata[g]) * s1_a;
  end

  // ---------------- S2: accumulate ----------------
  logic          s2_valid, s2_first, s2_last;
  logic [HB-1:0] s2_row;
  logic signed [2*DW-1:0] s2_prod [N_GATES];
  logic signed [DW-1:0]   s2_bias [N_GATES];
  logic signed [AW-1:0]   acc [N_GATES];
  logic signed [AW-1:0]   acc_next [N_GATES];

  always_comb begin
    for (int g = 0; g < N_GATES; g++) begin
      acc_next[g] = (s2_first ? (AW'(s2_bias[g]) <<< XFRAC) : acc[g]) + AW'(s2_prod[g]);
    end
  end

  // ---------------- P0: LUT indices ----------------
  logic          p0_valid;
  logic [HB-1:0] p0_row;
  logic signed [AW-1:0] p0_acc [N_GATES];
  logic [N_GATES-1:0][DW-1:0] lut_idx;
  logic [N_GATES-1:0][DW-1:0] act;      // valid in P1: sig(i), sig(f), tanh(g), sig(o)

  for (genvar g = 0; g < N_GATES; g++) begin : g_gate_act
    logic unused_sat;
    quantizer #(.IN_W(AW), .IN_FRAC(AFRAC), .OUT_W(DW), .OUT_FRAC(LFRAC)) u_q_idx (
      .din(p0_acc[g]), .dout(lut_idx[g]), .sat(unused_sat));
    act_lut #(.FUNC(g == int'(GATE_G))) u_lut (.clk(clk), .addr(lut_idx[g]), .dout(act[g]));
  end
  assign c_raddr = p0_row;

  // ---------------- P1: cell update ----------------
  logic          p1_valid;
  logic [HB-1:0] p1_row;
  logic signed [CW-1:0] c_old;
  logic signed [AW-1:0] c_sum;
  logic signed [CW-1:0] c_new;
  logic                 c_sat;

  always_comb begin
    c_old = first_step ? '0 : signed'(c_rdata);
    // f*c: Q7 x Q10 = Q17; i*g: Q7 x Q7 = Q14, aligned to Q17
    c_sum = (AW'(signed'(act[GATE_F])) * AW'(c_old))
          + ((AW'(signed'(act[GATE_I])) * AW'(signed'(act[GATE_G]))) <<< (CFRAC + XFRAC - 2 * XFRAC));
  end
  quantizer #(.IN_W(AW), .IN_FRAC(XFRAC + CFRAC), .OUT_W(CW), .OUT_FRAC(CFRAC)) u_q_cell (
    .din(c_sum), .dout(c_new), .sat(c_sat));

  assign c_we    = p1_valid;
  assign c_waddr = p1_row;
  assign c_wdata = c_new;

  // ---------------- P2: tanh(c) ----------------
  logic          p2_valid;
  logic [HB-1:0] p2_row;
  logic signed [CW-1:0] p2_c;
  logic signed [DW-1:0] p2_o;
  logic [DW-1:0] c_idx, tanh_c;
  logic          cidx_sat;
  quantizer #(.IN_W(CW), .IN_FRAC(CFRAC), .OUT_W(DW), .OUT_FRAC(LFRAC)) u_q_cidx (
    .din(p2_c), .dout(c_idx), .sat(cidx_sat));
  act_lut #(.FUNC(1'b1)) u_lut_c (.clk(clk), .addr(c_idx), .dout(tanh_c));

  // ---------------- P3: h = o * tanh(c) ----------------
  logic          p3_valid;
  logic [HB-1:0] p3_row;
  logic signed [DW-1:0] p3_o;
  logic signed [2*DW-1:0] h_prod;
  logic          h_sat;
  assign h_prod = p3_o * signed'(tanh_c);
  quantizer #(.IN_W(2*DW), .IN_FRAC(2*XFRAC), .OUT_W(DW), .OUT_FRAC(XFRAC)) u_q_h (
    .din(h_prod), .dout(h_wdata), .sat(h_sat));
  assign h_we    = p3_valid;
  assign h_waddr = p3_row;

  // ---------------- pipeline registers ----------------
  logic pipe_busy;
  assign pipe_busy = s1_valid | s2_valid | p0_valid | p1_valid | p2_valid | p3_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s2_valid <= 1'b0; p0_valid <= 1'b0;
      p1_valid <= 1'b0; p2_valid <= 1'b0; p3_valid <= 1'b0;
    end else begin
      s1_valid <= iss_valid;
      s2_valid <= s1_valid;
      p0_valid <= s2_valid & s2_last;
      p1_valid <= p0_valid;
      p2_valid <= p1_valid;
      p3_valid <= p2_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_first <= (col == '0);
    s1_last  <= (32'(col) == K - 1);
    s1_isx   <= (32'(col) < IN);
    s1_row   <= row;
    s2_first <= s1_first;
    s2_last  <= s1_last;
    s2_row   <= s1_row;
    s2_prod  <= s1_prod;
    for (int g = 0; g < N_GATES; g++) s2_bias[g] <= signed'(b_rdata[g]);
    if (s2_valid) acc <= acc_next;
    if (s2_valid && s2_last) begin
      p0_acc <= acc_next;
      p0_row <= s2_row;
    end
    p1_row <= p0_row;
    p2_row <= p1_row;
    p2_c   <= c_new;
    p2_o   <= signed'(act[GATE_O]);
    p3_row <= p2_row;
    p3_o   <= p2_o;
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      col        <= '0;
      step       <= '0;
      first_step <= 1'b1;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_ISSUE;
          row        <= '0;
          col        <= '0;
          step       <= '0;
          first_step <= 1'b1;
        end
        S_ISSUE: begin
          if (32'(col) == K - 1) begin
            col <= '0;
            if (32'(row) == H - 1) begin
              row   <= '0;
              state <= S_DRAIN;
            end else begin
              row <= row + 1'b1;
            end
          end else begin
            col <= col + 1'b1;
          end
        end
        S_DRAIN: if (!pipe_busy) begin
          first_step <= 1'b0;
          if (32'(step) == WIN - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            step  <= step + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign st_init = (state == S_IDLE) && start;
  assign st_swap = (state == S_DRAIN) && !pipe_busy;

  // start is only honoured while idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule
