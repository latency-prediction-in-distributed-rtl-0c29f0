// Online update: fine-tunes the output layer (the H output weights and the output bias)
// with the Adam rule when a prediction missed by more than the threshold. For each
// parameter j, with err = y_pred - y_true and its input u_j (the final hidden state h_j of
// the prediction for a weight, the constant 1.0 for the bias):
//   g_j = err * u_j                       (gradient of the squared error; the factor 2 is
//                                          dropped, Adam's step does not depend on it)
//   m_j = b1*m_j + (1-b1)*g_j
//   v_j = b2*v_j + (1-b2)*g_j^2
//   W_j = W_j - alpha * m_j / sqrt(v_j + eps)
// The moment equations and the update rule follow the source design (there written with
// eps inside the square root in one place and outside it in another; here it is inside).
// The source design does not say which weights its simplified on-chip back-propagation
// reaches; this unit updates the output layer only, whose gradient needs nothing but the
// stored h. A 16-bit master copy of each parameter (Q1.14) accumulates the small steps; after
// each step it is re-quantized to 8 bits (Q1.6, round to nearest) and written back to the
// output-layer memory or the bias register, as in "store updated W_q to on-chip memory".
// Fixed point: g Q3.12 (16 bit, saturated), m Q.20 (32 bit), v Q.24 (32 bit, unsigned),
// sqrt(v+eps) Q.12, m/sqrt Q.8 (clipped to 16 bit), step = ALPHA_Q14 * ratio / 2^8.
// b1, b2 enter as K1 = round((1-b1)*2^16), K2 = round((1-b2)*2^16).
// Ports: `init_we` (`bo_init_we`) writes a weight (the bias) loaded over the bus into the
// master copy and clears its moments; `start` (idle only) runs one update over the H weights
// and then the bias with `err`; h is read through h_raddr/h_rdata (one cycle latency);
// wo_* writes the new 8-bit weights, bo_* the new bias.
// Timing: (H+1)*53 + 1 clocks from start to done (per parameter: read, gradient, 17 clocks
// of square root, 33 of division, write-back).
module adam_update
  import lstm_pkg::*;
#(
  parameter int unsigned H         = 128,
  parameter int unsigned K1        = 6554,  // (1 - 0.9)   * 2^16
  parameter int unsigned K2        = 66,    // (1 - 0.999) * 2^16
  parameter int unsigned ALPHA_Q14 = 16,    // 0.001 * 2^14
  parameter int unsigned EPS_Q24   = 1,
  localparam int unsigned HB = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned JB = $clog2(H + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init_we,
  input  logic [HB-1:0]        init_addr,
  input  logic [DW-1:0]        init_data,
  input  logic                 bo_init_we,
  input  logic [DW-1:0]        bo_init_data,
  input  logic                 start,
  input  logic signed [NW:0]   err,
  output logic                 busy,
  output logic                 done,
  output logic [HB-1:0]        h_raddr,
  input  logic [DW-1:0]        h_rdata,
  output logic                 wo_we,
  output logic [HB-1:0]        wo_addr,
  output logic [DW-1:0]        wo_data,
  output logic signed [15:0]   wo_master,
  output logic                 bo_we,
  output logic [DW-1:0]        bo_data
);
  typedef enum logic [2:0] {A_IDLE, A_READ, A_GRAD, A_SQRT, A_DIV, A_UPD} astate_e;
  astate_e state;

  // entries 0..H-1: output weights; entry H: output bias
  logic signed [15:0] master [H+1];
  logic signed [31:0] mom1   [H+1];
  logic        [31:0] mom2   [H+1];

  logic [JB-1:0]      j;
  logic               is_bias;
  logic signed [8:0]  hop;
  logic signed [NW:0] err_r;
  logic signed [15:0] g;
  logic signed [63:0] gprod, m_new, dm;
  logic        [63:0] v_new;
  logic signed [63:0] dv;
  logic signed [31:0] m_j;
  logic               m_neg;
  logic               sq_start, sq_busy, sq_done, dv_start, dv_busy, dv_done;
  logic [15:0]        root;
  logic [31:0]        quo;
  logic [15:0]        ratio;
  logic signed [31:0] step, wnew;
  logic signed [15:0] wsat;
  logic [DW-1:0]      wq;
  logic               unused_wq_sat;

  // gradient and moment update (A_GRAD, h_rdata valid)
  always_comb begin
    gprod = 64'(err_r) * 64'(hop);                             // Q19
    gprod = (gprod + 64'sd64) >>> 7;                           // Q12
    if (gprod > 64'sd32767)       g = 16'sd32767;
    else if (gprod < -64'sd32767) g = -16'sd32767;
    else                          g = 16'(gprod);
    dm    = (64'(g) <<< 8) - 64'(mom1[j]);                     // Q20
    m_new = 64'(mom1[j]) + ((dm * 64'(K1)) >>> 16);
    dv    = 64'(64'(g) * 64'(g)) - 64'(mom2[j]);               // Q24
    v_new = 64'(64'(mom2[j]) + ((dv * 64'(K2)) >>> 16));
  end

  // weight step (A_UPD, quotient valid)
  always_comb begin
    ratio = (quo > 32'd32767) ? 16'd32767 : quo[15:0];
    step  = (32'(ALPHA_Q14) * 32'(ratio) + 32'sd128) >>> 8;
    wnew  = m_neg ? 32'(master[j]) + step : 32'(master[j]) - step;
    if (wnew > 32'sd32767)       wsat = 16'sd32767;
    else if (wnew < -32'sd32768) wsat = -16'sd32768;
    else                         wsat = 16'(wnew);
  end
  quantizer #(.IN_W(16), .IN_FRAC(14), .OUT_W(DW), .OUT_FRAC(WFRAC)) u_q_w (
    .din(wsat), .dout(wq), .sat(unused_wq_sat));

  isqrt #(.RW(16)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .x(32'(v_new) + 32'(EPS_Q24)), .busy(sq_busy), .done(sq_done), .root(root));
  divider #(.NWID(32), .DWID(16)) u_div (
    .clk, .rst_n, .start(dv_start), .n(m_neg ? 32'(-m_j) : 32'(m_j)), .d(root),
    .busy(dv_busy), .done(dv_done), .q(quo));

  // the bias sees a constant input of 1.0 (128 in Q0.7, one bit wider than h)
  assign is_bias  = (32'(j) == H);
  assign hop      = is_bias ? 9'sd128 : 9'(signed'(h_rdata));
  assign m_j      = mom1[j];
  assign m_neg    = m_j[31];
  assign sq_start = (state == A_GRAD);
  assign dv_start = (state == A_SQRT) && sq_done;
  assign h_raddr  = HB'(j);
  assign busy     = (state != A_IDLE);
  assign wo_we    = (state == A_UPD) && !is_bias;
  assign wo_addr  = HB'(j);
  assign wo_data  = wq;
  assign bo_we    = (state == A_UPD) && is_bias;
  assign bo_data  = wq;
  assign wo_master = wsat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      j     <= '0;
      done  <= 1'b0;
      err_r <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        A_IDLE: if (start) begin
          err_r <= err;
          j     <= '0;
          state <= A_READ;
        end
        A_READ: state <= A_GRAD;
        A_GRAD: state <= A_SQRT;
        A_SQRT: if (sq_done) state <= A_DIV;
        A_DIV:  if (dv_done) state <= A_UPD;
        A_UPD: begin
          if (is_bias) begin
            state <= A_IDLE;
            done  <= 1'b1;
          end else begin
            j     <= j + 1'b1;
            state <= A_READ;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (init_we) begin
      master[JB'(init_addr)] <= 16'(signed'(init_data)) <<< (14 - WFRAC);
      mom1[JB'(init_addr)]   <= '0;
      mom2[JB'(init_addr)]   <= '0;
    end else if (bo_init_we) begin
      master[H] <= 16'(signed'(bo_init_data)) <<< (14 - WFRAC);
      mom1[H]   <= '0;
      mom2[H]   <= '0;
    end else if (state == A_GRAD) begin
      mom1[j] <= 32'(m_new);
      mom2[j] <= 32'(v_new);
    end else if (state == A_UPD) begin
      master[j] <= wsat;
    end
  end

  a_no_init_busy: assert property (@(posedge clk) disable iff (!rst_n) (init_we || bo_init_we) |-> !busy);
endmodule
