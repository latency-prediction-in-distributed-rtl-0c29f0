// Neural engine: the LSTM inference unit. It groups the LSTM core (gate MAC lanes, LUT
// activations, requantization), the on-chip memories that hold the 8-bit gate weights and
// biases, and the state register for h and c. Weights are written through the load ports
// (from the configuration bus) while the engine is idle; the input window is read from the
// window cache through x_step/x_col; after `done` the final hidden state h(WIN) is readable
// on the o_* port (one cycle latency) until the next `start`.
// Weight layout: gate g, row r (hidden unit), column k: index r*(IN+H)+k, where columns
// 0..IN-1 multiply x(t) and columns IN..IN+H-1 multiply h(t-1). Bias of gate g, row r:
// bias memory g, index r. Gate order i, f, g, o.
// Timing: see lstm_core; WIN*(H*(IN+H)+7)+1 clocks from start to done.
module neural_engine
  import lstm_pkg::*;
#(
  parameter int unsigned IN  = 16,
  parameter int unsigned H   = 128,
  parameter int unsigned WIN = 10,
  localparam int unsigned K   = IN + H,
  localparam int unsigned HB  = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned WB  = $clog2(H * K),
  localparam int unsigned TB  = (WIN > 1) ? $clog2(WIN) : 1,
  localparam int unsigned XB  = (IN > 1) ? $clog2(IN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // parameter load
  input  logic          w_we,
  input  logic [1:0]    w_gate,
  input  logic [WB-1:0] w_addr,
  input  logic [DW-1:0] w_data,
  input  logic          b_we,
  input  logic [1:0]    b_gate,
  input  logic [HB-1:0] b_addr,
  input  logic [DW-1:0] b_data,
  // input window
  output logic [TB-1:0] x_step,
  output logic [XB-1:0] x_col,
  input  logic [DW-1:0] x_rdata,
  // final hidden state
  input  logic [HB-1:0] o_raddr,
  output logic [DW-1:0] o_rdata
);
  logic [WB-1:0] w_raddr;
  logic [HB-1:0] b_raddr;
  logic [N_GATES-1:0][DW-1:0] w_rdata, b_rdata;

  logic          st_init, st_swap, h_we, c_we;
  logic [HB-1:0] h_raddr, h_waddr, c_raddr, c_waddr;
  logic [DW-1:0] h_rdata, h_wdata;
  logic [CW-1:0] c_rdata, c_wdata;

  for (genvar g = 0; g < N_GATES; g++) begin : g_mem
    weight_mem #(.WIDTH(DW), .DEPTH(H * K)) u_w (
      .clk(clk), .we(w_we && (w_gate == 2'(g))), .waddr(w_addr), .wdata(w_data),
      .raddr(w_raddr), .rdata(w_rdata[g]));
    weight_mem #(.WIDTH(DW), .DEPTH(H)) u_b (
      .clk(clk), .we(b_we && (b_gate == 2'(g))), .waddr(b_addr), .wdata(b_data),
      .raddr(b_raddr), .rdata(b_rdata[g]));
  end

  lstm_core #(.IN(IN), .H(H), .WIN(WIN)) u_core (
    .clk, .rst_n, .start, .busy, .done,
    .w_raddr, .w_rdata, .b_raddr, .b_rdata,
    .x_step, .x_col, .x_rdata,
    .st_init, .st_swap, .h_raddr, .h_rdata, .h_we, .h_waddr, .h_wdata,
    .c_raddr, .c_rdata, .c_we, .c_waddr, .c_wdata);

  state_regs #(.H(H), .DW(DW), .CW(CW)) u_state (
    .clk, .rst_n, .init(st_init), .swap(st_swap),
    .h_raddr, .h_rdata, .h_we, .h_waddr, .h_wdata,
    .c_raddr, .c_rdata, .c_we, .c_waddr, .c_wdata,
    .o_raddr, .o_rdata);

  // parameters may only change while the engine is idle
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) (w_we || b_we) |-> !busy);
endmodule
