// Feature extraction: turns one normalized sample (the latency of the task that just
// finished plus N_STATE system-state values, all Q3.12 in [0, 1]) into one LSTM input
// vector of IN = HIST + N_STATE 8-bit values (Q0.7). It keeps the last HIST latencies in a
// shift register, so that the vector holds the latency history (oldest first, the newest
// latency at index HIST-1) followed by the state values at indices HIST..IN-1. The split of
// the input into 10 historical latencies and 6 state features follows the source design;
// the element order and the zero history after reset are this design's choices.
// Timing: `vec` is combinational from the inputs and the history; on a cycle with `fire`
// the history shifts by one.
module feature_extract
  import lstm_pkg::*;
#(
  parameter int unsigned HIST = 10,
  parameter int unsigned NS   = N_STATE,
  localparam int unsigned IN  = HIST + NS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       fire,
  input  logic signed [NW-1:0]       lat_n,
  input  logic signed [NW-1:0]       state_n [NS],
  output logic [IN-1:0][DW-1:0]      vec
);
  logic [DW-1:0] hist [HIST];     // hist[HIST-1] = newest stored latency
  logic [DW-1:0] lat_q;
  logic [DW-1:0] state_q [NS];
  logic          unused_lat_sat;
  logic [NS-1:0] unused_state_sat;

  quantizer #(.IN_W(NW), .IN_FRAC(NFRAC), .OUT_W(DW), .OUT_FRAC(XFRAC)) u_q_lat (
    .din(lat_n), .dout(lat_q), .sat(unused_lat_sat));
  for (genvar s = 0; s < NS; s++) begin : g_state
    quantizer #(.IN_W(NW), .IN_FRAC(NFRAC), .OUT_W(DW), .OUT_FRAC(XFRAC)) u_q_st (
      .din(state_n[s]), .dout(state_q[s]), .sat(unused_state_sat[s]));
  end

  always_comb begin
    for (int i = 0; i < HIST - 1; i++) vec[i] = hist[i+1];
    vec[HIST-1] = lat_q;
    for (int s = 0; s < NS; s++) vec[HIST+s] = state_q[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (fire) begin
      for (int i = 0; i < HIST - 1; i++) hist[i] <= hist[i+1];
      hist[HIST-1] <= lat_q;
    end
  end
endmodule
