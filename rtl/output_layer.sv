// Result output: the linear output neuron y = W_out . h + b_out followed by the
// dequantization of y. It reads the final hidden state from the neural engine one element
// per clock (one cycle read latency), multiplies it with the 8-bit output weights held in
// its own on-chip memory and accumulates. The sum (13 fraction bits) is rounded to the
// normalized format Q3.12 (y_norm) and then mapped back to raw latency units with the
// inverse of the min-max scaling, y_raw = lat_min + y_norm * lat_range / 4096, clipped to
// 0..65535. The single linear output neuron follows the source design; the de-normalization
// in hardware is this design's choice, so the scheduler receives a latency it can use
// directly.
// Ports: `start` while idle; `done` pulses with y_norm / y_raw valid (held until the next
// start). The output weights are written through wo_* (configuration bus or online update).
// Timing: H + 2 clocks from start to done.
module output_layer
  import lstm_pkg::*;
#(
  parameter int unsigned H = 128,
  localparam int unsigned HB = (H > 1) ? $clog2(H) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [HB-1:0]        h_raddr,
  input  logic [DW-1:0]        h_rdata,
  input  logic                 wo_we,
  input  logic [HB-1:0]        wo_addr,
  input  logic [DW-1:0]        wo_data,
  input  logic [DW-1:0]        b_out,
  input  logic [RAWW-1:0]      lat_min,
  input  logic [RAWW-1:0]      lat_range,
  output logic signed [NW-1:0] y_norm,
  output logic [RAWW-1:0]      y_raw
);
  logic [HB-1:0] idx;
  logic          issuing, mac_valid, mac_last;
  logic [DW-1:0] w_rdata;
  logic signed [AW-1:0] acc, acc_next;
  logic signed [NW-1:0] y_q;
  logic          unused_sat;
  logic signed [63:0] denorm;

  weight_mem #(.WIDTH(DW), .DEPTH(H)) u_wout (
    .clk(clk), .we(wo_we), .waddr(wo_addr), .wdata(wo_data), .raddr(idx), .rdata(w_rdata));

  assign h_raddr  = idx;
  assign busy     = issuing | mac_valid;
  assign acc_next = acc + AW'(signed'(w_rdata) * signed'(h_rdata));

  quantizer #(.IN_W(AW), .IN_FRAC(AFRAC), .OUT_W(NW), .OUT_FRAC(NFRAC)) u_q_y (
    .din(acc_next), .dout(y_q), .sat(unused_sat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing   <= 1'b0;
      mac_valid <= 1'b0;
      mac_last  <= 1'b0;
      idx       <= '0;
      done      <= 1'b0;
      acc       <= '0;
      y_norm    <= '0;
    end else begin
      done      <= 1'b0;
      mac_valid <= issuing;
      mac_last  <= issuing && (32'(idx) == H - 1);
      if (start && !busy) begin
        issuing <= 1'b1;
        idx     <= '0;
        acc     <= AW'(signed'(b_out)) <<< XFRAC;
      end else if (issuing) begin
        if (32'(idx) == H - 1) issuing <= 1'b0;
        else                   idx <= idx + 1'b1;
      end
      if (mac_valid) begin
        acc <= acc_next;
        if (mac_last) begin
          y_norm <= y_q;
          done   <= 1'b1;
        end
      end
    end
  end

  // de-normalization of the registered result
  always_comb begin
    denorm = 64'(signed'({1'b0, lat_min})) + ((64'(y_norm) * signed'({48'd0, lat_range}) + 64'sd2048) >>> NFRAC);
    if (denorm < 0)            y_raw = '0;
    else if (denorm > 64'sd65535) y_raw = '1;
    else                       y_raw = RAWW'(denorm);
  end
endmodule
