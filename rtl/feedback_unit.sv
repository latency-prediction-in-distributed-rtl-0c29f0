// Feedback mechanism: when the measured latency of the predicted task comes back from the
// control system, normalizes it with the latency channel's min-max constants, forms the
// prediction error err = y_pred - y_true (both Q3.12) and flags whether |err| exceeds the
// threshold delta. The comparison |y_true - y_pred| > delta, which decides whether the model
// is fine-tuned, follows the source design; comparing in the normalized domain and the
// number formats are this design's choices.
// Timing: err/exceed are registered; `err_valid` pulses one clock after `fb_valid`.
module feedback_unit
  import lstm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fb_valid,
  input  logic [RAWW-1:0]      y_true_raw,
  input  logic signed [NW-1:0] y_pred,
  input  logic [RAWW-1:0]      lat_min,
  input  logic [31:0]          lat_recip,
  input  logic [NW-1:0]        delta,
  output logic                 err_valid,
  output logic signed [NW:0]   err,
  output logic                 exceed
);
  logic signed [NW-1:0] y_true_n;
  logic signed [NW:0]   e;
  logic [NW:0]          mag;

  min_max_norm u_norm (.u(y_true_raw), .min(lat_min), .recip(lat_recip), .y(y_true_n));

  assign e   = (NW+1)'(y_pred) - (NW+1)'(y_true_n);
  assign mag = e[NW] ? (NW+1)'(-e) : (NW+1)'(e);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_valid <= 1'b0;
      err       <= '0;
      exceed    <= 1'b0;
    end else begin
      err_valid <= fb_valid;
      if (fb_valid) begin
        err    <= e;
        exceed <= (mag > {1'b0, delta});
      end
    end
  end
endmodule
