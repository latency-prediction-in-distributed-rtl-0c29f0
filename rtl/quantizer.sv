// Fixed-point re-quantizer: scales a signed IN_W-bit value with IN_FRAC fraction bits to a
// signed OUT_W-bit value with OUT_FRAC fraction bits, rounding to nearest (ties upwards) and
// saturating at the ends of the output range. With OUT_FRAC = q this is the rule
// W_hat = round(W * 2^q) / 2^q of the source design, applied to data that already is fixed
// point; it serves both as the quantization module (wide to 8 bit) and as the
// dequantization step (accumulator to a wider result format).
// SYM_SAT = 1 clips to +-(2^(OUT_W-1)-1), keeping the range symmetric.
// Purely combinational; no clock.
module quantizer #(
  parameter int unsigned IN_W     = 32,
  parameter int unsigned IN_FRAC  = 13,
  parameter int unsigned OUT_W    = 8,
  parameter int unsigned OUT_FRAC = 7,
  parameter bit          SYM_SAT  = 1'b0
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    sat    // 1 when the value was clipped
);
  localparam int unsigned EW = IN_W + OUT_FRAC + 2;   // working width
  localparam logic signed [EW-1:0] OMAX = (EW'(1) <<< (OUT_W - 1)) - EW'(1);
  localparam logic signed [EW-1:0] OMIN = SYM_SAT ? -OMAX : -(EW'(1) <<< (OUT_W - 1));

  logic signed [EW-1:0] ext, scaled;

  always_comb begin
    ext = EW'(din);
    if (OUT_FRAC >= IN_FRAC) begin
      scaled = ext <<< (OUT_FRAC - IN_FRAC);
    end else begin
      scaled = (ext + (EW'(1) <<< (IN_FRAC - OUT_FRAC - 1))) >>> (IN_FRAC - OUT_FRAC);
    end
    sat = 1'b0;
    if (scaled > OMAX) begin
      dout = OMAX[OUT_W-1:0];
      sat  = 1'b1;
    end else if (scaled < OMIN) begin
      dout = OMIN[OUT_W-1:0];
      sat  = 1'b1;
    end else begin
      dout = scaled[OUT_W-1:0];
    end
  end
endmodule
