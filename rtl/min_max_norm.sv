// Min-max normalization of one raw feature channel: y = (u - min) / (max - min), clipped to
// [0, 1]. The divide is replaced by a multiply with a precomputed reciprocal,
// recip = round(2^28 / (max - min)), so y = round((u - min) * recip / 2^16) in Q3.12
// (1.0 = 4096). The source design scales all features to [0, 1] with min-max scaling; doing
// it in hardware with a reciprocal constant is this design's choice.
// Ports: u raw unsigned value; min, recip per-channel constants; y normalized (0..4096).
// Purely combinational.
module min_max_norm
  import lstm_pkg::*;
(
  input  logic [RAWW-1:0]        u,
  input  logic [RAWW-1:0]        min,
  input  logic [31:0]            recip,
  output logic signed [NW-1:0]   y
);
  logic signed [RAWW:0]  diff;
  logic signed [63:0]    prod, scaled;

  always_comb begin
    diff   = signed'({1'b0, u}) - signed'({1'b0, min});
    prod   = 64'(diff) * signed'({32'd0, recip});
    scaled = (prod + 64'sd32768) >>> 16;
    if (diff <= 0)                        y = '0;
    else if (scaled > (64'sd1 <<< NFRAC)) y = NW'(1 << NFRAC);
    else                                  y = NW'(scaled);
  end
endmodule
