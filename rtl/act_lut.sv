// Activation look-up table: a 256-entry ROM that maps an 8-bit pre-activation (signed,
// 4 fraction bits, so x in [-8, 8)) to an 8-bit activation (signed, 7 fraction bits).
// FUNC = 0 holds the sigmoid, FUNC = 1 the hyperbolic tangent. The source design states only
// that the nonlinear functions are look-up tables; the table size and number formats are this
// design's choice. Entry a (read as a signed byte s, x = s/16) holds
//   sigmoid: min(127, round(128 / (1 + exp(-x))))
//   tanh:    clip(round(128 * tanh(x)), -127, 127)
// with rounding half away from zero. The contents are read from rtl/sigmoid_lut.hex and
// rtl/tanh_lut.hex (paths relative to the project root).
// Timing: synchronous ROM, the value for addr appears on dout one clock after it is applied.
module act_lut #(
  parameter bit FUNC = 1'b0
) (
  input  logic       clk,
  input  logic [7:0] addr,
  output logic [7:0] dout
);
  logic [7:0] rom [256];

  initial begin
    if (FUNC == 1'b0) $readmemh("rtl/sigmoid_lut.hex", rom);
    else              $readmemh("rtl/tanh_lut.hex", rom);
  end

  always_ff @(posedge clk) dout <= rom[addr];
endmodule
