// Shared constants, fixed-point formats and the configuration-bus address map of the
// LSTM latency predictor.
//
// Number formats (signed two's complement unless noted):
//   weights, biases ......... 8 bit, 6 fraction bits (Q1.6, range [-2, 2))
//   x, h, gate outputs ...... 8 bit, 7 fraction bits (Q0.7)
//   cell state c ............ 16 bit, 10 fraction bits (Q5.10)
//   MAC accumulator ......... 32 bit, 13 fraction bits (weight * activation)
//   LUT index ............... 8 bit, 4 fraction bits (pre-activation clipped to [-8, 8))
//   normalized values ....... 16 bit, 12 fraction bits (Q3.12), 1.0 = 4096
// The 8-bit weight width and the window of 10 steps follow the source design; the split of
// fraction bits is this design's choice.
package lstm_pkg;

  // Word widths
  localparam int unsigned DW     = 8;   // activation / weight width
  localparam int unsigned CW     = 16;  // cell state width
  localparam int unsigned AW     = 32;  // accumulator width
  localparam int unsigned NW     = 16;  // normalized value width
  localparam int unsigned RAWW   = 16;  // raw feature width (latency in 0.01 ms units)

  // Fraction bits
  localparam int unsigned WFRAC  = 6;   // weights and biases
  localparam int unsigned XFRAC  = 7;   // x, h, gate activations
  localparam int unsigned CFRAC  = 10;  // cell state
  localparam int unsigned AFRAC  = WFRAC + XFRAC; // accumulator (13)
  localparam int unsigned LFRAC  = 4;   // activation LUT index
  localparam int unsigned NFRAC  = 12;  // normalized values
  localparam int unsigned PFRAC  = 12;  // parameters as written on the bus (16 bit Q3.12)

  // Network shape of the main configuration
  localparam int unsigned N_GATES   = 4;   // i, f, g, o
  localparam int unsigned N_STATE   = 6;   // system-state features per sample
  localparam int unsigned N_CH      = N_STATE + 1; // raw channels: latency + state

  typedef enum logic [1:0] {GATE_I = 2'd0, GATE_F = 2'd1, GATE_G = 2'd2, GATE_O = 2'd3} gate_e;

  // Configuration bus: word address space, 32-bit data. The region is selected by
  // addr[23:20]; inside a region addr[19:0] is an element index. Parameter regions take
  // 16-bit Q3.12 values in wdata[15:0], quantized to 8-bit Q1.6 on chip.
  localparam logic [3:0] REG_REGION  = 4'h0; // control/status registers
  localparam logic [3:0] WI_REGION   = 4'h1; // gate i weights, index row*(IN+H)+col
  localparam logic [3:0] WF_REGION   = 4'h2; // gate f weights
  localparam logic [3:0] WG_REGION   = 4'h3; // gate g (cell candidate) weights
  localparam logic [3:0] WO_REGION   = 4'h4; // gate o weights
  localparam logic [3:0] BIAS_REGION = 4'h5; // biases, index gate*H + row
  localparam logic [3:0] WOUT_REGION = 4'h6; // output-layer weights, index j

  // Register offsets inside REG_REGION
  localparam logic [7:0] R_CTRL     = 8'h00; // [0] auto start, [1] wait for feedback, [2] online update enable, [8] start (write 1)
  localparam logic [7:0] R_STATUS   = 8'h01; // [0] busy, [1] a loaded parameter was clipped (write clears), [6:4] controller state
  localparam logic [7:0] R_DELTA    = 8'h02; // update threshold delta, normalized Q3.12
  localparam logic [7:0] R_RESULT   = 8'h03; // [15:0] last prediction, raw units; [31:16] normalized
  localparam logic [7:0] R_N_INFER  = 8'h04; // number of predictions made
  localparam logic [7:0] R_N_UPDATE = 8'h05; // number of online updates made
  localparam logic [7:0] R_N_STALL  = 8'h06; // cycles the sample input was stalled by the cache
  localparam logic [7:0] R_BOUT     = 8'h07; // output bias: written 16 bit Q3.12, stored and read 8 bit Q1.6
  localparam logic [7:0] R_RANGE    = 8'h08; // latency range (max - min) for de-normalization
  localparam logic [7:0] R_MIN0     = 8'h10; // 8'h10 + ch : min of raw channel ch
  localparam logic [7:0] R_RECIP0   = 8'h20; // 8'h20 + ch : round(2^28 / (max - min)) of channel ch

endpackage
