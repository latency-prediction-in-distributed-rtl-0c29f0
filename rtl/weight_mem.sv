// On-chip parameter memory (one block RAM): DEPTH words of WIDTH bits with one synchronous
// write port and one synchronous read port. The source design keeps the quantized network
// parameters in on-chip memory; one instance is used per LSTM gate so that the four gates
// read their weights in the same cycle, plus small instances for the biases and the output
// layer. Contents are loaded over the configuration bus; after reset they are undefined
// (in a two-state simulator: whatever the simulator starts with) until written.
// Timing: rdata shows mem[raddr] one clock after raddr; a write and a read of the same word
// in one cycle return the old value.
module weight_mem #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 18432,
  localparam int unsigned ABITS = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [ABITS-1:0] waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [ABITS-1:0] raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
