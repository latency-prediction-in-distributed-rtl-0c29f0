// State register of the LSTM: keeps the hidden state h and the cell state c so that they
// carry from one time step to the next (the source design holds these intermediate states
// in block RAM). h is double-buffered: during step t the core reads h(t-1) from the current
// bank and writes h(t) into the other one; a one-cycle `swap` at the end of the step makes the
// new bank current. c is updated in place, element by element, since c(t)[j] depends only on
// c(t-1)[j]. `init` makes bank 0 current (start of an inference). The zero initial state
// h0 = c0 = 0 is not stored: the core substitutes zeros while it computes the first step.
// A third read port lets the output layer and the online update read the final h.
// Timing: all reads are synchronous, data one clock after the address.
module state_regs #(
  parameter int unsigned H  = 128,
  parameter int unsigned DW = 8,
  parameter int unsigned CW = 16,
  localparam int unsigned HB = (H > 1) ? $clog2(H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,     // make bank 0 the current bank
  input  logic          swap,     // end of a time step: written bank becomes current
  // h(t-1) read (core)
  input  logic [HB-1:0] h_raddr,
  output logic [DW-1:0] h_rdata,
  // h(t) write (core)
  input  logic          h_we,
  input  logic [HB-1:0] h_waddr,
  input  logic [DW-1:0] h_wdata,
  // c read / write (core)
  input  logic [HB-1:0] c_raddr,
  output logic [CW-1:0] c_rdata,
  input  logic          c_we,
  input  logic [HB-1:0] c_waddr,
  input  logic [CW-1:0] c_wdata,
  // final h read (output layer, online update)
  input  logic [HB-1:0] o_raddr,
  output logic [DW-1:0] o_rdata
);
  logic [DW-1:0] h_mem0 [H];
  logic [DW-1:0] h_mem1 [H];
  logic [CW-1:0] c_mem  [H];
  logic          cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cur <= 1'b0;
    else if (init) cur <= 1'b0;
    else if (swap) cur <= ~cur;
  end

  always_ff @(posedge clk) begin
    if (h_we && cur)  h_mem0[h_waddr] <= h_wdata;
    if (h_we && !cur) h_mem1[h_waddr] <= h_wdata;
    if (c_we)         c_mem[c_waddr]  <= c_wdata;
    h_rdata <= cur ? h_mem1[h_raddr] : h_mem0[h_raddr];
    o_rdata <= cur ? h_mem1[o_raddr] : h_mem0[o_raddr];
    c_rdata <= c_mem[c_raddr];
  end
endmodule
