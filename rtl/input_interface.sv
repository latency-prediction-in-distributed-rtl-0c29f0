// Input data interface: accepts one raw sample per handshake from the data-acquisition
// side (the latency of the task that just completed, in 0.01 ms units, and N_STATE raw
// system-state readings) and holds it in a one-entry buffer until the feature path takes
// it. Standard valid/ready rules on both sides: a transfer happens on a clock edge where
// valid and ready are both high, and a valid sample must stay unchanged until it is taken.
// `stall_cycles` counts clocks in which a sample was offered but could not be accepted.
// The source design only names this interface; the handshake and the one-entry buffer are
// this design's choices.
// Timing: a sample accepted at one edge is offered downstream from the next cycle on; an
// empty buffer, or one being emptied in the same cycle, accepts a new sample.
module input_interface
  import lstm_pkg::*;
#(
  parameter int unsigned NS = N_STATE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [RAWW-1:0] s_latency,
  input  logic [RAWW-1:0] s_state [NS],
  output logic            m_valid,
  input  logic            m_ready,
  output logic [RAWW-1:0] m_latency,
  output logic [RAWW-1:0] m_state [NS],
  output logic [31:0]     stall_cycles
);
  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid      <= 1'b0;
      stall_cycles <= '0;
    end else begin
      if (s_ready)            m_valid <= s_valid;
      if (s_valid && !s_ready) stall_cycles <= stall_cycles + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (s_valid && s_ready) begin
      m_latency <= s_latency;
      m_state   <= s_state;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (s_valid && !s_ready) |=> (s_valid && $stable(s_latency)));
endmodule
