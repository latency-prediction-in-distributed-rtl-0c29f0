// Window cache: on-chip ring buffer of the most recent DEPTH input vectors, from which the
// neural engine reads its sliding window of the last WIN vectors. When an inference begins
// (`lock`), the cache pins the WIN newest vectors: base = wptr - WIN. New vectors keep being
// accepted into the free slots while the engine works, so sample collection and inference
// overlap; only when writing would overwrite the pinned window (wptr == base) is `wr_ready`
// dropped and the input stalls until `unlock`. The source design names an on-chip cache
// with a scheduling mechanism and a sliding window of 10 steps; the ring buffer, its depth
// and this pin/stall rule are this design's choices.
// Ports: write one vector per cycle (wr_valid & wr_ready); read element rd_col of window
// step rd_step (0 = oldest) with one cycle latency; `win_ready` once WIN vectors are held.
module window_cache
  import lstm_pkg::*;
#(
  parameter int unsigned IN    = 16,
  parameter int unsigned WIN   = 10,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PB = $clog2(DEPTH),
  localparam int unsigned TB = (WIN > 1) ? $clog2(WIN) : 1,
  localparam int unsigned XB = (IN > 1) ? $clog2(IN) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_valid,
  output logic                  wr_ready,
  input  logic [IN-1:0][DW-1:0] wr_vec,
  input  logic                  lock,
  input  logic                  unlock,
  output logic                  locked,
  output logic                  win_ready,
  input  logic [TB-1:0]         rd_step,
  input  logic [XB-1:0]         rd_col,
  output logic [DW-1:0]         rd_data
);
  logic [IN-1:0][DW-1:0] mem [DEPTH];
  logic [PB-1:0] wptr, base;
  logic [PB:0]   count;
  logic          wr_fire;
  logic [PB-1:0] rslot;

  assign wr_ready  = !(locked && (wptr == base));
  assign wr_fire   = wr_valid && wr_ready;
  assign win_ready = (32'(count) >= WIN);
  assign rslot     = PB'((32'(base) + 32'(rd_step)) % DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      base   <= '0;
      count  <= '0;
      locked <= 1'b0;
    end else begin
      if (wr_fire) begin
        wptr <= PB'((32'(wptr) + 1) % DEPTH);
        if (32'(count) < DEPTH) count <= count + 1'b1;
      end
      if (lock) begin
        base   <= PB'((32'(wptr) + DEPTH - WIN) % DEPTH);
        locked <= 1'b1;
      end else if (unlock) begin
        locked <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wptr] <= wr_vec;
    rd_data <= mem[rslot][rd_col];
  end

  a_lock_full: assert property (@(posedge clk) disable iff (!rst_n) lock |-> (win_ready && !locked));
endmodule
