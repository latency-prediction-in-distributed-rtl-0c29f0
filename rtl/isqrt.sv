// Sequential integer square root: root = floor(sqrt(x)) for a 2*RW-bit radicand, one result
// bit per clock (restoring digit-by-digit method). Helper of the online update.
// Timing: `start` loads x; `done` pulses RW clocks later with `root` valid (held until the
// next start).
module isqrt #(
  parameter int unsigned RW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [2*RW-1:0] x,
  output logic            busy,
  output logic            done,
  output logic [RW-1:0]   root
);
  logic [2*RW-1:0] xs;
  logic [RW+1:0]   rem;
  logic [RW+3:0]   rem_sh, trial;
  logic [$clog2(RW+1)-1:0] cnt;

  assign rem_sh = {rem, xs[2*RW-1 -: 2]};
  assign trial  = {2'b00, root, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; rem <= '0; root <= '0; xs <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; xs <= x; rem <= '0; root <= '0; cnt <= '0;
      end else if (busy) begin
        xs <= xs << 2;
        if (rem_sh >= trial) begin
          rem  <= (RW+2)'(rem_sh - trial);
          root <= {root[RW-2:0], 1'b1};
        end else begin
          rem  <= (RW+2)'(rem_sh);
          root <= {root[RW-2:0], 1'b0};
        end
        if (32'(cnt) == RW - 1) begin
          busy <= 1'b0; done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
