// Sequential unsigned divider: q = floor(n / d) for an NWID-bit dividend and DWID-bit divisor,
// one quotient bit per clock (restoring division). d = 0 gives an all-ones quotient.
// Helper of the online update.
// Timing: `start` loads n and d; `done` pulses NWID clocks later with q valid (held).
module divider #(
  parameter int unsigned NWID = 32,
  parameter int unsigned DWID = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NWID-1:0] n,
  input  logic [DWID-1:0] d,
  output logic            busy,
  output logic            done,
  output logic [NWID-1:0] q
);
  logic [NWID-1:0] ns;
  logic [DWID-1:0] dd;
  logic [DWID-1:0] rem;
  logic [DWID:0]   rem_sh;
  logic [$clog2(NWID+1)-1:0] cnt;

  assign rem_sh = {rem[DWID-1:0], ns[NWID-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; rem <= '0; q <= '0; ns <= '0; dd <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; ns <= n; dd <= d; rem <= '0; q <= '0; cnt <= '0;
      end else if (busy) begin
        ns <= ns << 1;
        if (rem_sh >= {1'b0, dd}) begin
          rem <= DWID'(rem_sh - {1'b0, dd});
          q   <= {q[NWID-2:0], 1'b1};
        end else begin
          rem <= DWID'(rem_sh);
          q   <= {q[NWID-2:0], 1'b0};
        end
        if (32'(cnt) == NWID - 1) begin
          busy <= 1'b0; done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
