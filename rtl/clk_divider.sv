// clk_divider: divides the system clock by N.
//
// A counter runs from 0 to N-1 and wraps. Two outputs are derived from it:
//   clk_out - square wave of period N clocks, high for the first N/2 counts
//             after a wrap (low for the rest), as the divided clock of the
//             reference design;
//   tick    - one-clock pulse in the cycle where the counter is 0, i.e. the
//             rising edge of clk_out; logic downstream uses it as a clock
//             enable instead of clocking on a derived clock.
// After reset the counter is 0, so tick is high in the first clock after
// reset and every N clocks thereafter. Several dividers reset together stay
// phase-aligned, which keeps the number of chips per data bit an integer.
// The counter-based insides are this design's choice; the division ratios
// come from the reference design.
module clk_divider #(
  parameter int unsigned N = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic tick
);
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt <= '0;
    else if (cnt == W'(N - 1))
      cnt <= '0;
    else
      cnt <= cnt + 1'b1;
  end

  assign tick    = (cnt == '0);
  assign clk_out = (cnt < W'(N / 2));

  initial assert (N >= 2) else $error("clk_divider: N must be at least 2");
endmodule
