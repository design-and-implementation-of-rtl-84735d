// pncg: 10-bit pseudo-noise code generator.
//
// A left-shifting 10-bit register q[9:0]; on every chip enable the register
// moves up one place and the new bit q[0] is the inverted XOR (XNOR) of
// q[9] and q[2], the connection of the reference design. The feedback
// polynomial x^10 + x^3 + 1 is primitive, so the sequence has the maximum
// length 2^10 - 1 = 1023 chips. With XNOR feedback the all-zero state is
// part of the cycle and all-ones is the locked state, so the asynchronous
// clear used by the reference design (state 0) is a valid start state.
// The code chip is q[9].
//   clear - synchronous clear driven by the PC reset command; holds q at 0
//   en    - chip enable, one clock per chip
// The clock enable in place of a derived chip clock is this design's choice.
module pncg #(
  parameter int unsigned K = dsss_pkg::PN_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [K-1:0] q,
  output logic         chip
);
  logic feedback;

  assign feedback = ~(q[K-1] ^ q[2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else if (clear)
      q <= '0;
    else if (en)
      q <= {q[K-2:0], feedback};
  end

  assign chip = q[K-1];

  // All-ones is the XNOR lock-up state and must never be reached
  assert property (@(posedge clk) disable iff (!rst_n) q != '1);
endmodule
