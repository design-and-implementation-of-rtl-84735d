// sine_rom: synchronous sine look-up table of the DDFS.
//
// 2^AW words of DW bits hold one full period of a sine wave in offset
// binary for a DAC:
//   word k = 2^(DW-1) + round((2^(DW-1) - 1) * sin(2*pi*k / 2^AW))
// i.e. 1..255 with mid-scale 128 for DW = 8. The table is computed when the
// design is elaborated, with integer arithmetic only: the angle is folded
// into the first quarter wave and the sine is summed as a Taylor series in
// 30-bit fixed point (error below 1e-8, far under half an LSB).
// The read is registered: q shows the word of the address presented one
// clock earlier. The size (13-bit address, 8-bit word) follows the
// reference design; the table format is this design's choice.
module sine_rom #(
  parameter int unsigned AW = dsss_pkg::ROM_ABITS,
  parameter int unsigned DW = dsss_pkg::ROM_DBITS
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] q
);
  localparam int unsigned DEPTH = 1 << AW;
  localparam int unsigned QUART = DEPTH / 4;
  // pi/2 in Q30
  localparam longint HALF_PI_Q30 = 64'sd1686629713;

  // Table word for address k
  function automatic logic [DW-1:0] sine_word(input int unsigned k);
    int unsigned kq;
    logic        neg;
    longint      x, x2, term, sum, amp, mag;
    // fold into the first quarter wave: kq in 0..QUART
    neg = (k >= DEPTH / 2);
    kq  = k % (DEPTH / 2);
    if (kq > QUART) kq = DEPTH / 2 - kq;
    x    = (HALF_PI_Q30 * longint'(kq)) / longint'(QUART);   // angle, Q30
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int i = 1; i <= 7; i++) begin
      term = -((term * x2) >>> 30) / longint'((2 * i) * (2 * i + 1));
      sum  = sum + term;
    end
    amp = longint'(2 ** (DW - 1) - 1);
    mag = (amp * sum + (64'sd1 <<< 29)) >>> 30;              // rounded
    return neg ? DW'(longint'(2 ** (DW - 1)) - mag)
               : DW'(longint'(2 ** (DW - 1)) + mag);
  endfunction

  logic [DW-1:0] rom [DEPTH];

  initial begin
    for (int unsigned k = 0; k < DEPTH; k++)
      rom[k] = sine_word(k);
  end

  always_ff @(posedge clk) q <= rom[addr];
endmodule
