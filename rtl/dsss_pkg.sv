// dsss_pkg: constants and types shared by the DSSS transmitter.
//
// The numbers are those of the reference implementation: a 50 MHz system
// clock, a data divider N0 = 100000 (1 kbit/s square-wave data), chip-rate
// dividers N1..N4 = 1000/500/100/50 (50/100/500/1000 kchip/s, spreading
// factors 50/100/500/1000), a 24-bit DDFS phase accumulator whose top 13 bits
// address an 8-bit sine table, and the BPSK phase codes 0 and 2^23 (0 and
// 180 degrees). The serial command frame layout and baud rate are this
// design's own choice.
package dsss_pkg;

  localparam int unsigned F_CLK_HZ = 50_000_000;

  // Dividers
  localparam int unsigned N0_DATA = 100_000;  // F_DATA = 2*F_CLK/N0 = 1 kbit/s
  localparam int unsigned N1_SS50   = 1000;   // 50 kchip/s
  localparam int unsigned N2_SS100  = 500;    // 100 kchip/s
  localparam int unsigned N3_SS500  = 100;    // 500 kchip/s
  localparam int unsigned N4_SS1000 = 50;     // 1 Mchip/s

  // PN code generator
  localparam int unsigned PN_BITS = 10;

  // DDFS
  localparam int unsigned ACC_BITS  = 24;     // n
  localparam int unsigned ROM_ABITS = 13;     // b
  localparam int unsigned ROM_DBITS = 8;

  // Spreading factor select (FACTOR_SS[1:0], mux inputs data0..data3)
  typedef enum logic [1:0] {
    SS_50   = 2'd0,
    SS_100  = 2'd1,
    SS_500  = 2'd2,
    SS_1000 = 2'd3
  } ss_factor_e;

  // Serial command frame (7 bytes): header, 3 bytes tuning word (MSB
  // first), spreading factor, reset, trailer.
  localparam int unsigned FRAME_BYTES = 7;
  localparam logic [7:0] FRAME_HEAD = 8'hA5;
  localparam logic [7:0] FRAME_TAIL = 8'h5A;

  // Default UART bit period in clocks (115200 baud at 50 MHz)
  localparam int unsigned UART_CLKS_PER_BIT = 434;

endpackage
