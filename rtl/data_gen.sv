// data_gen: the data source of the DSSS transmitter.
//
// The first divider divides the system clock by N0 and its square-wave
// output is used directly as the data stream: alternating ones and zeros,
// each bit lasting N0/2 clocks, so F_DATA = 2*F_CLK/N0 (1 kbit/s for
// N0 = 100000 at 50 MHz). The bit that starts right after reset is a 1.
//   data     - current data bit
//   bit_tick - one-clock pulse in the first clock of every bit, found by
//              comparing data with its value one clock earlier
// Following the reference design, the data is a fixed 1010... square wave;
// there is no external data input.
module data_gen #(
  parameter int unsigned N0 = dsss_pkg::N0_DATA
) (
  input  logic clk,
  input  logic rst_n,
  output logic data,
  output logic bit_tick
);
  logic div_tick;
  logic data_q;

  // Divider by N0: its clk_out is the data square wave
  clk_divider #(.N(N0)) u_div0 (
    .clk     (clk),
    .rst_n   (rst_n),
    .clk_out (data),
    .tick    (div_tick)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_q <= 1'b0;
    else        data_q <= data;
  end

  assign bit_tick = data ^ data_q;

  // The rising edge of the square wave coincides with the divider's tick
  assert property (@(posedge clk) disable iff (!rst_n) div_tick |-> (data && bit_tick));

  initial assert (N0 % 2 == 0) else $error("data_gen: N0 must be even");
endmodule
