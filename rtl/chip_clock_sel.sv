// chip_clock_sel: chip-rate generator of the PN code generator.
//
// Four dividers by N1..N4 (1000, 500, 100, 50 at 50 MHz: 50, 100, 500 and
// 1000 kchip/s) run in parallel; a 4-to-1 multiplexer controlled by the
// spreading-factor select picks one of them (0: N1, 1: N2, 2: N3, 3: N4), as
// in the reference design. The selected divider's one-clock tick is the chip
// enable of the PN generator; its square wave is brought out as chip_clk for
// observation. All dividers reset together and every Ni divides the data
// bit length N0/2, so each data bit holds exactly K_SS = N0/(2*Ni) chips.
// Clock-enable ticks in place of a multiplexed derived clock are this
// design's choice.
module chip_clock_sel
  import dsss_pkg::*;
#(
  parameter int unsigned N1 = dsss_pkg::N1_SS50,
  parameter int unsigned N2 = dsss_pkg::N2_SS100,
  parameter int unsigned N3 = dsss_pkg::N3_SS500,
  parameter int unsigned N4 = dsss_pkg::N4_SS1000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ss_factor_e factor_ss,
  output logic       chip_tick,
  output logic       chip_clk
);
  logic [3:0] div_clk, div_tick;

  clk_divider #(.N(N1)) u_div1 (.clk, .rst_n, .clk_out(div_clk[0]), .tick(div_tick[0]));
  clk_divider #(.N(N2)) u_div2 (.clk, .rst_n, .clk_out(div_clk[1]), .tick(div_tick[1]));
  clk_divider #(.N(N3)) u_div3 (.clk, .rst_n, .clk_out(div_clk[2]), .tick(div_tick[2]));
  clk_divider #(.N(N4)) u_div4 (.clk, .rst_n, .clk_out(div_clk[3]), .tick(div_tick[3]));

  always_comb begin
    chip_tick = div_tick[factor_ss];
    chip_clk  = div_clk[factor_ss];
  end
endmodule
