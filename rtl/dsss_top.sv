// dsss_top: computer-controlled DSSS transmitter with DDFS-BPSK output.
//
// Data path, as in the reference design:
//   data_gen       divider N0 -> 1 kbit/s square-wave data (1010...)
//   chip_clock_sel dividers N1..N4 and a 4-to-1 mux -> PN chip rate
//   pncg           10-bit XNOR-feedback shift register, chip = q[9]
//   spreader       data XOR chip -> modulating bit
//   ddfs_bpsk      24-bit DDFS; the modulating bit selects phase 0/180
//                  degrees -> 8-bit BPSK DAC code, plus the bare carrier
//   pc_control     serial 7-byte command: tuning word, spreading factor,
//                  PN reset
// All blocks run on the single system clock; the dividers produce clock
// enables. They reset together, so the chip stream and the data bits stay
// aligned: every data bit holds exactly K_SS = N0/(2*Ni) chips
// (50, 100, 500 or 1000 at the default sizes). The DAC and output filter
// are outside the chip: bpsk_out drives an external DAC.
// Latency: a change of data or chip reaches bpsk_out two clocks later.
module dsss_top
  import dsss_pkg::*;
#(
  parameter int unsigned N0           = dsss_pkg::N0_DATA,
  parameter int unsigned N1           = dsss_pkg::N1_SS50,
  parameter int unsigned N2           = dsss_pkg::N2_SS100,
  parameter int unsigned N3           = dsss_pkg::N3_SS500,
  parameter int unsigned N4           = dsss_pkg::N4_SS1000,
  parameter int unsigned CLKS_PER_BIT = dsss_pkg::UART_CLKS_PER_BIT
) (
  input  logic                 clk,        // 50 MHz
  input  logic                 rst_n,
  input  logic                 uart_rxd,   // serial commands from the PC
  output logic [ROM_DBITS-1:0] bpsk_out,   // DSSS-BPSK DAC code
  output logic [ROM_DBITS-1:0] sin_out,    // unmodulated carrier DAC code
  output logic                 data,       // data bit
  output logic                 bit_tick,   // first clock of a data bit
  output logic                 chip_clk,   // selected chip clock (square)
  output logic                 chip_tick,  // chip enable
  output logic                 pn_chip,    // PN code chip
  output logic [PN_BITS-1:0]   pn_state,   // PN shift register
  output logic                 spread,     // data XOR chip
  output logic [ACC_BITS-1:0]  code_f,     // active tuning word
  output ss_factor_e           factor_ss,  // active spreading factor
  output logic                 pn_reset,   // PN generator held cleared
  output logic                 frame_ok,   // command accepted
  output logic                 frame_err   // command discarded
);
  logic [ACC_BITS-1:0] acc_phase, mod_phase;

  pc_control #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .rxd       (uart_rxd),
    .code_f    (code_f),
    .factor_ss (factor_ss),
    .pn_reset  (pn_reset),
    .frame_ok  (frame_ok),
    .frame_err (frame_err)
  );

  data_gen #(.N0(N0)) u_data (
    .clk      (clk),
    .rst_n    (rst_n),
    .data     (data),
    .bit_tick (bit_tick)
  );

  chip_clock_sel #(.N1(N1), .N2(N2), .N3(N3), .N4(N4)) u_chipclk (
    .clk       (clk),
    .rst_n     (rst_n),
    .factor_ss (factor_ss),
    .chip_tick (chip_tick),
    .chip_clk  (chip_clk)
  );

  pncg u_pncg (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (pn_reset),
    .en    (chip_tick),
    .q     (pn_state),
    .chip  (pn_chip)
  );

  spreader u_xor (
    .data   (data),
    .chip   (pn_chip),
    .spread (spread)
  );

  ddfs_bpsk u_ddfs (
    .clk       (clk),
    .rst_n     (rst_n),
    .code_f    (code_f),
    .mod       (spread),
    .acc_phase (acc_phase),
    .mod_phase (mod_phase),
    .bpsk_out  (bpsk_out),
    .sin_out   (sin_out)
  );

  initial begin
    assert ((N0 / 2) % N1 == 0 && (N0 / 2) % N2 == 0 &&
            (N0 / 2) % N3 == 0 && (N0 / 2) % N4 == 0)
      else $error("dsss_top: chip dividers must divide the bit length N0/2");
  end
endmodule
