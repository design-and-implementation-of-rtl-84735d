// ddfs_bpsk: direct digital frequency synthesiser with BPSK phase modulation.
//
// Structure of the reference design:
//   phase accumulator (24 bits) adds the tuning word code_f every clock;
//   a 2-to-1 multiplexer selects a phase code by the modulating bit mod:
//       mod = 1 -> phase code 0        (0 degrees)
//       mod = 0 -> phase code 2^23     (180 degrees, 8388608)
//   an adder adds the phase code to the accumulator (modulo 2^24);
//   the top 13 bits of the sum address a sine ROM -> bpsk_out;
//   the top 13 bits of the bare accumulator address a second sine ROM
//   -> sin_out, the unmodulated carrier, for reference.
// F_OUT = F_CLK * code_f / 2^24; phase resolution 360/2^13 = 0.044 degrees.
// Timing: the accumulator register and the ROM register give two clocks
// from a change of mod to the matching change of bpsk_out.
// The outputs are unsigned DAC codes (see sine_rom).
module ddfs_bpsk
  import dsss_pkg::*;
#(
  parameter int unsigned N  = dsss_pkg::ACC_BITS,
  parameter int unsigned AW = dsss_pkg::ROM_ABITS,
  parameter int unsigned DW = dsss_pkg::ROM_DBITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  code_f,
  input  logic          mod,
  output logic [N-1:0]  acc_phase,
  output logic [N-1:0]  mod_phase,
  output logic [DW-1:0] bpsk_out,
  output logic [DW-1:0] sin_out
);
  localparam logic [N-1:0] CODE_PHASE_0   = '0;
  localparam logic [N-1:0] CODE_PHASE_180 = N'(1) << (N - 1);

  logic [N-1:0] phase_code;

  phase_accumulator #(.N(N)) u_pa (
    .clk    (clk),
    .rst_n  (rst_n),
    .code_f (code_f),
    .phase  (acc_phase)
  );

  always_comb begin
    phase_code = mod ? CODE_PHASE_0 : CODE_PHASE_180;
    mod_phase  = acc_phase + phase_code;
  end

  sine_rom #(.AW(AW), .DW(DW)) u_rom_bpsk (
    .clk  (clk),
    .addr (mod_phase[N-1 -: AW]),
    .q    (bpsk_out)
  );

  sine_rom #(.AW(AW), .DW(DW)) u_rom_sin (
    .clk  (clk),
    .addr (acc_phase[N-1 -: AW]),
    .q    (sin_out)
  );
endmodule
