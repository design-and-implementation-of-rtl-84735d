// phase_accumulator: DDFS phase accumulator.
//
// An unsigned N-bit register that adds the frequency tuning word L every
// clock and wraps modulo 2^N, so the output frequency is
// F_OUT = F_CLK * L / 2^N (3 Hz resolution for N = 24 at 50 MHz). The
// register output is the accumulated phase. Reset to 0 is this design's
// choice.
module phase_accumulator #(
  parameter int unsigned N = dsss_pkg::ACC_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] code_f,
  output logic [N-1:0] phase
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + code_f;
  end
endmodule
