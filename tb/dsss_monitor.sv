// dsss_monitor: reference model and scoreboard for dsss_top, used by the
// end-to-end testbenches.
//
// Every clock (sampled on the falling edge) it rebuilds from its own
// counters what the transmitter must output and compares:
//   - data: 1010... with N0/2 clocks per bit, starting with 1 after reset;
//   - chip enable: every Ni clocks for the active factor, reset-aligned;
//   - PN register: its own XNOR(q9, q2) shift register, cleared while
//     pn_reset is high, stepped on the model chip enable;
//   - spread = data XOR q9;
//   - sin_out and bpsk_out: a model phase accumulator and a real-valued
//     sine, with 180 degrees added when the spread bit is 0, two clocks of
//     latency.
// It also counts how many chips fall in each data bit (must be
// N0/(2*Ni) whenever the factor did not change during the bit) and how
// often each mechanism happened: bits measured at each factor, PN
// full-period wraps, clock cycles with the PN generator held cleared, and
// changes of the tuning word.
module dsss_monitor
  import dsss_pkg::*;
#(
  parameter int unsigned N0 = dsss_pkg::N0_DATA,
  parameter int unsigned N1 = dsss_pkg::N1_SS50,
  parameter int unsigned N2 = dsss_pkg::N2_SS100,
  parameter int unsigned N3 = dsss_pkg::N3_SS500,
  parameter int unsigned N4 = dsss_pkg::N4_SS1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  bpsk_out,
  input  logic [7:0]  sin_out,
  input  logic        data,
  input  logic        bit_tick,
  input  logic        chip_tick,
  input  logic        pn_chip,
  input  logic [9:0]  pn_state,
  input  logic        spread,
  input  logic [23:0] code_f,
  input  ss_factor_e  factor_ss,
  input  logic        pn_reset,
  output int          checks,
  output int          failures,
  output int          bits_at [4],
  output int          pn_wraps,
  output int          pn_clear_cycles,
  output int          freq_changes
);
  localparam int unsigned HALF = N0 / 2;
  localparam int unsigned NDIV [4] = '{N1, N2, N3, N4};

  function automatic int ref_word(longint unsigned ph);
    real s = $sin(2.0 * 3.14159265358979323846 * real'(ph >> 11) / 8192.0);
    real v = 127.0 * s;
    int  m = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    return 128 + m;
  endfunction

  longint unsigned c, acc;
  logic [9:0]  pn;
  int          exp_bpsk, exp_sin, chips, f_prev;
  bit          exp_valid, bit_started, bit_changed;
  logic [23:0] code_prev;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("monitor @%0d: %s", c, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; pn_wraps = 0; pn_clear_cycles = 0; freq_changes = 0;
    for (int i = 0; i < 4; i++) bits_at[i] = 0;
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      c = 0; acc = 0; pn = '0; exp_valid = 0; chips = 0;
      bit_started = 0; bit_changed = 0; f_prev = int'(factor_ss); code_prev = code_f;
    end else begin : run
      bit data_ref, tick_ref, btick_ref;
      int f;
      f         = int'(factor_ss);
      data_ref  = ((c / HALF) % 2 == 0);
      btick_ref = (c % HALF == 0);
      tick_ref  = (c % NDIV[f] == 0);
      check(data == data_ref, "data");
      check(bit_tick == btick_ref, "bit_tick");
      check(chip_tick == tick_ref, "chip_tick");
      check(pn_state == pn, $sformatf("pn_state %h, model %h", pn_state, pn));
      check(pn_chip == pn[9], "pn_chip");
      check(spread == (data_ref ^ pn[9]), "spread");
      if (exp_valid) begin
        check(int'(sin_out) == exp_sin, $sformatf("sin_out %0d, model %0d", sin_out, exp_sin));
        check(int'(bpsk_out) == exp_bpsk, $sformatf("bpsk_out %0d, model %0d", bpsk_out, exp_bpsk));
      end
      // chips per data bit
      if (f != f_prev) bit_changed = 1;
      if (btick_ref) begin
        if (bit_started && !bit_changed) begin
          check(chips == int'(HALF / NDIV[f]),
                $sformatf("%0d chips in a bit, expected %0d", chips, HALF / NDIV[f]));
          bits_at[f]++;
        end
        bit_started = 1; bit_changed = 0; chips = 0;
      end
      chips += int'(tick_ref);
      if (code_f != code_prev) freq_changes++;
      // outputs of the next clock
      exp_sin   = ref_word(acc);
      exp_bpsk  = ref_word((acc + ((data_ref ^ pn[9]) ? 0 : (64'd1 << 23))) % (64'd1 << 24));
      exp_valid = 1;
      acc = (acc + code_f) % (64'd1 << 24);
      if (pn_reset) begin
        pn = '0;
        pn_clear_cycles++;
      end else if (tick_ref) begin
        if (pn == 10'h200) pn_wraps++;
        pn = {pn[8:0], ~(pn[9] ^ pn[2])};
      end
      f_prev = f; code_prev = code_f;
      c++;
    end
  end
endmodule
