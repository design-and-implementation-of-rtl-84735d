// tb_dsss_full: the DSSS transmitter at its full default sizes (50 MHz
// clock, N0 = 100000, chip dividers 1000/500/100/50, 115200-baud commands),
// checked every clock by dsss_monitor.
// The PC sends, for each spreading factor 50, 100, 500 and 1000 in turn, a
// command with a new tuning word: 16777 (50 kHz, with factor 50), 335544
// (1 MHz), 167772 (500 kHz) and 3355443 (10 MHz, top of the range); the
// transmitter then runs for three 1 ms data bits, and every complete bit
// must hold exactly 50, 100, 500 or 1000 chips. At 1000 chips per bit a full
// 1023-chip PN period (about 1.02 ms) passes as well. Finally the PN
// generator is held cleared by command.
module tb_dsss_full;
  import dsss_pkg::*;
  localparam int CPB = UART_CLKS_PER_BIT;
  localparam int N0 = N0_DATA;
  logic clk = 1'b0, rst_n = 1'b0, uart_rxd = 1'b1;
  logic [7:0] bpsk_out, sin_out;
  logic data, bit_tick, chip_clk, chip_tick, pn_chip, spread, pn_reset, frame_ok, frame_err;
  logic [9:0] pn_state;
  logic [23:0] code_f;
  ss_factor_e factor_ss;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;
  int m_checks, m_failures, bits_at [4], pn_wraps, pn_clear_cycles, freq_changes;

  dsss_top dut (.*);

  dsss_monitor mon (
    .clk, .rst_n, .bpsk_out, .sin_out, .data, .bit_tick, .chip_tick, .pn_chip,
    .pn_state, .spread, .code_f, .factor_ss, .pn_reset,
    .checks(m_checks), .failures(m_failures), .bits_at, .pn_wraps, .pn_clear_cycles,
    .freq_changes);

  always #10 clk = ~clk;   // 20 ns period, 50 MHz

  always @(posedge clk) if (rst_n) begin
    n_ok  += frame_ok;
    n_err += frame_err;
  end

  task automatic send(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
    uart_rxd = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  task automatic command(input logic [23:0] l, input logic [1:0] f, input logic r);
    send(FRAME_HEAD); send(l[23:16]); send(l[15:8]); send(l[7:0]);
    send({6'd0, f}); send({7'd0, r}); send(FRAME_TAIL);
    repeat (2) @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic finish();
    $display("bits checked at factor 50/100/500/1000: %0d/%0d/%0d/%0d, PN periods %0d, PN clear cycles %0d, tuning changes %0d, frames %0d",
             bits_at[0], bits_at[1], bits_at[2], bits_at[3], pn_wraps, pn_clear_cycles,
             freq_changes, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  endtask

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end

  initial begin
    logic [23:0] words [4] = '{24'd16777, 24'd335544, 24'd167772, 24'd3355443};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      command(words[f], 2'(f), 1'b0);
      check(code_f == words[f] && int'(factor_ss) == f, $sformatf("settings of factor %0d", f));
      repeat (3 * N0 / 2) @(negedge clk);
    end
    command(24'd335544, 2'd3, 1'b1);
    repeat (N0 / 2) @(negedge clk);
    check(pn_state == '0, "PN held cleared");
    for (int f = 0; f < 4; f++) check(bits_at[f] >= 2, $sformatf("bits measured at factor %0d", f));
    check(pn_wraps > 0, "no full PN period");
    check(pn_clear_cycles > 0, "PN never cleared");
    check(n_ok == 5, "frames accepted");
    finish();
  end
endmodule
