// tb_dsss_top: end-to-end test of the DSSS transmitter at reduced sizes
// (N0 = 200, chip dividers 20/10/4/2, i.e. spreading factors 5/10/25/50;
// 16 clocks per serial bit). dsss_monitor checks every output every clock.
// The PC is modelled by a serial line driver sending 7-byte command frames.
// Sequence: run at the reset settings; switch through all four spreading
// factors with new tuning words; hold the PN generator cleared by command
// and release it; send a frame with a wrong tail that must be discarded.
// Every mechanism must be seen at least once: measured bits at each
// factor, a full 1023-chip PN period, PN clear, tuning-word change,
// accepted and rejected frames.
module tb_dsss_top;
  import dsss_pkg::*;
  localparam int CPB = 16;
  localparam int N0 = 200;
  logic clk = 1'b0, rst_n = 1'b0, uart_rxd = 1'b1;
  logic [7:0] bpsk_out, sin_out;
  logic data, bit_tick, chip_clk, chip_tick, pn_chip, spread, pn_reset, frame_ok, frame_err;
  logic [9:0] pn_state;
  logic [23:0] code_f;
  ss_factor_e factor_ss;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;
  int m_checks, m_failures, bits_at [4], pn_wraps, pn_clear_cycles, freq_changes;

  dsss_top #(.N0(N0), .N1(20), .N2(10), .N3(4), .N4(2), .CLKS_PER_BIT(CPB)) dut (.*);

  dsss_monitor #(.N0(N0), .N1(20), .N2(10), .N3(4), .N4(2)) mon (
    .clk, .rst_n, .bpsk_out, .sin_out, .data, .bit_tick, .chip_tick, .pn_chip,
    .pn_state, .spread, .code_f, .factor_ss, .pn_reset,
    .checks(m_checks), .failures(m_failures), .bits_at, .pn_wraps, .pn_clear_cycles,
    .freq_changes);

  always #5 clk = ~clk;

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

  task automatic command(input logic [23:0] l, input logic [1:0] f, input logic r,
                         input logic [7:0] tail = FRAME_TAIL);
    send(FRAME_HEAD); send(l[23:16]); send(l[15:8]); send(l[7:0]);
    send({6'd0, f}); send({7'd0, r}); send(tail);
    repeat (2) @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic finish();
    $display("mechanisms: bits at factor 50/100/500/1000 (scaled): %0d/%0d/%0d/%0d, PN periods %0d, PN clear cycles %0d, tuning changes %0d, frames ok %0d, frames rejected %0d",
             bits_at[0], bits_at[1], bits_at[2], bits_at[3], pn_wraps, pn_clear_cycles,
             freq_changes, n_ok, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(code_f == 24'd335544 && factor_ss == SS_50 && !pn_reset, "reset settings");
    repeat (5 * N0) @(negedge clk);
    for (int f = 1; f < 4; f++) begin
      automatic logic [23:0] l = 24'($urandom);
      command(l, 2'(f), 1'b0);
      check(code_f == l && int'(factor_ss) == f, $sformatf("settings of factor %0d", f));
      repeat (5 * N0) @(negedge clk);
    end
    // at 2 clocks per chip a full PN period takes 2046 clocks
    repeat (12 * N0) @(negedge clk);
    command(24'd1000000, 2'd0, 1'b1);
    check(pn_reset && pn_state == '0, "PN held cleared");
    repeat (3 * N0) @(negedge clk);
    check(pn_state == '0, "PN stays cleared");
    command(24'd1000000, 2'd3, 1'b0);
    repeat (3 * N0) @(negedge clk);
    check(pn_state != '0, "PN runs again");
    command(24'd77, 2'd1, 1'b0, 8'h00);
    check(code_f == 24'd1000000 && factor_ss == SS_1000, "rejected frame leaves settings");
    repeat (2 * N0) @(negedge clk);
    check(n_ok == 5 && n_err == 1, $sformatf("frames ok %0d rejected %0d", n_ok, n_err));
    for (int f = 0; f < 4; f++) check(bits_at[f] > 0, $sformatf("no bit measured at factor %0d", f));
    check(pn_wraps > 0, "no full PN period");
    check(pn_clear_cycles > 0, "PN never cleared");
    check(freq_changes > 0, "tuning word never changed");
    finish();
  end
endmodule
