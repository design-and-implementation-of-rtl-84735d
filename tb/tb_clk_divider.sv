// tb_clk_divider: checks two dividers (N = 10 and N = 7) against a cycle
// counter kept in the testbench: tick every N clocks starting with the first
// clock after reset, clk_out high for the first N/2 clocks of each period.
module tb_clk_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic co10, t10, co7, t7;
  int checks = 0, failures = 0;

  clk_divider #(.N(10)) dut10 (.clk, .rst_n, .clk_out(co10), .tick(t10));
  clk_divider #(.N(7))  dut7  (.clk, .rst_n, .clk_out(co7),  .tick(t7));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks10 = 0, ticks7 = 0, high10 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 700; c++) begin
      // c clocks have passed since reset was released
      checks += 4;
      if (t10 !== (c % 10 == 0))  begin failures++; $display("t10 c=%0d", c); end
      if (co10 !== (c % 10 < 5))  begin failures++; $display("co10 c=%0d", c); end
      if (t7 !== (c % 7 == 0))    begin failures++; $display("t7 c=%0d", c); end
      if (co7 !== (c % 7 < 3))    begin failures++; $display("co7 c=%0d", c); end
      ticks10 += t10; ticks7 += t7; high10 += co10;
      @(negedge clk);
    end
    checks += 3;
    if (ticks10 != 70) failures++;
    if (ticks7 != 100) failures++;
    if (high10 != 350) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
