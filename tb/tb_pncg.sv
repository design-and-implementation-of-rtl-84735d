// tb_pncg: checks the 10-bit PN generator.
//  - first states after clear, worked out by hand for XNOR(q9, q2) feedback:
//    001, 003, 007, 00E, 01C, 038, 071
//  - the state only moves when en is high
//  - the period is 2^10 - 1 = 1023 with all states distinct and all-ones
//    never reached; over one period the chip q[9] is 1 on 511 chips
//  - clear returns the register to 0
module tb_pncg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0;
  logic [9:0] q;
  logic chip;
  int checks = 0, failures = 0;

  pncg dut (.clk, .rst_n, .clear, .en, .q, .chip);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (q=%h)", msg, q); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] first [7] = '{10'h001, 10'h003, 10'h007, 10'h00E, 10'h01C, 10'h038, 10'h071};
    bit seen [1024];
    int ones = 0, period = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(q == 10'h000, "reset state");
    // hold with en low
    repeat (5) @(negedge clk);
    check(q == 10'h000, "hold with en low");
    for (int i = 0; i < 7; i++) begin
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      check(q == first[i], $sformatf("state %0d", i + 1));
      check(chip == q[9], "chip is q[9]");
      @(negedge clk);
      check(q == first[i], "hold between enables");
    end
    // period from state 0
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(q == 10'h000, "clear");
    en = 1'b1;
    for (int i = 0; i < 1023; i++) begin
      check(!seen[q], "state repeated inside the period");
      check(q != 10'h3FF, "all-ones state reached");
      seen[q] = 1'b1;
      ones += chip;
      @(negedge clk);
      period++;
    end
    check(q == 10'h000, "period is 1023");
    check(ones == 511, $sformatf("511 ones per period, got %0d", ones));
    // clear in the middle of a run overrides en
    repeat (37) @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    check(q == 10'h000, "clear overrides en");
    @(negedge clk);
    check(q == 10'h000, "clear holds");
    clear = 1'b0; en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
