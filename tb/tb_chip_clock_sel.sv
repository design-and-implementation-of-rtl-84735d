// tb_chip_clock_sel: with dividers 20/10/4/2, for each factor select the
// chip enable must pulse every Ni clocks, in step with a reset-aligned
// cycle count, and chip_clk must be the selected square wave. The select is
// switched while running to check the multiplexer.
module tb_chip_clock_sel;
  import dsss_pkg::*;
  localparam int N [4] = '{20, 10, 4, 2};
  logic clk = 1'b0, rst_n = 1'b0;
  ss_factor_e factor_ss = SS_50;
  logic chip_tick, chip_clk;
  int checks = 0, failures = 0;

  chip_clock_sel #(.N1(20), .N2(10), .N3(4), .N4(2)) dut (
    .clk, .rst_n, .factor_ss, .chip_tick, .chip_clk);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      for (int f = 0; f < 4; f++) begin
        int ticks;
        ticks = 0;
        factor_ss = ss_factor_e'(f);
        for (int i = 0; i < 200; i++) begin
          checks += 2;
          if (chip_tick !== (c % N[f] == 0)) begin failures++; $display("tick f=%0d c=%0d", f, c); end
          if (chip_clk !== (c % N[f] < N[f] / 2)) begin failures++; $display("clk f=%0d c=%0d", f, c); end
          ticks += chip_tick;
          c++;
          @(negedge clk);
        end
        checks++;
        if (ticks != 200 / N[f]) begin failures++; $display("f=%0d ticks=%0d", f, ticks); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
