// tb_spreader: exhaustive truth table of the XOR spreader.
module tb_spreader;
  logic data, chip, spread;
  int checks = 0, failures = 0;

  spreader dut (.data, .chip, .spread);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expect_tab [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 4; i++) begin
        {data, chip} = 2'(i);
        #1;
        checks++;
        if (spread !== expect_tab[i][0]) begin
          failures++;
          $display("data=%b chip=%b spread=%b", data, chip, spread);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
