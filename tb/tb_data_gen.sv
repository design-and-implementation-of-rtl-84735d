// tb_data_gen: with N0 = 40 the data must alternate 1,0,1,0... with each
// bit lasting exactly N0/2 = 20 clocks, starting with a 1 right after reset,
// and bit_tick must mark the first clock of every bit.
module tb_data_gen;
  localparam int N0 = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic data, bit_tick;
  int checks = 0, failures = 0;

  data_gen #(.N0(N0)) dut (.clk, .rst_n, .data, .bit_tick);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bits = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 20 * N0; c++) begin
      checks += 2;
      if (data !== ((c / (N0 / 2)) % 2 == 0)) begin failures++; $display("data c=%0d", c); end
      if (bit_tick !== (c % (N0 / 2) == 0))   begin failures++; $display("tick c=%0d", c); end
      bits += bit_tick;
      @(negedge clk);
    end
    checks++;
    if (bits != 40) begin failures++; $display("bits=%0d", bits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
