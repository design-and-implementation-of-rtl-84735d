// tb_phase_accumulator: the 24-bit accumulator must equal the running sum
// of the tuning words modulo 2^24, one clock after each word is applied;
// includes the document's 1 MHz word 335544 and random words.
module tb_phase_accumulator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [23:0] code_f = '0, phase;
  longint unsigned model = 0;
  int checks = 0, failures = 0;

  phase_accumulator dut (.clk, .rst_n, .code_f, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (phase != 0) failures++;
    for (int i = 0; i < 3000; i++) begin
      code_f = (i < 1000) ? 24'd335544 : 24'($urandom);
      @(posedge clk);
      model = (model + code_f) % (64'd1 << 24);
      @(negedge clk);
      checks++;
      if (phase != 24'(model)) begin
        failures++;
        $display("i=%0d phase=%0d model=%0d", i, phase, model);
      end
    end
    // 1000 steps of 335544 = 335544000 mod 2^24
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
