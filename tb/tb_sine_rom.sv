// tb_sine_rom: every word of the 8192 x 8 table is compared with
// 128 + round(127 * sin(2*pi*k/8192)) computed with the simulator's real
// $sin, and the read latency of one clock is checked.
module tb_sine_rom;
  logic clk = 1'b0;
  logic [12:0] addr = '0;
  logic [7:0] q;
  int checks = 0, failures = 0;

  sine_rom dut (.clk, .addr, .q);

  always #5 clk = ~clk;

  function automatic int ref_word(int k);
    real s = $sin(2.0 * 3.14159265358979323846 * k / 8192.0);
    real v = 127.0 * s;
    int  m = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    return 128 + m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mn = 255, mx = 0;
    @(negedge clk);
    for (int k = 0; k < 8192; k++) begin
      addr = 13'(k);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(q) != ref_word(k)) begin
        failures++;
        if (failures < 10) $display("k=%0d q=%0d ref=%0d", k, q, ref_word(k));
      end
      if (q < mn) mn = q;
      if (q > mx) mx = q;
    end
    // latency: the output follows the address one clock later
    @(negedge clk) addr = 13'd2048;          // word 255
    @(posedge clk) #1;
    checks++;
    if (q != 8'd255) begin failures++; $display("lat1 q=%0d", q); end
    addr = 13'd6144;                         // word 1
    #1;
    checks++;
    if (q != 8'd255) begin failures++; $display("lat2 q=%0d", q); end
    @(posedge clk) #1;
    checks++;
    if (q != 8'd1) begin failures++; $display("lat3 q=%0d", q); end
    checks++;
    if (mn != 1 || mx != 255) begin failures++; $display("range %0d..%0d", mn, mx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
