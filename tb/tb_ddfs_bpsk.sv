// tb_ddfs_bpsk: the DDFS-BPSK modulator at its default sizes.
//  - a model accumulator (sum of tuning words mod 2^24) and a real-valued
//    sine give the expected bpsk_out and sin_out every clock, with the
//    phase code 0 for mod = 1 and 2^23 for mod = 0 and two clocks from mod to
//    output (one for the accumulator, one for the ROM register);
//  - with L = 335544 the carrier must complete about 100 periods in 5000
//    clocks (F_OUT = 50 MHz * L / 2^24 = 1 MHz);
//  - 180-degree modulation must give the mirrored DAC code, 256 - sin_out.
module tb_ddfs_bpsk;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [23:0] code_f = 24'd335544;
  logic mod = 1'b1;
  logic [23:0] acc_phase, mod_phase;
  logic [7:0] bpsk_out, sin_out;
  int checks = 0, failures = 0;

  ddfs_bpsk dut (.clk, .rst_n, .code_f, .mod, .acc_phase, .mod_phase, .bpsk_out, .sin_out);

  always #5 clk = ~clk;

  function automatic int ref_word(longint unsigned ph);
    real s = $sin(2.0 * 3.14159265358979323846 * real'(ph >> 11) / 8192.0);
    real v = 127.0 * s;
    int  m = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    return 128 + m;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned acc = 0;
    int exp_bpsk, exp_sin, crossings, mirrored, n_mod0, n_mod1;
    logic [7:0] prev_sin;
    crossings = 0; mirrored = 0; n_mod0 = 0; n_mod1 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev_sin = 8'd128;
    for (int i = 0; i < 12000; i++) begin
      if (i == 8000) code_f = 24'($urandom);
      if (i % 7 == 0) mod = 1'($urandom);
      // the accumulator holds acc now; the ROMs register the words of acc
      checks++;
      if (acc_phase != 24'(acc)) begin failures++; $display("acc i=%0d", i); end
      exp_sin  = ref_word(acc);
      exp_bpsk = ref_word((acc + (mod ? 0 : (64'd1 << 23))) % (64'd1 << 24));
      if (mod) n_mod1++; else n_mod0++;
      acc = (acc + code_f) % (64'd1 << 24);
      @(negedge clk);
      checks += 2;
      if (int'(sin_out) != exp_sin) begin
        failures++; if (failures < 10) $display("sin i=%0d %0d/%0d", i, sin_out, exp_sin);
      end
      if (int'(bpsk_out) != exp_bpsk) begin
        failures++; if (failures < 10) $display("bpsk i=%0d %0d/%0d", i, bpsk_out, exp_bpsk);
      end
      if (i < 5000 && prev_sin < 128 && sin_out >= 128) crossings++;
      if (9'(bpsk_out) + 9'(sin_out) == 9'd256) mirrored++;
      prev_sin = sin_out;
    end
    checks += 3;
    if (crossings < 99 || crossings > 101) begin failures++; $display("crossings=%0d", crossings); end
    if (mirrored < 1000) begin failures++; $display("mirrored=%0d", mirrored); end
    if (n_mod0 == 0 || n_mod1 == 0) failures++;
    $display("carrier periods in 5000 clocks: %0d, mirrored samples: %0d", crossings, mirrored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
