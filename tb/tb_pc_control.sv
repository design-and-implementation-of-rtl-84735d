// tb_pc_control: 7-byte command frames sent serially at 16 clocks per bit.
//  - after reset: L = 335544, factor 50, PN reset off
//  - stray bytes before a header are ignored
//  - a good frame updates L, factor and reset together only after its tail
//    byte, with one frame_ok pulse
//  - a wrong tail byte, or a byte with a bad stop bit inside a frame, leaves
//    the settings unchanged and gives frame_err
//  - 30 random good frames
module tb_pc_control;
  import dsss_pkg::*;
  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic [23:0] code_f;
  ss_factor_e factor_ss;
  logic pn_reset, frame_ok, frame_err;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;

  pc_control #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .rxd, .code_f, .factor_ss, .pn_reset, .frame_ok, .frame_err);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_ok  += frame_ok;
    n_err += frame_err;
  end

  task automatic send(input logic [7:0] b, input logic stop = 1'b1);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_settings(input logic [23:0] l, input int f, input logic r,
                                 input string what);
    checks++;
    if (code_f != l || int'(factor_ss) != f || pn_reset != r) begin
      failures++;
      $display("%s: L=%h factor=%0d reset=%b, expected %h %0d %b",
               what, code_f, factor_ss, pn_reset, l, f, r);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    expect_settings(24'd335544, 0, 1'b0, "reset values");
    send(8'h00); send(8'h12);
    // good frame
    send(8'hA5); send(8'h12); send(8'h34); send(8'h56); send(8'h02); send(8'h01);
    expect_settings(24'd335544, 0, 1'b0, "before tail");
    send(8'h5A);
    expect_settings(24'h123456, 2, 1'b1, "frame 1");
    checks++;
    if (n_ok != 1 || n_err != 0) begin failures++; $display("ok=%0d err=%0d", n_ok, n_err); end
    // bad tail
    send(8'hA5); send(8'hAB); send(8'hCD); send(8'hEF); send(8'h03); send(8'h00); send(8'h00);
    expect_settings(24'h123456, 2, 1'b1, "bad tail");
    checks++;
    if (n_ok != 1 || n_err != 1) begin failures++; $display("ok=%0d err=%0d", n_ok, n_err); end
    // byte error inside a frame, then the rest of it is ignored as stray bytes
    send(8'hA5); send(8'hAB); send(8'hCD, 1'b0); rxd = 1'b1; repeat (2 * CPB) @(negedge clk);
    send(8'h03); send(8'h00); send(8'h5A);
    expect_settings(24'h123456, 2, 1'b1, "byte error");
    checks++;
    if (n_ok != 1 || n_err != 2) begin failures++; $display("ok=%0d err=%0d", n_ok, n_err); end
    for (int i = 0; i < 30; i++) begin
      automatic logic [23:0] l = 24'($urandom);
      automatic logic [1:0]  f = 2'($urandom);
      automatic logic        r = 1'($urandom);
      send(8'hA5); send(l[23:16]); send(l[15:8]); send(l[7:0]);
      send({6'($urandom), f}); send({7'd0, r}); send(8'h5A);
      expect_settings(l, int'(f), r, $sformatf("random frame %0d", i));
    end
    checks++;
    if (n_ok != 31) begin failures++; $display("ok=%0d", n_ok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
