// tb_uart_rx: serial frames at 16 clocks per bit, from a line driver in the
// testbench: 200 random bytes must come out unchanged, each with one
// rx_valid pulse; a frame with a low stop bit must give rx_err and no byte;
// a short low glitch on the idle line must give nothing.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic [7:0] rx_data;
  logic rx_valid, rx_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last_byte;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .rx_data, .rx_valid, .rx_err);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin n_valid++; last_byte = rx_data; end
    if (rx_err) n_err++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int nv0 = n_valid;
      send(b, 1'b1);
      checks += 2;
      if (n_valid != nv0 + 1) begin failures++; $display("no byte %0d", i); end
      if (last_byte != b) begin failures++; $display("byte %h got %h", b, last_byte); end
    end
    begin
      automatic int v = n_valid;
      send(8'h3C, 1'b0);
      rxd = 1'b1;
      repeat (3 * CPB) @(negedge clk);
      checks += 2;
      if (n_err != 1) begin failures++; $display("n_err=%0d", n_err); end
      if (n_valid != v) failures++;
      // glitch shorter than half a bit
      rxd = 1'b0;
      repeat (3) @(negedge clk);
      rxd = 1'b1;
      repeat (12 * CPB) @(negedge clk);
      checks++;
      if (n_valid != v || n_err != 1) begin failures++; $display("glitch accepted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
