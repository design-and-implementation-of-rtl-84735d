// uart_rx: asynchronous serial byte receiver for the PC command link.
//
// Receives 8N1 frames (start bit 0, eight data bits LSB first, stop bit 1)
// at CLKS_PER_BIT system clocks per bit. The line is first passed through a
// two-flop synchroniser. A falling edge starts a frame; the start bit is
// re-checked at its middle, then every bit is sampled in its middle. When
// the stop bit is sampled high, rx_data holds the byte and rx_valid pulses
// for one clock; a low stop bit drops the byte and pulses rx_err instead.
// The reference design only says that the PC sends bytes serially to the
// board; the framing and baud rate (115200 at 50 MHz by default) are this
// design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = dsss_pkg::UART_CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    sync;
  logic          rxd_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end
  assign rxd_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cnt      <= '0;
      bit_idx  <= '0;
      shreg    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (!rxd_s) state <= START;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rxd_s ? IDLE : DATA;   // glitch: back to idle
          end else
            cnt <= cnt + 1'b1;
        end
        DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rxd_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end else
            cnt <= cnt + 1'b1;
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            if (rxd_s) begin
              rx_data  <= shreg;
              rx_valid <= 1'b1;
            end else
              rx_err <= 1'b1;
            state <= IDLE;
          end else
            cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

  initial assert (CLKS_PER_BIT >= 4) else $error("uart_rx: CLKS_PER_BIT too small");
endmodule
