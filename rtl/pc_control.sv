// pc_control: command receiver for the computer-controlled parameters.
//
// The PC sends 7 bytes per command: 3 bytes of DDFS frequency code
// (tuning word L), 1 byte selecting the spreading factor, 1 byte of
// transmitter reset, and 2 bytes for control and synchronisation. The
// reference design gives those contents; the order and the values of the
// two control bytes are this design's choice:
//   byte 0  FRAME_HEAD (0xA5)
//   byte 1  L[23:16]   byte 2  L[15:8]   byte 3  L[7:0]
//   byte 4  spreading factor select, bits [1:0]: 0=50 1=100 2=500 3=1000
//   byte 5  reset, bit 0: 1 holds the PN generator cleared
//   byte 6  FRAME_TAIL (0x5A)
// Bytes come from uart_rx. A byte other than FRAME_HEAD is ignored while
// waiting for a frame. The new settings take effect together, in the clock
// after the tail byte is received, and frame_ok pulses; a wrong tail byte
// or a byte error discards the whole frame and pulses frame_err.
// After reset the settings are L = RESET_CODE_F (335544, 1 MHz), factor 50,
// PN reset off.
module pc_control
  import dsss_pkg::*;
#(
  parameter int unsigned          CLKS_PER_BIT = dsss_pkg::UART_CLKS_PER_BIT,
  parameter int unsigned          N            = dsss_pkg::ACC_BITS,
  parameter logic [N-1:0]         RESET_CODE_F = N'(335544)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rxd,
  output logic [N-1:0] code_f,
  output ss_factor_e   factor_ss,
  output logic         pn_reset,
  output logic         frame_ok,
  output logic         frame_err
);
  typedef enum logic [2:0] {
    S_HEAD, S_F2, S_F1, S_F0, S_KSS, S_RST, S_TAIL
  } state_e;

  state_e      state;
  logic [7:0]  rx_data;
  logic        rx_valid, rx_err;
  logic [23:0] code_sh;
  logic [7:0]  kss_sh, rst_sh;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .rxd      (rxd),
    .rx_data  (rx_data),
    .rx_valid (rx_valid),
    .rx_err   (rx_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HEAD;
      code_sh   <= '0;
      kss_sh    <= '0;
      rst_sh    <= '0;
      code_f    <= RESET_CODE_F;
      factor_ss <= SS_50;
      pn_reset  <= 1'b0;
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
      if (rx_err) begin
        if (state != S_HEAD) frame_err <= 1'b1;
        state <= S_HEAD;
      end else if (rx_valid) begin
        unique case (state)
          S_HEAD: if (rx_data == FRAME_HEAD) state <= S_F2;
          S_F2:   begin code_sh[23:16] <= rx_data; state <= S_F1;  end
          S_F1:   begin code_sh[15:8]  <= rx_data; state <= S_F0;  end
          S_F0:   begin code_sh[7:0]   <= rx_data; state <= S_KSS; end
          S_KSS:  begin kss_sh         <= rx_data; state <= S_RST; end
          S_RST:  begin rst_sh         <= rx_data; state <= S_TAIL; end
          S_TAIL: begin
            if (rx_data == FRAME_TAIL) begin
              code_f    <= N'(code_sh);
              factor_ss <= ss_factor_e'(kss_sh[1:0]);
              pn_reset  <= rst_sh[0];
              frame_ok  <= 1'b1;
            end else
              frame_err <= 1'b1;
            state <= S_HEAD;
          end
          default: state <= S_HEAD;
        endcase
      end
    end
  end
endmodule
