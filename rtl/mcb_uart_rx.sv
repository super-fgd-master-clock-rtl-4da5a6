// mcb_uart_rx -- RS232 receiver, 8 data bits, no parity, 1 stop bit.
//
// The line is synchronized with two flip-flops. A falling edge starts a
// character; the start bit is checked at its middle, then each data bit
// (least significant first) is sampled CLKS_PER_BIT cycles later, and the
// stop bit must be high. A good character pulses valid for one cycle with
// data; a missing stop bit drops the character and pulses frame_err.
module mcb_uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868   // 115200 baud at 100 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;
  rx_state_e state;
  logic [CW-1:0] cnt;
  logic [2:0]    nbit;
  logic [7:0]    sh;
  logic          rx_s1, rx_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s <= 1'b1;
      state <= R_IDLE; cnt <= '0; nbit <= '0; sh <= '0;
      valid <= 1'b0; data <= '0; frame_err <= 1'b0;
    end else begin
      rx_s1 <= rx;
      rx_s  <= rx_s1;
      valid <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: if (!rx_s) begin state <= R_START; cnt <= '0; end
        R_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt   <= '0;
            nbit  <= '0;
            state <= rx_s ? R_IDLE : R_DATA;   // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        R_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            sh   <= {rx_s, sh[7:1]};
            nbit <= nbit + 1'b1;
            if (nbit == 3'd7) state <= R_STOP;
          end else cnt <= cnt + 1'b1;
        end
        R_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= R_IDLE;
            if (rx_s) begin valid <= 1'b1; data <= sh; end
            else      frame_err <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
