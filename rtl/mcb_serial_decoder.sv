// mcb_serial_decoder -- ASCII command decoder of the Master Clock Board's
// RS232-USB slow-control link.
//
// Commands (one letter, then two hexadecimal characters):
//   x       reset the link: abandons any partly received command, answers "x".
//           It is honoured at any point of a command.
//   e xx    writes the SYNC encoder byte, answers "e" + xx.
//   r xx    writes the readout byte, answers "r" + xx.
//   s 00    answers "s" + the current spill number in four hex characters.
// A letter that is not a command is answered "y01"; a character that is not
// a hex digit where one is expected is answered "y02" and the command is
// dropped. Carriage return and line feed between commands are ignored. The
// commands and answers are the specification's; the error codes, the
// ignored line endings and the upper-case hex in answers are this design's.
//
// Received characters come from the UART FIFO (valid/ready); the answer is
// built in a 5-byte buffer and pushed to the transmit FIFO one character per
// cycle while tx_ready is high. No character is read while an answer is
// being pushed. e_wr / r_wr pulse for one cycle with wr_data.
module mcb_serial_decoder
  import mcb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  logic [7:0]  rx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [7:0]  tx_data,
  output logic        e_wr,
  output logic        r_wr,
  output logic [7:0]  wr_data,
  input  logic [15:0] spill_nb,
  output logic        cmd_error     // pulse: an error answer was queued
);
  localparam logic [7:0] CH_X = 8'h78, CH_E = 8'h65, CH_R = 8'h72, CH_S = 8'h73,
                         CH_Y = 8'h79, CH_0 = 8'h30, CH_1 = 8'h31, CH_2 = 8'h32,
                         CH_CR = 8'h0D, CH_LF = 8'h0A;

  typedef enum logic [1:0] {S_CMD, S_ARG1, S_ARG2, S_SEND} state_e;
  state_e      state;
  logic [7:0]  cmd;
  logic [3:0]  hi;
  logic [7:0]  ans [5];
  logic [2:0]  ans_len, ans_idx;
  logic [7:0]  arg_val;     // value of the two argument characters

  assign arg_val = {hi, ascii_to_hex(rx_data)};

  assign rx_ready = (state != S_SEND);
  assign tx_valid = (state == S_SEND);
  assign tx_data  = ans[ans_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CMD; cmd <= '0; hi <= '0;
      for (int i = 0; i < 5; i++) ans[i] <= '0;
      ans_len <= '0; ans_idx <= '0;
      e_wr <= 1'b0; r_wr <= 1'b0; wr_data <= '0; cmd_error <= 1'b0;
    end else begin
      e_wr <= 1'b0;
      r_wr <= 1'b0;
      cmd_error <= 1'b0;
      unique case (state)
        S_SEND: begin
          if (tx_ready) begin
            if (ans_idx == ans_len - 1'b1) begin
              state   <= S_CMD;
              ans_idx <= '0;
            end else begin
              ans_idx <= ans_idx + 1'b1;
            end
          end
        end
        default: begin
          if (rx_valid) begin
            ans_idx <= '0;
            if (rx_data == CH_X) begin
              // link reset, highest priority
              ans[0]  <= CH_X;
              ans_len <= 3'd1;
              state   <= S_SEND;
            end else if (state == S_CMD) begin
              if (rx_data == CH_E || rx_data == CH_R || rx_data == CH_S) begin
                cmd   <= rx_data;
                state <= S_ARG1;
              end else if (rx_data != CH_CR && rx_data != CH_LF) begin
                ans[0] <= CH_Y; ans[1] <= CH_0; ans[2] <= CH_1;
                ans_len <= 3'd3; state <= S_SEND; cmd_error <= 1'b1;
              end
            end else if (!is_hex_digit(rx_data)) begin
              ans[0] <= CH_Y; ans[1] <= CH_0; ans[2] <= CH_2;
              ans_len <= 3'd3; state <= S_SEND; cmd_error <= 1'b1;
            end else if (state == S_ARG1) begin
              hi    <= ascii_to_hex(rx_data);
              state <= S_ARG2;
            end else begin
              // second argument character: execute
              state  <= S_SEND;
              ans[0] <= cmd;
              if (cmd == CH_S) begin
                ans[1] <= hex_to_ascii(spill_nb[15:12]);
                ans[2] <= hex_to_ascii(spill_nb[11:8]);
                ans[3] <= hex_to_ascii(spill_nb[7:4]);
                ans[4] <= hex_to_ascii(spill_nb[3:0]);
                ans_len <= 3'd5;
              end else begin
                ans[1]  <= hex_to_ascii(arg_val[7:4]);
                ans[2]  <= hex_to_ascii(arg_val[3:0]);
                ans_len <= 3'd3;
                wr_data <= arg_val;
                e_wr    <= (cmd == CH_E);
                r_wr    <= (cmd == CH_R);
              end
            end
          end
        end
      endcase
    end
  end
endmodule
