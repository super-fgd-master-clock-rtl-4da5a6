// mcb_uart_tx -- RS232 transmitter, 8 data bits, no parity, 1 stop bit.
//
// Takes a byte when valid and ready are both high (ready is high only while
// idle), then sends start bit, eight data bits least significant first and
// the stop bit, CLKS_PER_BIT cycles each. The line idles high.
module mcb_uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  output logic       ready,
  input  logic [7:0] data,
  output logic       tx
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [CW-1:0] cnt;
  logic [3:0]    nbit;     // bits left to send after the current one
  logic [8:0]    sh;       // data bits then stop bit
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; nbit <= '0; sh <= '1; busy <= 1'b0; tx <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (valid) begin
        busy <= 1'b1;
        tx   <= 1'b0;              // start bit
        sh   <= {1'b1, data};
        nbit <= 4'd9;
        cnt  <= '0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt <= '0;
      if (nbit == 4'd0) begin
        busy <= 1'b0;
        tx   <= 1'b1;
      end else begin
        tx   <= sh[0];
        sh   <= {1'b1, sh[8:1]};
        nbit <= nbit - 1'b1;
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
