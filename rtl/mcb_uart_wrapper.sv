// mcb_uart_wrapper -- RS232-USB link of the Master Clock Board: a UART
// receiver and transmitter, each behind a FIFO.
//
// Received characters enter the receive FIFO and are read by the command
// decoder through rx_valid/rx_ready/rx_data. Answer characters are pushed
// through tx_valid/tx_ready/tx_data into the transmit FIFO and sent in
// order. The specification only names this block (with FIFOs); the baud
// rate (CLKS_PER_BIT, 115200 baud by default), the 8N1 format and the FIFO
// depth are this design's choices. rx_overflow pulses when a character is
// lost because the receive FIFO is full.
module mcb_uart_wrapper #(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned FIFO_DEPTH   = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       uart_rx,
  output logic       uart_tx,
  output logic       rx_valid,
  input  logic       rx_ready,
  output logic [7:0] rx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  input  logic [7:0] tx_data,
  output logic       rx_overflow
);
  logic       urx_valid, urx_ferr, rxf_ready;
  logic [7:0] urx_data;
  logic       txf_valid, utx_ready;
  logic [7:0] txf_data;

  mcb_uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(uart_rx), .valid(urx_valid), .data(urx_data), .frame_err(urx_ferr));

  mcb_sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .in_valid(urx_valid), .in_ready(rxf_ready), .in_data(urx_data),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_data));

  mcb_sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_data),
    .out_valid(txf_valid), .out_ready(utx_ready), .out_data(txf_data));

  mcb_uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(txf_valid), .ready(utx_ready), .data(txf_data), .tx(uart_tx));

  assign rx_overflow = urx_valid & ~rxf_ready;

  // a framing error only drops the character
  logic unused_ferr;
  assign unused_ferr = urx_ferr;
endmodule
