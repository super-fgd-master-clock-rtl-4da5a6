// tb_mcb_uart_wrapper -- drives the UART receive line with its own 8N1
// bit-banger and decodes the transmit line with its own receiver. Checks
// that received characters come out of the receive FIFO in order under
// random back-pressure, that characters pushed into the transmit side
// appear on the line in order and with the right bit time, that a full
// receive FIFO reports overflow and keeps its first FIFO_DEPTH characters,
// and that a character with a missing stop bit is dropped.
module tb_mcb_uart_wrapper;
  localparam int CPB = 16, DEPTH = 16;
  logic clk = 0, rst_n = 0, uart_rx = 1, uart_tx;
  logic rx_valid, rx_ready = 0, tx_valid = 0, tx_ready, rx_overflow;
  logic [7:0] rx_data, tx_data = 0;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  mcb_uart_wrapper #(.CLKS_PER_BIT(CPB), .FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rx_overflow) n_ovf++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_char(input logic [7:0] c, input bit stop = 1);
    @(negedge clk) uart_rx = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = c[i]; repeat (CPB) @(negedge clk); end
    uart_rx = stop; repeat (CPB) @(negedge clk);
    uart_rx = 1; repeat (2) @(negedge clk);
  endtask

  // line receiver on uart_tx
  logic [7:0] got_tx [$];
  initial begin : line_rx
    forever begin
      logic [7:0] c;
      @(negedge uart_tx);
      repeat (CPB/2) @(posedge clk);
      if (uart_tx != 0) $display("FAIL start bit");
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); c[i] = uart_tx; end
      repeat (CPB) @(posedge clk);
      if (uart_tx != 1) begin failures++; $display("FAIL stop bit"); end
      got_tx.push_back(c);
    end
  end

  // FIFO reader with random back-pressure
  logic [7:0] got_rx [$];
  bit reader_on = 0;
  always @(negedge clk) rx_ready <= reader_on && ($urandom_range(3) != 0);
  always @(posedge clk) if (rx_valid && rx_ready) got_rx.push_back(rx_data);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    repeat (3) @(negedge clk); rst_n = 1;
    reader_on = 1;
    // receive path
    for (int n = 0; n < 40; n++) begin
      logic [7:0] c; c = 8'($urandom);
      sent.push_back(c);
      send_char(c);
    end
    repeat (20) @(negedge clk);
    check(got_rx.size() == 40, $sformatf("received %0d of 40", got_rx.size()));
    for (int i = 0; i < 40 && i < got_rx.size(); i++) check(got_rx[i] == sent[i], "rx order/data");
    // framing error: dropped
    got_rx.delete();
    send_char(8'h55, 0);
    repeat (CPB*2) @(negedge clk);
    check(got_rx.size() == 0, "bad stop bit dropped");
    // overflow: no reader
    reader_on = 0; sent.delete();
    repeat (3) @(negedge clk);
    for (int n = 0; n < DEPTH + 3; n++) begin
      logic [7:0] c; c = 8'(n + 8'h40);
      sent.push_back(c);
      send_char(c);
    end
    check(n_ovf == 3, $sformatf("overflow count %0d", n_ovf));
    reader_on = 1;
    repeat (100) @(negedge clk);
    check(got_rx.size() == DEPTH, "FIFO kept its depth");
    for (int i = 0; i < DEPTH && i < got_rx.size(); i++) check(got_rx[i] == sent[i], "kept oldest");
    // transmit path, with and without gaps
    sent.delete();
    for (int n = 0; n < 30; n++) begin
      logic [7:0] c; c = 8'($urandom);
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      tx_valid = 1; tx_data = c; sent.push_back(c);
      @(negedge clk); tx_valid = 0;
      if (n % 7 == 0) repeat (CPB * 15) @(negedge clk);
    end
    repeat (CPB * 10 * 20) @(negedge clk);
    check(got_tx.size() == 30, $sformatf("transmitted %0d of 30", got_tx.size()));
    for (int i = 0; i < 30 && i < got_tx.size(); i++) check(got_tx[i] == sent[i], "tx order/data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
