// tb_mcb_serial_decoder -- feeds command strings to the command decoder and
// compares the answers and register writes with the protocol examples:
// "e27", "e4F", "eCF", "eDF", "r00", "r01", "r03", "r10", "s00" (answer
// "s010A" for spill number 0x010A), the "x" link reset (also in the middle
// of a command), an unknown command ("y01"), a bad hex digit ("y02"),
// lower-case hex and ignored line endings, with random gaps on the input
// and random back-pressure on the answer side.
module tb_mcb_serial_decoder;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  logic [7:0] rx_data = 0, tx_data, wr_data;
  logic e_wr, r_wr, cmd_error;
  logic [15:0] spill_nb = 16'h010A;
  int checks = 0, failures = 0;

  mcb_serial_decoder dut (.*);
  always #5 clk = ~clk;

  string answer = "";
  logic [7:0] last_e = 0, last_r = 0;
  int n_e = 0, n_r = 0;
  always @(negedge clk) tx_ready <= ($urandom_range(2) != 0);
  always @(posedge clk) begin
    if (tx_valid && tx_ready) answer = {answer, string'(tx_data)};
    if (e_wr && rst_n) begin last_e = wr_data; n_e++; end
    if (r_wr && rst_n) begin last_r = wr_data; n_r++; end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      rx_valid = 1; rx_data = s[i];
      @(posedge clk iff rx_ready);
      @(negedge clk); rx_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
  endtask

  task automatic cmd(input string s, input string expect_ans);
    answer = "";
    send(s);
    repeat (20) @(negedge clk);
    check(answer == expect_ans, $sformatf("'%s' answered '%s', expected '%s'", s, answer, expect_ans));
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, r0;
    repeat (3) @(negedge clk); rst_n = 1;
    cmd("x", "x");
    cmd("e00", "e00"); check(last_e == 8'h00 && n_e == 1, "e00 written");
    cmd("e03", "e03"); check(last_e == 8'h03, "e03 written");
    cmd("e27", "e27"); check(last_e == 8'h27, "e27 written");
    cmd("e4F", "e4F"); check(last_e == 8'h4F, "e4F written");
    cmd("eCF", "eCF"); check(last_e == 8'hCF, "eCF written");
    cmd("eDF", "eDF"); check(last_e == 8'hDF, "eDF written");
    cmd("e4f", "e4F"); check(last_e == 8'h4F, "lower-case hex");
    cmd("r00", "r00"); check(last_r == 8'h00 && n_r == 1, "r00 written");
    cmd("r01", "r01"); check(last_r == 8'h01, "r01 written");
    cmd("r03", "r03"); check(last_r == 8'h03, "r03 written");
    cmd("r10", "r10"); check(last_r == 8'h10, "r10 written");
    e0 = n_e; r0 = n_r;
    cmd("s00", "s010A"); check(n_e == e0 && n_r == r0, "s writes nothing");
    spill_nb = 16'hBEEF;
    cmd("s00", "sBEEF");
    cmd("q", "y01");
    cmd("eZ", "y02");
    e0 = n_e;
    cmd("e4x", "x"); check(n_e == e0, "x aborts a command");
    cmd("\r\ne12\r\n", "e12"); check(last_e == 8'h12, "line endings ignored");
    cmd("e55r66", "e55r66"); check(last_e == 8'h55 && last_r == 8'h66, "back-to-back commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
