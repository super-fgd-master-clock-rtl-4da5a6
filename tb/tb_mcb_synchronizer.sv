// tb_mcb_synchronizer -- checks that each bit of the two-stage synchronizer
// follows its input exactly two clock edges later and resets to 0.
module tb_mcb_synchronizer;
  logic clk = 0, rst_n = 0;
  logic [3:0] d = '0, q;
  logic [3:0] hist [3];
  int checks = 0, failures = 0;

  mcb_synchronizer #(.WIDTH(4), .STAGES(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 4'hF;
    repeat (3) @(negedge clk);
    checks++; if (q != 0) failures++;          // in reset
    rst_n = 1;
    for (int i = 0; i < 3; i++) hist[i] = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d = 4'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      #1;
      if (n >= 2) begin
        checks++;
        if (q != hist[1]) begin failures++; $display("FAIL q=%h expected %h", q, hist[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
