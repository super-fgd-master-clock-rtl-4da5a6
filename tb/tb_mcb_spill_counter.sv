// tb_mcb_spill_counter -- random increments and clears against a reference
// count, including clear and increment in the same cycle and the 16-bit wrap.
module tb_mcb_spill_counter;
  logic clk = 0, rst_n = 0, inc = 0, clr = 0;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt = 0;

  mcb_spill_counter dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 70000; n++) begin
      @(negedge clk);
      inc = ($urandom_range(9) != 0);
      clr = (n > 68000) ? ($urandom_range(200) == 0) : (n == 30);
      @(posedge clk);
      if (clr) ref_cnt = 0; else if (inc) ref_cnt = (ref_cnt + 1) % 65536;
      #1;
      checks++;
      if (count != 16'(ref_cnt)) begin
        failures++; $display("FAIL count %0d expected %0d", count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
