// tb_feb_sync_check -- drives GTRIG/FSYNC pulse trains with short periods
// (GTRIG every 100 cycles, FSYNC every 5th, LED half periods 40 and 10
// cycles) and checks the status flags and the LED blink rate in four
// situations: both in step (fast blink), FSYNC off-step (slow blink), GTRIG
// off-step (LED off) and GTRIG missing (flags drop).
module tb_feb_sync_check;
  localparam int P = 100, DIV = 5, SLOW = 40, FAST = 10;
  logic clk = 0, rst_n = 0, gtrig = 0, fsync = 0, gtrig_ok, fsync_ok, led;
  int checks = 0, failures = 0;

  feb_sync_check #(.GTRIG_PERIOD(P), .FSYNC_DIV(DIV), .LED_SLOW_HALF(SLOW),
                   .LED_FAST_HALF(FAST)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // n GTRIG pulses, period per, FSYNC every fdiv-th
  int gi = 0;
  task automatic pulses(input int n, input int per, input int fdiv);
    for (int k = 0; k < n; k++) begin
      @(negedge clk); gtrig = 1; fsync = (gi % fdiv == 0); gi++;
      @(negedge clk); gtrig = 0; fsync = 0;
      repeat (per - 2) @(negedge clk);
    end
  endtask

  // measure LED toggles over a window
  int toggles;
  task automatic count_toggles(input int cycles);
    logic prev;
    toggles = 0; prev = led;
    repeat (cycles) begin @(posedge clk); #1; if (led != prev) toggles++; prev = led; end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(!gtrig_ok && !fsync_ok && !led, "reset");
    gi = 0;
    pulses(3 * DIV, P, DIV);
    check(gtrig_ok && fsync_ok, "both synchro");
    fork pulses(8, P, DIV); count_toggles(600); join
    check(toggles >= 600 / FAST - 2 && toggles <= 600 / FAST, $sformatf("fast blink %0d", toggles));
    gi = 1;
    pulses(3 * DIV, P, DIV - 1);
    check(gtrig_ok && !fsync_ok, "FSYNC off-step");
    fork pulses(8, P, DIV - 1); count_toggles(600); join
    check(toggles >= 600 / SLOW - 1 && toggles <= 600 / SLOW, $sformatf("slow blink %0d", toggles));
    pulses(3, P - 1, DIV);
    check(!gtrig_ok, "GTRIG off-step");
    fork pulses(4, P - 1, DIV); count_toggles(300); join
    check(toggles == 0 && !led, "LED off without GTRIG synchro");
    gi = 0;
    pulses(3 * DIV, P, DIV);
    check(gtrig_ok && fsync_ok, "recovered");
    repeat (3 * P) @(negedge clk);
    check(!gtrig_ok, "missing GTRIG detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
