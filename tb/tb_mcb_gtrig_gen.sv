// tb_mcb_gtrig_gen -- checks the GTRIG / FSYNC time base at its default
// rates: ticks exactly 1000 cycles (10 us at 100 MHz) apart, one cycle long,
// and FSYNC on exactly every 10th tick (10 kHz).
module tb_mcb_gtrig_gen;
  localparam int PERIOD = 1000, DIV = 10;
  logic clk = 0, rst_n = 0, gtrig_tick, fsync;
  int checks = 0, failures = 0;
  longint cyc = 0, last_tick = -1;
  int ticks = 0, fsyncs = 0, since_fsync = -1;

  mcb_gtrig_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (fsync) check(gtrig_tick, "FSYNC only with a GTRIG tick");
      if (gtrig_tick) begin
        if (last_tick >= 0) check(cyc - last_tick == PERIOD, "GTRIG period");
        last_tick = cyc;
        ticks++;
        if (fsync) begin
          if (since_fsync >= 0) check(since_fsync == DIV - 1, "FSYNC every 10th GTRIG");
          since_fsync = 0;
          fsyncs++;
        end else if (since_fsync >= 0) since_fsync++;
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (PERIOD * 105) @(posedge clk);
    check(ticks >= 104 && ticks <= 105, $sformatf("tick count %0d in 105 periods", ticks));
    check(fsyncs >= 10 && fsyncs <= 11, $sformatf("fsync count %0d", fsyncs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
