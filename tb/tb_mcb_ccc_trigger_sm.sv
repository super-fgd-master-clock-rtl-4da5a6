// tb_mcb_ccc_trigger_sm -- self-checking test of the beam/internal spill
// state machine at reduced counts (4-cycle tick, 100-tick timeout, 200-cycle
// internal period with a 30-cycle gate starting 20 cycles after entry).
//
// Sequences: pre-beam trigger then no beam trigger (timeout back to IDLE,
// duration checked against (READY_TIMEOUT+1) ticks); pre-beam trigger, a
// too-early trigger (ignored), then the beam trigger (beam gate length
// checked against ACQ_TICKS ticks); the six internal spills (delay of the
// first, count, width, period, return to IDLE); finally a pre-beam trigger
// that interrupts the internal spills. The unexpected-procedure pulse must
// come once for the timeout and once for the interruption, never in the
// normal cycle. Expected values are worked out from the parameters.
module tb_mcb_ccc_trigger_sm;
  localparam int TD = 4, BW = 15, RT = 100, AT = 15, NS = 6, IP = 200, IG = 30, ID = 20;
  logic clk = 0, rst_n = 0, trig = 0;
  logic [1:0] state; logic beam_gate, int_gate, unexp; logic [2:0] nb;
  int checks = 0, failures = 0;

  mcb_ccc_trigger_sm #(.TICK_DIV(TD), .BEAM_WAIT(BW), .READY_TIMEOUT(RT),
    .ACQ_TICKS(AT), .NUM_INT_SPILLS(NS), .INT_PERIOD(IP), .INT_GATE_CYC(IG), .INT_DELAY_CYC(ID))
  dut (.clk, .rst_n, .ext_trig_in(trig), .state, .beam_gate, .int_gate,
       .int_spill_nb(nb), .unexpected(unexp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(); // 100 ns trigger = 10 cycles
    @(negedge clk) trig = 1; repeat (10) @(negedge clk); trig = 0;
  endtask

  // gate monitors
  int n_unexp = 0, ig_rise = 0, ig_len, ig_last_rise, ig_bad = 0, bg_len = 0;
  logic ig_q = 0;
  always @(posedge clk) if (rst_n) begin
    ig_q <= int_gate;
    if (int_gate && !ig_q) begin
      if (ig_rise > 0 && (int'($time/10) - ig_last_rise) != IP) ig_bad++;
      ig_rise++; ig_last_rise = int'($time/10); ig_len = 1;
    end else if (int_gate) ig_len++;
    if (!int_gate && ig_q && ig_len != IG) ig_bad++;
    if (beam_gate) bg_len++;
    if (unexp) n_unexp++;
  end

  int t0, dt;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(state == 2'd0, "idle after reset");
    // 1) pre-beam trigger with no beam trigger: timeout
    pulse();
    check(state == 2'd1, "READY_TO_BEAM after trigger");
    t0 = int'($time/10);
    while (state == 2'd1) @(negedge clk);
    dt = int'($time/10) - t0;
    check(state == 2'd0, "timeout returns to IDLE");
    check(dt >= (RT + 1) * TD - TD - 12 && dt <= (RT + 1) * TD + TD + 2,
          $sformatf("timeout after %0d cycles", dt));
    check(bg_len == 0 && ig_rise == 0, "no gate during timeout");
    @(negedge clk);
    check(n_unexp == 1, "timeout reported as unexpected");
    // 2) pre-beam, early trigger (ignored), beam trigger
    repeat (20) @(negedge clk);
    pulse();
    repeat (5 * TD) @(negedge clk);
    pulse();
    check(state == 2'd1, "trigger before 60 us ignored");
    repeat ((BW + 2) * TD) @(negedge clk);
    pulse();
    check(state == 2'd2 && beam_gate, "beam trigger opens BEAM_ACQ");
    while (state == 2'd2) @(negedge clk);
    check(bg_len >= (AT - 1) * TD + 1 && bg_len <= AT * TD + 1,
          $sformatf("beam gate %0d cycles", bg_len));
    check(state == 2'd3, "INTERNAL after beam acquisition");
    t0 = int'($time/10);
    while (!int_gate) @(negedge clk);
    dt = int'($time/10) - t0;
    check(dt == ID, $sformatf("first internal spill %0d cycles after entry", dt));
    // 3) six internal spills then IDLE
    while (state == 2'd3) @(negedge clk);
    check(state == 2'd0, "IDLE after internal spills");
    check(ig_rise == NS, $sformatf("%0d internal spills", ig_rise));
    check(ig_bad == 0, "internal spill width and period");
    check(n_unexp == 1, "normal cycle reports nothing");
    // 4) interrupt internal spills with a new pre-beam trigger
    pulse(); repeat ((BW + 1) * TD) @(negedge clk); pulse();
    while (state != 2'd3) @(negedge clk);
    repeat (IP + 10) @(negedge clk);
    check(nb == 3'd1, "one internal spill counted");
    pulse();
    check(state == 2'd1 && nb == 0, "pre-beam trigger ends internal spills");
    @(negedge clk);
    check(n_unexp == 2, "interrupted internal spills reported as unexpected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
