// tb_feb_sync_in -- checks the FEB SYNC-IN receiver with frames produced by
// the MCB SYNC encoder (GTRIG every 1000 cycles, FSYNC every 10th, the
// default rates). The testbench drives the encoder's inputs and the FEB's
// slow-control parameters and checks: GTRIG pass-through and its
// suppression outside the spill gate when "GTRIG only on spill" is set, the
// READOUT_EN and GRESET enables, the choice between the decoded and the
// local spill number, the local counter counting gate openings and its
// reset, the SYNC status once GTRIG and FSYNC are in step, and that a
// receiver whose PLL is not locked outputs nothing.
module tb_feb_sync_in;
  localparam int P = 1000, DIV = 10;
  logic clk = 0, rst_n = 0, locked = 0;
  // encoder side
  logic gtick = 0, fs = 0, ro = 0, gr_req = 0;
  logic [2:0] dt = 0;
  logic [15:0] sp = 16'h1111;
  logic sync, f_act, f_start;
  logic [5:0] lcd;
  // FEB parameters
  logic readout_en_en = 0, greset_en = 0, ext_spill_nb_sel = 1, gtrig_only_on_spill = 0,
        spill_cnt_reset = 0;
  logic gtrig, fsync, spill_gate, readout_en, greset, spill_nb_av, frame_ok, frame_err,
        sync_ok, led_sync_blink, led_spill_gate;
  logic [2:0] daq_type;
  logic [15:0] spill_nb;
  int checks = 0, failures = 0;
  int n_gtrig = 0, n_greset = 0, n_fsync = 0, n_err = 0;

  mcb_sync_encoder enc (.clk, .rst_n, .sync_en(1'b1), .gtrig_tick(gtick), .fsync(fs),
    .readout_en(ro), .greset_req(gr_req), .daq_type(dt), .led_sync(1'b0), .spill_nb_av(1'b1),
    .spill_nb(sp), .sync_out(sync), .frame_active(f_act), .frame_start(f_start),
    .last_comp_delay(lcd));

  feb_sync_in #(.LED_SLOW_HALF(400), .LED_FAST_HALF(100)) dut (.clk, .locked, .sync_in(sync),
    .readout_en_en, .greset_en, .ext_spill_nb_sel, .gtrig_only_on_spill, .spill_cnt_reset,
    .gtrig, .fsync, .spill_gate, .readout_en, .greset, .daq_type, .spill_nb, .spill_nb_av,
    .frame_ok, .frame_err, .sync_ok, .led_sync_blink, .led_spill_gate);

  always #5 clk = ~clk;
  always @(posedge clk) if (locked) begin
    n_gtrig += gtrig; n_greset += greset; n_fsync += fsync; n_err += frame_err;
  end

  // GTRIG source
  int gi = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (P - 1) @(negedge clk);
      gtick = 1; fs = (gi % DIV == 0); gi++;
      @(negedge clk); gtick = 0; fs = 0;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic periods(input int n);
    repeat (n * P) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g0, r0;
    repeat (3) @(negedge clk); rst_n = 1;
    periods(5);
    check(n_gtrig == 0 && !spill_gate && spill_nb == 0, "not locked: no output");
    locked = 1;
    periods(30);
    check(n_gtrig >= 28 && n_gtrig <= 30, $sformatf("GTRIG passes (%0d)", n_gtrig));
    check(n_fsync >= 2 && n_fsync <= 3, "FSYNC passes");
    check(sync_ok, "SYNC status ok");
    check(n_err == 0, "no frame errors");
    // LED blinks fast while in step
    begin
      int t; logic p; t = 0; p = led_sync_blink;
      repeat (1000) begin @(posedge clk); if (led_sync_blink != p) t++; p = led_sync_blink; end
      check(t >= 9 && t <= 10, $sformatf("fast blink %0d", t));
    end
    // READOUT_EN enable
    ro = 1; periods(2);
    check(!readout_en, "readout_en blocked when not enabled");
    readout_en_en = 1; periods(1);
    check(readout_en, "readout_en passes when enabled");
    // GRESET enable
    r0 = n_greset;
    gr_req = 1; @(negedge clk); gr_req = 0; periods(2);
    check(n_greset == r0, "GRESET blocked when not enabled");
    greset_en = 1;
    gr_req = 1; @(negedge clk); gr_req = 0; periods(2);
    check(n_greset == r0 + 1, "GRESET passes once when enabled");
    // GTRIG only on spill
    gtrig_only_on_spill = 1;
    periods(1);
    g0 = n_gtrig; periods(5);
    check(n_gtrig == g0, "GTRIG suppressed outside the spill gate");
    dt = 3'd1; sp = 16'h2222; periods(2);
    check(spill_gate && daq_type == 3'd1, "spill gate open");
    g0 = n_gtrig; periods(5);
    check(n_gtrig >= g0 + 4, "GTRIG passes in the spill gate");
    check(spill_nb == 16'h2222 && spill_nb_av, "decoded spill number");
    // local counter: gate openings
    ext_spill_nb_sel = 0;
    spill_cnt_reset = 1; @(negedge clk); spill_cnt_reset = 0;
    for (int k = 0; k < 3; k++) begin
      dt = 3'd0; periods(2);
      dt = 3'd2; periods(2);
    end
    check(spill_nb == 16'd3 && spill_nb_av, $sformatf("local spill count %0d", spill_nb));
    spill_cnt_reset = 1; @(negedge clk); spill_cnt_reset = 0; @(negedge clk);
    check(spill_nb == 0, "local spill count reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
