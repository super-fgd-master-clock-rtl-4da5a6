// tb_feb_mcb_emulator -- self-checking test of a front-end board's SYNC
// encoder in Master Clock Board emulation, at default timing (GTRIG every
// 1000 cycles, 10 cycles per SYNC bit).
//
// The SYNC line is read back by a SYNC-IN decoder. The test checks: no
// frame while SYNC is disabled; decoded GTRIG exactly every 1000 cycles;
// FSYNC on every 10th GTRIG only while enabled; READOUT_EN from GSTART only
// with its enable, and from the direct parameter; one GRESET per GRESET
// edge, only with its enable, always with a GTRIG, and one from the direct
// parameter; the spill gate from GSPILL only with its enable, sent as DAQ
// type 1; the spill number marked unavailable and filled with 0xCCCC; the
// clock-out enable.
module tb_feb_mcb_emulator;
  logic clk = 0, rst_n = 0;
  logic greset_in = 0, gstart_in = 0, gspill_in = 0;
  logic ext_greset_en = 0, greset_param = 0, ext_readout_en = 0, readout_en_param = 0;
  logic ext_spill_gate_en = 0, fsync_en = 0, sync_en = 0, clk_en = 0;
  logic sync_out, clk_out_en, frame_start;

  feb_mcb_emulator dut (.*);

  logic d_gtrig, d_fsync, d_greset, d_readout_en, d_spill_gate, d_led, d_av, d_ok, d_err;
  logic [2:0] d_type;
  logic [15:0] d_nb;
  feb_sync_decoder u_dec (.clk, .rst_n, .sync_in(sync_out), .gtrig(d_gtrig),
    .fsync(d_fsync), .greset(d_greset), .readout_en(d_readout_en), .daq_type(d_type),
    .spill_gate(d_spill_gate), .led_sync(d_led), .spill_nb_av(d_av), .spill_nb(d_nb),
    .frame_ok(d_ok), .frame_err(d_err));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitors
  longint cyc = 0, last_g = -1;
  int n_gtrig = 0, n_fsync = 0, n_greset = 0, n_frames = 0, n_err = 0, period_bad = 0;
  int since_fs = -1, fs_bad = 0, greset_alone = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (frame_start) n_frames++;
    if (d_err) n_err++;
    if (d_gtrig) begin
      if (last_g >= 0 && cyc - last_g != 1000) period_bad++;
      last_g = cyc; n_gtrig++;
      if (since_fs >= 0) since_fs++;
    end
    if (d_fsync) begin
      n_fsync++;
      if (!d_gtrig || (since_fs >= 0 && since_fs != 10)) fs_bad++;
      since_fs = 0;
    end
    if (d_greset) begin n_greset++; if (!d_gtrig) greset_alone++; end
  end

  task automatic periods(input int n); repeat (n * 1000) @(negedge clk); endtask

  initial begin
    int g0, f0, r0;
    repeat (3) @(negedge clk); rst_n = 1;
    // SYNC disabled: line quiet
    periods(3);
    check(n_frames == 0 && n_gtrig == 0 && sync_out == 1'b0, "no SYNC while disabled");
    check(clk_out_en == 1'b0, "clock out disabled");
    clk_en = 1; @(negedge clk);
    check(clk_out_en == 1'b1, "clock out enabled");
    // SYNC on, FSYNC off
    sync_en = 1;
    periods(12);
    check(n_gtrig >= 10, $sformatf("GTRIG delivered (%0d)", n_gtrig));
    check(n_fsync == 0, "no FSYNC while disabled");
    check(!d_av && d_nb == 16'hCCCC, "spill number unavailable, 0xCCCC filler");
    check(!d_readout_en && !d_spill_gate && d_type == 3'd0, "fields idle");
    // FSYNC on
    fsync_en = 1; f0 = n_fsync;
    periods(35);
    check(n_fsync - f0 >= 3, $sformatf("FSYNC delivered (%0d)", n_fsync - f0));
    check(fs_bad == 0, "FSYNC on every 10th GTRIG");
    // READOUT_EN
    gstart_in = 1; periods(2);
    check(!d_readout_en, "GSTART ignored without its enable");
    ext_readout_en = 1; periods(2);
    check(d_readout_en, "READOUT_EN from GSTART");
    gstart_in = 0; periods(2);
    check(!d_readout_en, "READOUT_EN follows GSTART");
    readout_en_param = 1; periods(2);
    check(d_readout_en, "READOUT_EN from the direct parameter");
    readout_en_param = 0; periods(2);
    // GRESET
    r0 = n_greset;
    greset_in = 1; periods(1); greset_in = 0; periods(2);
    check(n_greset == r0, "external GRESET ignored without its enable");
    ext_greset_en = 1;
    greset_in = 1; periods(3); greset_in = 0; periods(2);
    check(n_greset == r0 + 1, "one GRESET per external GRESET edge");
    greset_param = 1; periods(3); greset_param = 0; periods(2);
    check(n_greset == r0 + 2, "GRESET from the direct parameter");
    check(greset_alone == 0, "GRESET always with a GTRIG");
    // spill gate
    gspill_in = 1; periods(2);
    check(!d_spill_gate, "GSPILL ignored without its enable");
    ext_spill_gate_en = 1; periods(2);
    check(d_spill_gate && d_type == 3'd1, "spill gate sent as DAQ type 1");
    gspill_in = 0; periods(2);
    check(!d_spill_gate && d_type == 3'd0, "spill gate closes");
    // summary
    check(period_bad == 0, $sformatf("GTRIG period exact (%0d off)", period_bad));
    check(n_err == 0, "no frame errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
