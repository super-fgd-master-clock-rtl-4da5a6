// tb_sfgd_sync_system -- end-to-end test of the synchronisation system: the
// MCB firmware configured over its UART, 16 crates each decoding the SYNC
// line. Trigger windows are shortened (beam 6000 cycles as in the design,
// cosmic from 20000 for 60000, full 80000) and the UART runs at 16 cycles
// per bit; GTRIG (1000 cycles), FSYNC (every 10th) and the SYNC bit rate
// keep their default values.
//
// Every cycle it checks that all crates see identical decoded signals (star
// network), and that decoded GTRIGs stay exactly one GTRIG period apart,
// also when a GTRIG has to wait behind a spill frame (compensation delay).
// It counts each mechanism and fails any that never happened: GTRIG and
// FSYNC delivery, spill-event frames, a GTRIG delayed behind a frame, GRESET,
// READOUT_EN, each DAQ mode reaching the crates, the beam-line spill number,
// the internal spill counter and its reset, the 0xCCCC filler, GTRIG
// suppression outside the spill gate, SYNC disable and recovery, the UART
// link reset and an error answer. Alongside, the beam/internal spill state
// machine (4-cycle tick, 100-tick timeout, 400-cycle internal period) is
// taken through a timeout, a full beam cycle with its six internal spills,
// and an internal series cut short by a new pre-beam trigger. A front-end
// board in MCB emulation is driven through its external GRESET, GSTART and
// GSPILL inputs and its SYNC output is decoded and counted.
module tb_sfgd_sync_system;
  localparam int NC = 16, P = 1000, BIT_CLKS = 10, CPB = 16;
  localparam int BEAM = 6000, CSTART = 20000, CLEN = 60000, FULL = 80000;

  logic clk = 0, rst_n = 0, uart_rx = 1, uart_tx;
  logic nim_in0 = 0, nim_in1 = 0, wg_beam_daq = 0, wg_int_daq = 0, led_sync = 0;
  logic [15:0] spill_nb_in = 0;
  logic sma_out0, clk_out_en;
  logic [NC-1:0] crate_sync;
  logic feb_locked = 0, feb_readout_en_en = 1, feb_greset_en = 1, feb_ext_spill_nb_sel = 1,
        feb_gtrig_only_on_spill = 0, feb_spill_cnt_reset = 0;
  logic [NC-1:0] feb_gtrig, feb_fsync, feb_spill_gate, feb_readout_en, feb_greset,
                 feb_spill_nb_av, feb_frame_ok, feb_frame_err, feb_sync_ok, feb_led_sync,
                 feb_led_spill;
  logic [NC-1:0][2:0]  feb_daq_type;
  logic [NC-1:0][15:0] feb_spill_nb;
  logic mcb_gtrig_tick, mcb_frame_start, mcb_spill_trig;
  logic [2:0] mcb_daq_type;
  logic [15:0] mcb_spill_nb;
  logic ccc_ext_trig_in = 0, ccc_beam_gate, ccc_int_gate;
  logic [1:0] ccc_state;
  logic [2:0] ccc_int_spill_nb;
  logic ccc_unexpected;
  logic [2:0] emu_ext_in = '0;
  logic [7:0] emu_cfg = '0;
  logic emu_sync_out, emu_clk_out_en, emu_frame_start;

  sfgd_sync_system #(.NUM_CRATES(NC), .BEAM_CYC(BEAM), .FULL_CYC(FULL), .COSMIC_START(CSTART),
                     .COSMIC_CYC(CLEN), .CLKS_PER_BIT(CPB), .LED_SLOW_HALF(4000),
                     .LED_FAST_HALF(1000), .CCC_TICK_DIV(4), .CCC_READY_TIMEOUT(100),
                     .CCC_INT_PERIOD(400), .CCC_INT_GATE_CYC(50), .CCC_INT_DELAY_CYC(40)) dut (.*);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_gtrig = 0, m_fsync = 0, m_spill_frame = 0, m_delayed = 0, m_greset = 0,
      m_readout = 0, m_ext_spill = 0, m_int_spill = 0, m_cnt_reset = 0, m_filler = 0,
      m_gtrig_blocked = 0, m_sync_off = 0, m_link_reset = 0, m_cmd_error = 0;
  int m_mode [7];
  int m_ccc_unexp = 0, m_ccc_timeout = 0, m_ccc_beam = 0, m_ccc_int = 0, m_ccc_done = 0, m_ccc_interrupt = 0;
  int ccc_spills_at_done = -1;
  logic [1:0] ccc_state_q = 0;
  logic ccc_bg_q = 0, ccc_ig_q = 0;
  always @(posedge clk) if (rst_n) begin
    ccc_state_q <= ccc_state; ccc_bg_q <= ccc_beam_gate; ccc_ig_q <= ccc_int_gate;
    if (ccc_state_q == 2'd1 && ccc_state == 2'd0) m_ccc_timeout++;
    if (ccc_unexpected) m_ccc_unexp++;
    if (ccc_beam_gate && !ccc_bg_q) m_ccc_beam++;
    if (ccc_int_gate && !ccc_ig_q) m_ccc_int++;
    if (ccc_state_q == 2'd3 && ccc_state == 2'd0) begin
      m_ccc_done++; ccc_spills_at_done = int'(ccc_int_spill_nb);
    end
    if (ccc_state_q == 2'd3 && ccc_state == 2'd1) m_ccc_interrupt++;
  end
  // beam/internal spill state machine: pre-beam trigger with timeout, full
  // cycle with six internal spills, and internal spills cut short
  task automatic ccc_pulse();
    @(negedge clk) ccc_ext_trig_in = 1; repeat (10) @(negedge clk); ccc_ext_trig_in = 0;
  endtask
  // MCB emulation by a front-end board: its SYNC read back by a decoder
  logic e_gtrig, e_fsync, e_greset, e_ro, e_gate, e_led, e_av, e_ok, e_err;
  logic [2:0] e_type; logic [15:0] e_nb;
  feb_sync_decoder #(.BIT_CLKS(BIT_CLKS)) u_emu_dec (.clk, .rst_n, .sync_in(emu_sync_out),
    .gtrig(e_gtrig), .fsync(e_fsync), .greset(e_greset), .readout_en(e_ro), .daq_type(e_type),
    .spill_gate(e_gate), .led_sync(e_led), .spill_nb_av(e_av), .spill_nb(e_nb),
    .frame_ok(e_ok), .frame_err(e_err));
  int m_emu_gtrig = 0, m_emu_fsync = 0, m_emu_greset = 0, m_emu_ro = 0, m_emu_gate = 0, m_emu_err = 0;
  logic e_ro_q = 0, e_gate_q = 0;
  always @(posedge clk) if (rst_n) begin
    e_ro_q <= e_ro; e_gate_q <= e_gate;
    if (e_gtrig) m_emu_gtrig++;
    if (e_fsync) m_emu_fsync++;
    if (e_greset) m_emu_greset++;
    if (e_ro && !e_ro_q) m_emu_ro++;
    if (e_gate && !e_gate_q && e_type == 3'd1) m_emu_gate++;
    if (e_err) m_emu_err++;
  end
  initial begin : emu_stim
    repeat (20) @(negedge clk);
    emu_cfg = 8'b1010_1111;            // external GRESET/GSTART/GSPILL, FSYNC, SYNC, CLK
    repeat (15_000) @(negedge clk);
    emu_ext_in = 3'b110;               // GRESET edge, GSTART
    repeat (5_000) @(negedge clk);
    emu_ext_in = 3'b011;               // GSTART, GSPILL
    repeat (5_000) @(negedge clk);
    emu_ext_in = 3'b000;
  end
  initial begin : ccc_stim
    repeat (20) @(negedge clk);
    ccc_pulse(); repeat (600) @(negedge clk);
    ccc_pulse(); repeat (80) @(negedge clk); ccc_pulse();
    repeat (3000) @(negedge clk);
    ccc_pulse(); repeat (80) @(negedge clk); ccc_pulse();
    repeat (600) @(negedge clk); ccc_pulse();
  end
  int star_bad = 0, period_bad = 0, frame_errs = 0;
  longint last_fg = -1, last_tick = -1, last_fs = -1;
  bit check_period = 1;

  always @(posedge clk) if (rst_n && feb_locked) begin
    // star network: all crates identical
    if (feb_gtrig != '0 && feb_gtrig != '1) star_bad++;
    if (feb_greset != '0 && feb_greset != '1) star_bad++;
    if (feb_spill_gate != '0 && feb_spill_gate != '1) star_bad++;
    for (int c = 1; c < NC; c++)
      if (feb_spill_nb[c] != feb_spill_nb[0] || feb_daq_type[c] != feb_daq_type[0]) star_bad++;
    if (feb_frame_err != '0) frame_errs++;
    if (feb_gtrig[0]) begin
      m_gtrig++;
      if (last_fg >= 0 && check_period && cyc - last_fg != P) period_bad++;
      last_fg = cyc;
    end
    if (feb_fsync[0]) m_fsync++;
    if (feb_greset[0]) m_greset++;
    if (feb_spill_gate[0]) m_mode[feb_daq_type[0]]++;
    // frames at the MCB: spill frames and GTRIGs that had to wait
    if (mcb_gtrig_tick) begin
      if (last_fs >= 0 && cyc - last_fs < 47 * BIT_CLKS) m_delayed++;
      last_tick = cyc;
    end
    if (mcb_frame_start) begin
      if (last_tick < 0 || cyc - last_tick > 2 * BIT_CLKS) m_spill_frame++;
      last_fs = cyc;
    end
  end

  // ---------------- UART ----------------
  string answer = "";
  initial begin : line_rx
    forever begin
      logic [7:0] c;
      @(negedge uart_tx);
      repeat (CPB/2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); c[i] = uart_tx; end
      repeat (CPB) @(posedge clk);
      answer = {answer, string'(c)};
    end
  end
  task automatic cmd(input string s, input string exp);
    answer = "";
    for (int k = 0; k < s.len(); k++) begin
      logic [7:0] c; c = s[k];
      @(negedge clk) uart_rx = 0;
      repeat (CPB) @(negedge clk);
      for (int i = 0; i < 8; i++) begin uart_rx = c[i]; repeat (CPB) @(negedge clk); end
      uart_rx = 1; repeat (CPB + 2) @(negedge clk);
    end
    repeat (CPB * 10 * (exp.len() + 2)) @(negedge clk);
    check(answer == exp, $sformatf("'%s' answered '%s', expected '%s'", s, answer, exp));
  endtask

  task automatic periods(input int n);
    repeat (n * P) @(negedge clk);
  endtask

  // beam trigger placed so that the spill frame delays the next GTRIG
  task automatic trigger(input logic [15:0] sp);
    spill_nb_in = sp;
    @(posedge clk iff mcb_gtrig_tick);
    repeat (P - 150) @(negedge clk);
    nim_in0 = 1; repeat (10) @(negedge clk); nim_in0 = 0;
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) m_mode[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk); feb_locked = 1;
    cmd("x", "x"); if (answer == "x") m_link_reset++;
    cmd("?", "y01"); if (answer == "y01") m_cmd_error++;
    // SYNC + clock + FSYNC, beam window on OUT0 and RJ45
    cmd("e2F", "e2F");
    check(clk_out_en, "clock out enabled");
    periods(25);
    check(&feb_sync_ok, "all crates GTRIG and FSYNC synchro");
    check(m_gtrig >= 20 && m_fsync >= 2, "GTRIG and FSYNC delivered");
    // readout enable with GRESET
    begin
      int g0; g0 = m_greset;
      cmd("r03", "r03");
      periods(3);
      check(&feb_readout_en, "READOUT_EN at all crates"); if (&feb_readout_en) m_readout++;
      check(m_greset == g0 + 1, "exactly one GRESET");
    end
    // beam-line spill number, mode 1
    trigger(16'h010A);
    periods(3);
    check(feb_spill_gate[0] && feb_daq_type[0] == 3'd1, "beam gate at crates");
    check(feb_spill_nb[0] == 16'h010A && feb_spill_nb_av[0], "beam-line spill number at crates");
    if (feb_spill_nb[0] == 16'h010A) m_ext_spill++;
    cmd("s00", "s010A");
    periods(8);
    check(!feb_spill_gate[0] && feb_daq_type[0] == 3'd0, "beam gate closed after 60 us");
    repeat (FULL) @(negedge clk);
    // GTRIG only on spill at the FEB
    feb_gtrig_only_on_spill = 1;
    begin
      int g0; check_period = 0; periods(1); g0 = m_gtrig; periods(10);
      check(m_gtrig == g0, "GTRIG suppressed outside spill"); if (m_gtrig == g0) m_gtrig_blocked++;
    end
    feb_gtrig_only_on_spill = 0; periods(2); last_fg = -1; check_period = 1;
    // modes 2, 3, 4 with the internal spill counter
    cmd("r10", "r10");
    cmd("e5F", "e5F");
    trigger(16'h5555); repeat (CSTART + 5000) @(negedge clk);
    check(feb_daq_type[0] == 3'd2 && feb_spill_nb[0] == 16'd1, "mode 2 and internal count 1");
    if (feb_spill_nb[0] == 16'd1) m_int_spill++;
    repeat (FULL) @(negedge clk);
    cmd("e7F", "e7F");
    trigger(16'h5555); periods(3);
    check(feb_daq_type[0] == 3'd3 && feb_spill_nb[0] == 16'd2, "mode 3 and internal count 2");
    repeat (FULL) @(negedge clk);
    cmd("e9F", "e9F");
    trigger(16'h5555); periods(3);
    check(feb_daq_type[0] == 3'd4, "mode 4 full window");
    repeat (FULL) @(negedge clk);
    cmd("r10", "r10");
    periods(3);
    check(feb_spill_nb[0] == 16'd0, "internal counter reset reaches crates");
    if (feb_spill_nb[0] == 16'd0) m_cnt_reset++;
    // mode 5 WAGASCI, mode 6 NIM IN1
    cmd("eAF", "eAF");
    wg_beam_daq = 1; periods(4); wg_beam_daq = 0; periods(3);
    cmd("eCF", "eCF");
    nim_in1 = 1; periods(4); nim_in1 = 0; periods(3);
    // spill number not sent: filler
    cmd("e07", "e07");
    periods(3);
    check(feb_spill_nb[0] == 16'hCCCC && !feb_spill_nb_av[0], "0xCCCC filler");
    if (feb_spill_nb[0] == 16'hCCCC) m_filler++;
    // SYNC off and back on
    cmd("e00", "e00");
    check_period = 0;
    periods(5);
    check(!(|feb_sync_ok) && !clk_out_en, "crates lose SYNC when it is disabled");
    if (!(|feb_sync_ok)) m_sync_off++;
    last_fg = -1;
    cmd("e07", "e07");
    periods(3); check_period = 1; last_fg = -1;
    periods(25);
    check(&feb_sync_ok, "SYNC recovered");

    // ---------------- summary ----------------
    check(star_bad == 0, $sformatf("crates identical (%0d mismatches)", star_bad));
    check(period_bad == 0, $sformatf("decoded GTRIG period exact (%0d off)", period_bad));
    check(frame_errs == 0, "no frame errors");
    $display("mechanisms: gtrig=%0d fsync=%0d spill_frames=%0d delayed_gtrig=%0d greset=%0d",
             m_gtrig, m_fsync, m_spill_frame, m_delayed, m_greset);
    $display("  readout=%0d ext_spill=%0d int_spill=%0d cnt_reset=%0d filler=%0d blocked=%0d",
             m_readout, m_ext_spill, m_int_spill, m_cnt_reset, m_filler, m_gtrig_blocked);
    $display("  sync_off=%0d link_reset=%0d cmd_error=%0d modes=%0d %0d %0d %0d %0d %0d",
             m_sync_off, m_link_reset, m_cmd_error, m_mode[1], m_mode[2], m_mode[3], m_mode[4],
             m_mode[5], m_mode[6]);
    check(m_gtrig > 0, "mechanism: GTRIG");
    check(m_fsync > 0, "mechanism: FSYNC");
    check(m_spill_frame > 0, "mechanism: spill-event frame");
    check(m_delayed > 0, "mechanism: GTRIG delayed behind a frame");
    check(m_greset > 0, "mechanism: GRESET");
    check(m_readout > 0, "mechanism: READOUT_EN");
    check(m_ext_spill > 0, "mechanism: beam-line spill number");
    check(m_int_spill > 0, "mechanism: internal spill counter");
    check(m_cnt_reset > 0, "mechanism: spill counter reset");
    check(m_filler > 0, "mechanism: 0xCCCC filler");
    check(m_gtrig_blocked > 0, "mechanism: GTRIG only on spill");
    check(m_sync_off > 0, "mechanism: SYNC disable");
    check(m_link_reset > 0, "mechanism: link reset");
    check(m_cmd_error > 0, "mechanism: error answer");
    $display("ccc: timeout=%0d beam=%0d internal=%0d done=%0d interrupt=%0d",
             m_ccc_timeout, m_ccc_beam, m_ccc_int, m_ccc_done, m_ccc_interrupt);
    check(m_ccc_timeout > 0, "mechanism: ready-to-beam timeout");
    check(m_ccc_beam > 0, "mechanism: beam acquisition gate");
    check(m_ccc_int > 0, "mechanism: internal spills");
    check(m_ccc_done > 0 && ccc_spills_at_done == 6, "mechanism: six internal spills then idle");
    check(m_ccc_interrupt > 0, "mechanism: pre-beam trigger ends internal spills");
    check(m_ccc_unexp == m_ccc_timeout + m_ccc_interrupt, "unexpected-procedure pulses");
    $display("emulator: gtrig=%0d fsync=%0d greset=%0d readout=%0d gate=%0d",
             m_emu_gtrig, m_emu_fsync, m_emu_greset, m_emu_ro, m_emu_gate);
    check(m_emu_gtrig > 20 && m_emu_fsync > 2, "mechanism: MCB emulation GTRIG and FSYNC");
    check(m_emu_greset == 1, "mechanism: MCB emulation GRESET");
    check(m_emu_ro > 0, "mechanism: MCB emulation READOUT_EN");
    check(m_emu_gate > 0, "mechanism: MCB emulation spill gate");
    check(m_emu_err == 0 && emu_clk_out_en, "MCB emulation frames and clock enable");
    for (int m = 1; m <= 6; m++) check(m_mode[m] > 0, $sformatf("mechanism: DAQ mode %0d", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
