// tb_sfgd_full -- one complete spill through the synchronisation system with
// every parameter at its default: 100 MHz clock, 115200-baud UART, 16
// crates, GTRIG 10 us, FSYNC every 10th GTRIG, beam window 60 us, spill
// number latched at 4 us, cosmic window from 20 ms for 1.966 s, full window
// 1.986 s, LED blink periods 400 ms / 100 ms.
//
// The testbench configures the MCB over the UART ("e6F": SYNC, clock,
// FSYNC, spill gate and number on RJ45, mode 3 = beam OR internal window;
// "r01": readout enabled), sends one beam trigger with a beam-line spill
// number and follows the spill for 2.1 s of simulated time. It checks at
// the crates: the beam gate (about 60 us) then the cosmic gate opening at
// about 20 ms and closing at about 1.986 s after the trigger (within one
// frame time, since gate changes travel as frames), the spill number,
// READOUT_EN, GTRIG exactly every 10 us in every crate for the whole run,
// FSYNC on every 10th GTRIG, and the status LED blinking with a 100 ms
// period. In parallel the beam/internal spill state machine runs its full
// cycle at its defaults: a pre-beam trigger, the beam trigger 100 ms later,
// the 60 us beam acquisition, then six 60 us internal spills 260 ms apart,
// the first 100 us after the beam gate opened, and back to idle.
module tb_sfgd_full;
  localparam int NC = 16;
  localparam longint P = 1000;
  logic clk = 0, rst_n = 0, uart_rx = 1, uart_tx;
  logic nim_in0 = 0, nim_in1 = 0, wg_beam_daq = 0, wg_int_daq = 0, led_sync = 0;
  logic [15:0] spill_nb_in = 16'h4D2E;
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
  sfgd_sync_system dut (.*);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // monitors
  longint last_g = -1, t_trig = -1;
  longint gate_open [$], gate_close [$];
  int n_g = 0, bad_period = 0, not_all = 0, n_fs = 0, bad_fs = 0, since_fs = -1, errs = 0;
  int led_toggles = 0;
  logic gate_q = 0, led_q = 0;
  always @(posedge clk) if (feb_locked) begin
    if (feb_gtrig != '0) begin
      if (feb_gtrig != '1) not_all++;
      if (last_g >= 0 && cyc - last_g != P) bad_period++;
      last_g = cyc; n_g++;
      if (feb_fsync[0]) begin
        if (since_fs >= 0 && since_fs != 9) bad_fs++;
        since_fs = 0; n_fs++;
      end else if (since_fs >= 0) since_fs++;
    end
    if (feb_frame_err != '0) errs++;
    if (feb_spill_gate[0] && !gate_q) gate_open.push_back(cyc);
    if (!feb_spill_gate[0] && gate_q) gate_close.push_back(cyc);
    gate_q = feb_spill_gate[0];
    if (feb_led_sync[0] != led_q) led_toggles++;
    led_q = feb_led_sync[0];
    if (mcb_spill_trig) t_trig = cyc;
  end

  // beam/internal spill state machine at its defaults: pre-beam trigger at
  // 10 ms, beam trigger 100 ms later
  longint c_beam_rise = -1, c_beam_fall = -1, c_idle = -1;
  longint c_int_rise [$], c_int_fall [$];
  int c_unexp = 0;
  logic c_bg_q = 0, c_ig_q = 0;
  logic [1:0] c_st_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (ccc_beam_gate && !c_bg_q) c_beam_rise = cyc;
    if (!ccc_beam_gate && c_bg_q) c_beam_fall = cyc;
    if (ccc_int_gate && !c_ig_q) c_int_rise.push_back(cyc);
    if (!ccc_int_gate && c_ig_q) c_int_fall.push_back(cyc);
    if (c_st_q == 2'd3 && ccc_state == 2'd0) c_idle = cyc;
    if (ccc_unexpected) c_unexp++;
    c_bg_q = ccc_beam_gate; c_ig_q = ccc_int_gate; c_st_q = ccc_state;
  end
  initial begin : ccc_stim
    repeat (1_000_000) @(negedge clk);
    ccc_ext_trig_in = 1; repeat (10) @(negedge clk); ccc_ext_trig_in = 0;
    repeat (10_000_000 - 10) @(negedge clk);
    ccc_ext_trig_in = 1; repeat (10) @(negedge clk); ccc_ext_trig_in = 0;
  end

  // UART at the default 868 cycles per bit
  localparam int CPB = 868;
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

  initial begin : watchdog
    repeat (230_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk); feb_locked = 1;
    cmd("e6F", "e6F");
    cmd("r01", "r01");
    repeat (30 * P) @(negedge clk);
    check(&feb_sync_ok && &feb_readout_en, "crates in step and reading out");
    // beam trigger, 100 ns
    nim_in0 = 1; repeat (10) @(negedge clk); nim_in0 = 0;
    repeat (200 * P) @(negedge clk);
    check(feb_spill_nb[0] == 16'h4D2E && feb_spill_nb_av[0], "spill number at crates");
    // run through the spill: 1.986 s plus margin
    repeat (210_000_000 - 230 * P) @(negedge clk);
    $display("trigger at %0d, gate opens %p closes %p", t_trig, gate_open, gate_close);
    check(gate_open.size() == 2 && gate_close.size() == 2, "beam gate then cosmic gate");
    if (gate_open.size() == 2 && gate_close.size() == 2) begin
      longint frame_time;
      frame_time = 47 * 10 + 63 * 10 + 200;   // frame + compensation + pipeline
      check(gate_close[0] - gate_open[0] > 6000 - frame_time &&
            gate_close[0] - gate_open[0] < 6000 + frame_time, "beam gate about 60 us");
      check(gate_open[1] - t_trig > 2_000_000 && gate_open[1] - t_trig < 2_000_000 + 2*frame_time,
            "cosmic gate opens at 20 ms");
      check(gate_close[1] - t_trig > 198_600_000 &&
            gate_close[1] - t_trig < 198_600_000 + 2*frame_time, "cosmic gate closes at 1.986 s");
    end
    check(bad_period == 0 && not_all == 0, $sformatf("GTRIG every 10 us in all crates (%0d off)", bad_period));
    check(n_g > 200_000, $sformatf("GTRIG count %0d", n_g));
    check(bad_fs == 0 && n_fs > 20_000, "FSYNC on every 10th GTRIG");
    check(errs == 0, "no frame errors");
    // beam/internal spill state machine
    $display("ccc: beam gate %0d..%0d, internal spills %p, idle at %0d",
             c_beam_rise, c_beam_fall, c_int_rise, c_idle);
    check(c_beam_rise > 11_000_000 && c_beam_rise < 11_000_010, "beam acquisition at the beam trigger");
    check(c_beam_fall - c_beam_rise >= 5_600 && c_beam_fall - c_beam_rise <= 6_001,
          "beam acquisition 60 us");
    check(c_int_rise.size() == 6 && c_int_fall.size() == 6, "six internal spills");
    if (c_int_rise.size() == 6 && c_int_fall.size() == 6) begin
      check(c_int_rise[0] - c_beam_rise >= 9_600 && c_int_rise[0] - c_beam_rise <= 10_001,
            "first internal spill 100 us after the beam gate");
      for (int i = 0; i < 6; i++) begin
        check(c_int_fall[i] - c_int_rise[i] == 6_000, "internal spill 60 us");
        if (i > 0) check(c_int_rise[i] - c_int_rise[i-1] == 26_000_000, "internal spills 260 ms apart");
      end
      check(c_idle > c_int_fall[5], "idle after the sixth internal spill");
    end
    check(c_unexp == 0, "no unexpected procedure");
    check(led_toggles >= 38 && led_toggles <= 44, $sformatf("LED toggles %0d (100 ms period)", led_toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
