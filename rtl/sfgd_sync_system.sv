// sfgd_sync_system -- synchronisation system of the Super-FGD: the Master
// Clock Board and the SYNC-IN receivers of the front-end crates.
//
// The MCB firmware (mcb_fpga) produces the SYNC line. On the board a 1:16
// LVDS fanout copies it, and a 1:17 fanout copies the clock, to one RJ45
// per crate; every crate is reached by a cable of the same length (star
// network), so all crates see the same SYNC at the same clock edge. Here
// the fanout is the replication of sync_out to NUM_CRATES crate outputs,
// each held low while the SYNC output is disabled, and one SYNC-IN receiver
// (feb_sync_in) per crate decodes its copy, standing for the front-end
// boards behind that crate's backplane. All crates share one clock, the
// MCB clock, and one set of FEB slow-control parameters. The crate count
// and the MCB/crate topology are the specification's; one receiver per
// crate is this model's simplification (the backplane repeats the same
// signals to the 14 boards of a crate).
//
// Next to it, with its own ports, stands the counter-based beam/internal
// spill state machine (mcb_ccc_trigger_sm) that the specification gives as
// the model for the MCB trigger state machine; its trigger input passes a
// two-flip-flop synchronizer. It does not drive the SYNC line: the MCB
// firmware uses the one-pulse trigger state machine for that.
//
// Also side by side: a front-end board's SYNC encoder in MCB emulation
// (feb_mcb_emulator), which replaces the MCB in a set-up without one. Its
// inputs are emu_ext_in = {GRESET, GSTART, GSPILL} and emu_cfg =
// {MCBExtGresetEn, MCBGreset, MCBExtReadoutEn, MCBReadoutEn,
// MCBExtSpillGateEn, MCBFSyncEn, MCBSyncEn, MCBClkEn}; it drives its own
// SYNC output, emu_sync_out.
module sfgd_sync_system #(
  parameter int unsigned NUM_CRATES     = 16,
  parameter int unsigned GTRIG_PERIOD   = 1000,
  parameter int unsigned FSYNC_DIV      = 10,
  parameter int unsigned BIT_CLKS       = 10,
  parameter int unsigned IDLE_HALF_BITS = 5,
  parameter int unsigned BEAM_CYC       = 6_000,
  parameter int unsigned FULL_CYC       = 198_600_000,
  parameter int unsigned LATCH_CYC      = 400,
  parameter int unsigned COSMIC_START   = 2_000_000,
  parameter int unsigned COSMIC_CYC     = 196_600_000,
  parameter int unsigned CLKS_PER_BIT   = 868,
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter int unsigned LED_SLOW_HALF  = 20_000_000,
  parameter int unsigned LED_FAST_HALF  = 5_000_000,
  parameter int unsigned CCC_TICK_DIV      = 400,
  parameter int unsigned CCC_READY_TIMEOUT = 30_000,
  parameter int unsigned CCC_INT_PERIOD    = 26_000_000,
  parameter int unsigned CCC_INT_GATE_CYC  = 6_000,
  parameter int unsigned CCC_INT_DELAY_CYC = 4_000
) (
  input  logic        clk,            // 100 MHz from the clock cleaner
  input  logic        rst_n,
  input  logic        uart_rx,
  output logic        uart_tx,
  input  logic        nim_in0,
  input  logic        nim_in1,
  input  logic [15:0] spill_nb_in,
  input  logic        wg_beam_daq,
  input  logic        wg_int_daq,
  input  logic        led_sync,
  output logic        sma_out0,
  output logic        clk_out_en,
  output logic [NUM_CRATES-1:0] crate_sync,   // SYNC pair of each crate RJ45
  // FEB SYNC-IN parameters (shared by all crates)
  input  logic        feb_locked,
  input  logic        feb_readout_en_en,
  input  logic        feb_greset_en,
  input  logic        feb_ext_spill_nb_sel,
  input  logic        feb_gtrig_only_on_spill,
  input  logic        feb_spill_cnt_reset,
  // decoded signals, per crate
  output logic [NUM_CRATES-1:0] feb_gtrig,
  output logic [NUM_CRATES-1:0] feb_fsync,
  output logic [NUM_CRATES-1:0] feb_spill_gate,
  output logic [NUM_CRATES-1:0] feb_readout_en,
  output logic [NUM_CRATES-1:0] feb_greset,
  output logic [NUM_CRATES-1:0][2:0]  feb_daq_type,
  output logic [NUM_CRATES-1:0][15:0] feb_spill_nb,
  output logic [NUM_CRATES-1:0] feb_spill_nb_av,
  output logic [NUM_CRATES-1:0] feb_frame_ok,
  output logic [NUM_CRATES-1:0] feb_frame_err,
  output logic [NUM_CRATES-1:0] feb_sync_ok,
  output logic [NUM_CRATES-1:0] feb_led_sync,
  output logic [NUM_CRATES-1:0] feb_led_spill,
  // MCB status
  output logic        mcb_gtrig_tick,
  output logic        mcb_frame_start,
  output logic [2:0]  mcb_daq_type,
  output logic [15:0] mcb_spill_nb,
  output logic        mcb_spill_trig,
  // beam/internal spill state machine
  input  logic        ccc_ext_trig_in,
  output logic [1:0]  ccc_state,
  output logic        ccc_beam_gate,
  output logic        ccc_int_gate,
  output logic [2:0]  ccc_int_spill_nb,
  output logic        ccc_unexpected,
  // front-end board as MCB emulator
  input  logic [2:0]  emu_ext_in,
  input  logic [7:0]  emu_cfg,
  output logic        emu_sync_out,
  output logic        emu_clk_out_en,
  output logic        emu_frame_start
);
  logic sync_out;

  mcb_fpga #(
    .GTRIG_PERIOD(GTRIG_PERIOD), .FSYNC_DIV(FSYNC_DIV), .BIT_CLKS(BIT_CLKS),
    .IDLE_HALF_BITS(IDLE_HALF_BITS), .BEAM_CYC(BEAM_CYC), .FULL_CYC(FULL_CYC),
    .LATCH_CYC(LATCH_CYC), .COSMIC_START(COSMIC_START), .COSMIC_CYC(COSMIC_CYC),
    .CLKS_PER_BIT(CLKS_PER_BIT), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_mcb (
    .clk, .rst_n, .uart_rx, .uart_tx, .nim_in0, .nim_in1, .spill_nb_in,
    .wg_beam_daq, .wg_int_daq, .led_sync, .sma_out0, .sync_out, .clk_out_en,
    .gtrig_tick(mcb_gtrig_tick), .frame_start(mcb_frame_start),
    .daq_type(mcb_daq_type), .spill_nb(mcb_spill_nb), .spill_trig(mcb_spill_trig));

  // SYNC fanout 1:NUM_CRATES
  assign crate_sync = {NUM_CRATES{sync_out}};

  for (genvar c = 0; c < NUM_CRATES; c++) begin : g_crate
    feb_sync_in #(
      .BIT_CLKS(BIT_CLKS), .GTRIG_PERIOD(GTRIG_PERIOD), .FSYNC_DIV(FSYNC_DIV),
      .LED_SLOW_HALF(LED_SLOW_HALF), .LED_FAST_HALF(LED_FAST_HALF)
    ) u_feb (
      .clk, .locked(feb_locked), .sync_in(crate_sync[c]),
      .readout_en_en(feb_readout_en_en), .greset_en(feb_greset_en),
      .ext_spill_nb_sel(feb_ext_spill_nb_sel),
      .gtrig_only_on_spill(feb_gtrig_only_on_spill),
      .spill_cnt_reset(feb_spill_cnt_reset),
      .gtrig(feb_gtrig[c]), .fsync(feb_fsync[c]), .spill_gate(feb_spill_gate[c]),
      .readout_en(feb_readout_en[c]), .greset(feb_greset[c]),
      .daq_type(feb_daq_type[c]), .spill_nb(feb_spill_nb[c]),
      .spill_nb_av(feb_spill_nb_av[c]), .frame_ok(feb_frame_ok[c]),
      .frame_err(feb_frame_err[c]), .sync_ok(feb_sync_ok[c]),
      .led_sync_blink(feb_led_sync[c]), .led_spill_gate(feb_led_spill[c]));
  end

  logic ccc_trig_s;
  mcb_synchronizer #(.WIDTH(1), .STAGES(2)) u_ccc_sync (
    .clk, .rst_n, .d(ccc_ext_trig_in), .q(ccc_trig_s));

  mcb_ccc_trigger_sm #(
    .TICK_DIV(CCC_TICK_DIV), .READY_TIMEOUT(CCC_READY_TIMEOUT),
    .INT_PERIOD(CCC_INT_PERIOD), .INT_GATE_CYC(CCC_INT_GATE_CYC),
    .INT_DELAY_CYC(CCC_INT_DELAY_CYC)
  ) u_ccc (
    .clk, .rst_n, .ext_trig_in(ccc_trig_s), .state(ccc_state),
    .beam_gate(ccc_beam_gate), .int_gate(ccc_int_gate),
    .int_spill_nb(ccc_int_spill_nb), .unexpected(ccc_unexpected));

  feb_mcb_emulator #(
    .GTRIG_PERIOD(GTRIG_PERIOD), .FSYNC_DIV(FSYNC_DIV), .BIT_CLKS(BIT_CLKS),
    .IDLE_HALF_BITS(IDLE_HALF_BITS)
  ) u_emu (
    .clk, .rst_n,
    .greset_in(emu_ext_in[2]), .gstart_in(emu_ext_in[1]), .gspill_in(emu_ext_in[0]),
    .ext_greset_en(emu_cfg[7]), .greset_param(emu_cfg[6]),
    .ext_readout_en(emu_cfg[5]), .readout_en_param(emu_cfg[4]),
    .ext_spill_gate_en(emu_cfg[3]), .fsync_en(emu_cfg[2]),
    .sync_en(emu_cfg[1]), .clk_en(emu_cfg[0]),
    .sync_out(emu_sync_out), .clk_out_en(emu_clk_out_en),
    .frame_start(emu_frame_start));
endmodule
