// mcb_fpga -- firmware of the Master Clock Board FPGA.
//
// The board sends every front-end crate two LVDS pairs: a 100 MHz CLOCK and
// a SYNC line on which GTRIG, FSYNC, GRESET, the spill gate (as a DAQ type)
// and the spill number are multiplexed as pseudo-NRZ frames. This module
// ties together the blocks of the firmware:
//   - synchronizers for the asynchronous NIM IN0 (beam trigger), NIM IN1
//     and the two WAGASCI DAQ signals (their OR is the WAGASCI gate);
//   - the 1-pulse trigger state machine (beam, full and cosmic windows,
//     spill number latched 4 us after the trigger);
//   - the internal spill counter and the choice between it and the latched
//     beam-line number ('e' bit 4);
//   - the DAQ mode selector driving SMA OUT0 and the frame's DAQ type;
//   - the GTRIG (100 kHz) / FSYNC (10 kHz) time base;
//   - the SYNC encoder;
//   - the UART link with its command decoder and the slow-control registers.
// All logic runs on the one 100 MHz clock (in the board it comes from the
// clock cleaner; PLLs and clock selection are outside this module). The
// clock-out enable only leaves as clk_out_en, for the CLK fanout. The
// WAGASCI HDMI receiver is not included: its decoded beam and internal DAQ
// signals are inputs. led_sync is passed into the frame unchanged.
// The block split and the connections follow the specification's firmware
// diagram; one difference is that the 'r' settings (READOUT_EN, GRESET,
// spill counter reset) are held in the same slow-control register block as
// the 'e' byte instead of coming straight from the command decoder, which
// does not change their behaviour.
module mcb_fpga #(
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
  parameter int unsigned FIFO_DEPTH     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // RS232-USB
  input  logic        uart_rx,
  output logic        uart_tx,
  // external inputs
  input  logic        nim_in0,        // beam trigger
  input  logic        nim_in1,
  input  logic [15:0] spill_nb_in,    // beam-line spill number (ECL flat cable)
  input  logic        wg_beam_daq,    // WAGASCI HDMI receiver outputs
  input  logic        wg_int_daq,
  input  logic        led_sync,
  // outputs
  output logic        sma_out0,
  output logic        sync_out,
  output logic        clk_out_en,
  // status
  output logic        gtrig_tick,
  output logic        frame_start,
  output logic [2:0]  daq_type,
  output logic [15:0] spill_nb,
  output logic        spill_trig      // pulse: beam trigger accepted
);
  import mcb_pkg::*;

  // ---------------- slow control ----------------
  logic       rx_valid, rx_ready, tx_valid, tx_ready, rx_overflow;
  logic [7:0] rx_data, tx_data, wr_data, e_value, r_value;
  logic       e_wr, r_wr, cmd_error;
  enc_cfg_t   cfg;
  logic       readout_en, greset_pulse, spill_cnt_clr;

  mcb_uart_wrapper #(.CLKS_PER_BIT(CLKS_PER_BIT), .FIFO_DEPTH(FIFO_DEPTH)) u_uart (
    .clk, .rst_n, .uart_rx, .uart_tx, .rx_valid, .rx_ready, .rx_data,
    .tx_valid, .tx_ready, .tx_data, .rx_overflow);

  mcb_serial_decoder u_cmd (
    .clk, .rst_n, .rx_valid, .rx_ready, .rx_data, .tx_valid, .tx_ready, .tx_data,
    .e_wr, .r_wr, .wr_data, .spill_nb, .cmd_error);

  mcb_slow_ctrl_regs u_regs (
    .clk, .rst_n, .e_wr, .r_wr, .wr_data, .cfg, .e_value, .r_value,
    .readout_en, .greset_pulse, .spill_cnt_clr);

  // ---------------- external inputs ----------------
  logic [3:0] async_in, sync_in_s;
  assign async_in = {wg_int_daq, wg_beam_daq, nim_in1, nim_in0};
  mcb_synchronizer #(.WIDTH(4), .STAGES(2)) u_sync_in (
    .clk, .rst_n, .d(async_in), .q(sync_in_s));

  logic beam_trig_s, nim1_s, wg_daq_s;
  assign beam_trig_s = sync_in_s[0];
  assign nim1_s      = sync_in_s[1];
  assign wg_daq_s    = sync_in_s[2] | sync_in_s[3];

  // ---------------- trigger and spill number ----------------
  logic        beam_daq, full_daq, cosmic_daq, spill_latched, trig_busy;
  logic [15:0] spill_nb_latched, spill_cnt;

  mcb_trigger_sm #(
    .BEAM_CYC(BEAM_CYC), .FULL_CYC(FULL_CYC), .LATCH_CYC(LATCH_CYC),
    .COSMIC_START(COSMIC_START), .COSMIC_CYC(COSMIC_CYC)
  ) u_trig (
    .clk, .rst_n, .beam_trig(beam_trig_s), .spill_nb_in,
    .beam_daq, .full_daq, .cosmic_daq, .trig_accept(spill_trig),
    .spill_latched, .spill_nb_latched, .busy(trig_busy));

  mcb_spill_counter #(.WIDTH(16)) u_spill_cnt (
    .clk, .rst_n, .inc(spill_trig), .clr(spill_cnt_clr), .count(spill_cnt));

  assign spill_nb = cfg.int_spill_nb_en ? spill_cnt : spill_nb_latched;

  // ---------------- DAQ mode ----------------
  logic rj45_gate;
  mcb_daq_mode_selector u_mode (
    .mode(cfg.spill_gate_mode), .spill_en(cfg.spill_en),
    .beam_daq, .cosmic_daq, .full_daq, .wg_daq(wg_daq_s), .nim_in1(nim1_s),
    .out0(sma_out0), .rj45_gate, .daq_type);

  // ---------------- GTRIG / FSYNC and SYNC encoder ----------------
  logic fsync_tick;
  logic [5:0] last_comp_delay;
  logic frame_active;

  mcb_gtrig_gen #(.GTRIG_PERIOD(GTRIG_PERIOD), .FSYNC_DIV(FSYNC_DIV)) u_gtrig (
    .clk, .rst_n, .gtrig_tick, .fsync(fsync_tick));

  mcb_sync_encoder #(.BIT_CLKS(BIT_CLKS), .IDLE_HALF_BITS(IDLE_HALF_BITS)) u_enc (
    .clk, .rst_n,
    .sync_en    (cfg.syncout_en),
    .gtrig_tick,
    .fsync      (fsync_tick & cfg.fsync_en),
    .readout_en,
    .greset_req (greset_pulse),
    .daq_type,
    .led_sync,
    .spill_nb_av(cfg.spill_en),
    .spill_nb,
    .sync_out,
    .frame_active,
    .frame_start,
    .last_comp_delay);

  assign clk_out_en = cfg.clkout_en;

  // status that has no pin on this module
  logic unused;
  assign unused = ^{rx_overflow, cmd_error, e_value, r_value, rj45_gate,
                    spill_latched, trig_busy, last_comp_delay, frame_active};
endmodule
