// feb_sync_in -- SYNC-IN (slave) receiver of a front-end board.
//
// It runs on the clock received from the Master Clock Board and decodes the
// SYNC line with feb_sync_decoder (held in reset while the clock PLL is not
// locked). Its outputs are then shaped by the board's slow-control
// parameters:
//   gtrig       decoded GTRIG; with gtrig_only_on_spill set, only while the
//               spill gate is open;
//   readout_en  decoded READOUT_EN, only if readout_en_en is set;
//   greset      decoded GRESET, only if greset_en is set;
//   spill_nb    the decoded spill number if ext_spill_nb_sel is set, else
//               a local spill counter that counts spill-gate openings and
//               is cleared by spill_cnt_reset (spill_nb_av is then 1).
// fsync and spill_gate pass unchanged; a GTRIG/FSYNC checker drives the
// status LED and spill_gate drives a second LED. The parameters and signal
// names are the specification's; combining each signal with its enable by
// a logical AND, and the counter counting gate openings, are this design's
// reading.
module feb_sync_in #(
  parameter int unsigned BIT_CLKS      = 10,
  parameter int unsigned GTRIG_PERIOD  = 1000,
  parameter int unsigned FSYNC_DIV     = 10,
  parameter int unsigned LED_SLOW_HALF = 20_000_000,
  parameter int unsigned LED_FAST_HALF = 5_000_000
) (
  input  logic        clk,               // SYNC clock from the MCB
  input  logic        locked,            // PLL locked on the SYNC clock
  input  logic        sync_in,
  // slow control and direct parameters
  input  logic        readout_en_en,
  input  logic        greset_en,
  input  logic        ext_spill_nb_sel,
  input  logic        gtrig_only_on_spill,
  input  logic        spill_cnt_reset,
  // outputs to the board
  output logic        gtrig,
  output logic        fsync,
  output logic        spill_gate,
  output logic        readout_en,
  output logic        greset,
  output logic [2:0]  daq_type,
  output logic [15:0] spill_nb,
  output logic        spill_nb_av,
  output logic        frame_ok,
  output logic        frame_err,
  output logic        sync_ok,           // GTRIG and FSYNC both synchro
  output logic        led_sync_blink,
  output logic        led_spill_gate
);
  logic        d_gtrig, d_fsync, d_greset, d_readout_en, d_spill_gate, d_led_sync, d_av;
  logic [15:0] d_spill_nb;
  logic [15:0] local_cnt;
  logic        gate_q;
  logic        gtrig_ok, fsync_ok;

  feb_sync_decoder #(.BIT_CLKS(BIT_CLKS)) u_dec (
    .clk, .rst_n(locked), .sync_in,
    .gtrig(d_gtrig), .fsync(d_fsync), .greset(d_greset), .readout_en(d_readout_en),
    .daq_type, .spill_gate(d_spill_gate), .led_sync(d_led_sync),
    .spill_nb_av(d_av), .spill_nb(d_spill_nb), .frame_ok, .frame_err);

  // local spill counter
  always_ff @(posedge clk or negedge locked) begin
    if (!locked) begin
      local_cnt <= '0;
      gate_q    <= 1'b0;
    end else begin
      gate_q <= d_spill_gate;
      if (spill_cnt_reset)              local_cnt <= '0;
      else if (d_spill_gate && !gate_q) local_cnt <= local_cnt + 1'b1;
    end
  end

  assign gtrig          = d_gtrig & (d_spill_gate | ~gtrig_only_on_spill);
  assign fsync          = d_fsync;
  assign spill_gate     = d_spill_gate;
  assign readout_en     = d_readout_en & readout_en_en;
  assign greset         = d_greset & greset_en;
  assign spill_nb       = ext_spill_nb_sel ? d_spill_nb : local_cnt;
  assign spill_nb_av    = ext_spill_nb_sel ? d_av : 1'b1;
  assign led_spill_gate = d_spill_gate;

  feb_sync_check #(
    .GTRIG_PERIOD(GTRIG_PERIOD), .FSYNC_DIV(FSYNC_DIV),
    .LED_SLOW_HALF(LED_SLOW_HALF), .LED_FAST_HALF(LED_FAST_HALF)
  ) u_chk (
    .clk, .rst_n(locked), .gtrig(d_gtrig), .fsync(d_fsync),
    .gtrig_ok, .fsync_ok, .led(led_sync_blink));

  assign sync_ok = gtrig_ok & fsync_ok;

  logic unused_led_sync;
  assign unused_led_sync = d_led_sync;
endmodule
