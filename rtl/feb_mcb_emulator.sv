// feb_mcb_emulator -- SYNC encoder of a front-end board used as a stand-in
// for the Master Clock Board, so that a small set-up without an MCB can
// still drive other boards' SYNC-IN.
//
// The board makes its own GTRIG (100 kHz) and FSYNC (10 kHz) with the same
// time base as the MCB and sends them with the same SYNC encoder. The other
// frame fields come from three external inputs and slow-control
// parameters, as the specification lists them:
//   GRESET     = (external GRESET AND MCBExtGresetEn) OR MCBGreset
//   READOUT_EN = (external GSTART AND MCBExtReadoutEn) OR MCBReadoutEn
//   SPILL_GATE = external GSPILL AND MCBExtSpillGateEn
//   FSYNC      = FSYNC divider AND MCBFSyncEn
//   SYNC out enabled by MCBSyncEn, CLK out by MCBClkEn.
// The AND/OR combination is read from the parameter names; the specification
// gives the signal and parameter names, not the logic. Further choices of this
// design:
//   - the external inputs pass a two-flip-flop synchronizer;
//   - a rising edge of GRESET requests one GRESET, which the encoder sends
//     with the next GTRIG;
//   - an open spill gate is sent as DAQ type 1 (BEAM), a closed one as 0;
//   - there is no spill number here, so SPILL_NB_AV is 0 and the frame
//     carries the 0xCCCC filler;
//   - the clock itself is not gated here: clk_out_en, registered, enables
//     the CLK driver.
// Timing is that of the MCB: frames of 47 bits at BIT_CLKS cycles per bit,
// GTRIG every GTRIG_PERIOD cycles.
module feb_mcb_emulator #(
  parameter int unsigned GTRIG_PERIOD   = 1000,
  parameter int unsigned FSYNC_DIV      = 10,
  parameter int unsigned BIT_CLKS       = 10,
  parameter int unsigned IDLE_HALF_BITS = 5
) (
  input  logic clk,                // CLK 100 MHz
  input  logic rst_n,
  // external I/O
  input  logic greset_in,          // GRESET
  input  logic gstart_in,          // GSTART
  input  logic gspill_in,          // GSPILL
  // slow-control and readout-start parameters
  input  logic ext_greset_en,      // MCBExtGresetEn
  input  logic greset_param,       // MCBGreset
  input  logic ext_readout_en,     // MCBExtReadoutEn
  input  logic readout_en_param,   // MCBReadoutEn
  input  logic ext_spill_gate_en,  // MCBExtSpillGateEn
  input  logic fsync_en,           // MCBFSyncEn
  input  logic sync_en,            // MCBSyncEn
  input  logic clk_en,             // MCBClkEn
  // outputs
  output logic sync_out,           // SYNC
  output logic clk_out_en,         // enable of the CLK output
  output logic frame_start
);
  import mcb_pkg::*;

  logic [2:0] ext_s;
  mcb_synchronizer #(.WIDTH(3), .STAGES(2)) u_sync (
    .clk, .rst_n, .d({greset_in, gstart_in, gspill_in}), .q(ext_s));

  logic gtrig_tick, fsync_div;
  mcb_gtrig_gen #(.GTRIG_PERIOD(GTRIG_PERIOD), .FSYNC_DIV(FSYNC_DIV)) u_tb (
    .clk, .rst_n, .gtrig_tick, .fsync(fsync_div));

  logic greset_lvl, greset_q, readout_en, spill_gate;
  always_comb begin
    greset_lvl = (ext_s[2] & ext_greset_en) | greset_param;
    readout_en = (ext_s[1] & ext_readout_en) | readout_en_param;
    spill_gate = ext_s[0] & ext_spill_gate_en;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) greset_q <= 1'b0;
    else        greset_q <= greset_lvl;

  logic [5:0] unused_delay;
  logic       unused_active;
  mcb_sync_encoder #(.BIT_CLKS(BIT_CLKS), .IDLE_HALF_BITS(IDLE_HALF_BITS)) u_enc (
    .clk, .rst_n, .sync_en,
    .gtrig_tick,
    .fsync(fsync_div & fsync_en),
    .readout_en,
    .greset_req(greset_lvl & ~greset_q),
    .daq_type(spill_gate ? DAQ_BEAM : DAQ_NONE),
    .led_sync(1'b0),
    .spill_nb_av(1'b0),
    .spill_nb(16'h0000),
    .sync_out, .frame_active(unused_active), .frame_start,
    .last_comp_delay(unused_delay));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) clk_out_en <= 1'b0;
    else        clk_out_en <= clk_en;
endmodule
