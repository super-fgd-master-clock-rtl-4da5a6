// mcb_trigger_sm -- "1 pulse" trigger state machine of the Master Clock Board.
//
// On a rising edge of the (already synchronized) beam trigger it opens the
// DAQ windows of one spill, all timed from the trigger:
//   beam_daq   for BEAM_CYC cycles            (60 us)
//   full_daq   for FULL_CYC cycles            (1.986 s)
//   spill number latched LATCH_CYC cycles after the trigger (4 us); the
//              number is not synchronized, it is stable by then
//   cosmic_daq from COSMIC_START (20 ms) for COSMIC_CYC cycles (1.966 s)
// The windows and their durations are the specification's; durations are
// in cycles of the 100 MHz clock. Durations of the full and cosmic windows
// are taken in seconds, as the slow-control table gives them, since they
// then fill the 2.48 s beam period. A trigger that arrives while a spill is
// still running is ignored (this design's choice).
//
// trig_accept pulses one cycle after the trigger edge is seen; spill_latched
// pulses when spill_nb_latched has been updated.
module mcb_trigger_sm #(
  parameter int unsigned BEAM_CYC     = 6_000,
  parameter int unsigned FULL_CYC     = 198_600_000,
  parameter int unsigned LATCH_CYC    = 400,
  parameter int unsigned COSMIC_START = 2_000_000,
  parameter int unsigned COSMIC_CYC   = 196_600_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        beam_trig,
  input  logic [15:0] spill_nb_in,
  output logic        beam_daq,
  output logic        full_daq,
  output logic        cosmic_daq,
  output logic        trig_accept,
  output logic        spill_latched,
  output logic [15:0] spill_nb_latched,
  output logic        busy
);
  localparam int unsigned END_CYC = (FULL_CYC > COSMIC_START + COSMIC_CYC) ?
                                    FULL_CYC : COSMIC_START + COSMIC_CYC;
  localparam int unsigned TW = $clog2(END_CYC + 1);

  typedef enum logic {S_IDLE, S_SPILL} state_e;
  state_e        state;
  logic [TW-1:0] t;
  logic          trig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      t                <= '0;
      trig_q           <= 1'b0;
      beam_daq         <= 1'b0;
      full_daq         <= 1'b0;
      cosmic_daq       <= 1'b0;
      trig_accept      <= 1'b0;
      spill_latched    <= 1'b0;
      spill_nb_latched <= '0;
    end else begin
      trig_q        <= beam_trig;
      trig_accept   <= 1'b0;
      spill_latched <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (beam_trig && !trig_q) begin
            state       <= S_SPILL;
            t           <= TW'(1);
            trig_accept <= 1'b1;
            beam_daq    <= (BEAM_CYC > 0);
            full_daq    <= (FULL_CYC > 0);
            cosmic_daq  <= (COSMIC_START == 0) && (COSMIC_CYC > 0);
          end
        end
        S_SPILL: begin
          t <= t + 1'b1;
          if (t == TW'(BEAM_CYC))                   beam_daq   <= 1'b0;
          if (t == TW'(FULL_CYC))                   full_daq   <= 1'b0;
          if (t == TW'(COSMIC_START) && COSMIC_CYC > 0) cosmic_daq <= 1'b1;
          if (t == TW'(COSMIC_START + COSMIC_CYC))  cosmic_daq <= 1'b0;
          if (t == TW'(LATCH_CYC)) begin
            spill_nb_latched <= spill_nb_in;
            spill_latched    <= 1'b1;
          end
          if (t == TW'(END_CYC)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_SPILL);
endmodule
