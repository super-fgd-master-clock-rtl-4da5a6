// mcb_ccc_trigger_sm -- beam/internal spill state machine driven by one
// external trigger line that carries both the pre-beam and the beam trigger.
//
// This is the counter-based scheme of the beam-line trigger controller that
// the trigger state machine of the Master Clock Board is meant to resemble.
// Four states:
//   IDLE         all counters cleared; EXT_TRIG_IN high -> READY_TO_BEAM
//                (the pre-beam trigger, 100 ms before the beam trigger).
//   READY_TO_BEAM count1 counts 4 us ticks. When count1 >= BEAM_WAIT (60 us)
//                and EXT_TRIG_IN is high (the beam trigger) -> BEAM_ACQ;
//                when count1 > READY_TIMEOUT (120 ms) without it -> IDLE.
//   BEAM_ACQ     count2 counts 4 us ticks; the beam gate is open. When
//                count2 >= ACQ_TICKS (60 us) -> INTERNAL.
//   INTERNAL     internal (cosmic) spills, one every INT_PERIOD cycles
//                (260 ms), the first INT_DELAY_CYC cycles after entry (40 us,
//                so 100 us after the beam gate opened); count3 increments at
//                the trailing edge of each.
//                count3 = NUM_INT_SPILLS (6) -> IDLE; EXT_TRIG_IN high ->
//                READY_TO_BEAM (a new pre-beam trigger ends the series).
// The states, counters, thresholds, the 4 us count rate, the 260 ms period,
// the 60 us internal spill and the 100 us from the beam gate to the first
// internal spill follow the specification; where its text
// gives 150 ms for the timeout, the printed count (30000 x 4 us = 120 ms) is
// used. This design's own choices: the 4 us tick comes from a free-running
// prescaler of the 100 MHz clock (TICK_DIV; the original runs at 50 MHz),
// and the trigger line is a level already synchronized to clk.
// INT_DELAY_CYC must not exceed INT_PERIOD.
//
// Outputs: state, beam_gate (high in BEAM_ACQ), int_gate (internal spill
// open), int_spill_nb (count3), decoded from the state registers, and
// unexpected, a registered one-cycle pulse on each of the two transitions
// the specification marks as an unexpected procedure (the ready-to-beam
// timeout and a trigger during the internal spills), for error reporting.
module mcb_ccc_trigger_sm #(
  parameter int unsigned TICK_DIV       = 400,        // 100 MHz / 250 kHz
  parameter int unsigned BEAM_WAIT      = 15,         // count1 >= 15 (60 us)
  parameter int unsigned READY_TIMEOUT  = 30_000,     // count1 > 30000 (120 ms)
  parameter int unsigned ACQ_TICKS      = 15,         // count2 >= 15 (60 us)
  parameter int unsigned NUM_INT_SPILLS = 6,
  parameter int unsigned INT_PERIOD     = 26_000_000, // 260 ms
  parameter int unsigned INT_GATE_CYC   = 6_000,      // 60 us
  parameter int unsigned INT_DELAY_CYC  = 4_000       // 100 us - 60 us
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ext_trig_in,
  output logic [1:0] state,
  output logic       beam_gate,
  output logic       int_gate,
  output logic [2:0] int_spill_nb,
  output logic       unexpected
);
  typedef enum logic [1:0] {IDLE = 2'd0, READY_TO_BEAM = 2'd1,
                            BEAM_ACQ = 2'd2, INTERNAL = 2'd3} ccc_state_e;

  localparam int unsigned C1W = $clog2(READY_TIMEOUT + 2);
  localparam int unsigned C2W = $clog2(ACQ_TICKS + 2);
  localparam int unsigned PW  = $clog2(INT_PERIOD + 1);
  localparam int unsigned DW  = $clog2(TICK_DIV + 1);

  ccc_state_e st;
  logic [C1W-1:0] count1;
  logic [C2W-1:0] count2;
  logic [2:0]     count3;
  logic [PW-1:0]  pcnt;
  logic [DW-1:0]  div;
  logic           tick;

  // 250 kHz count enable
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div <= '0;
    else if (div == DW'(TICK_DIV - 1)) div <= '0;
    else div <= div + 1'b1;
  assign tick = (div == DW'(TICK_DIV - 1));

  // the period counter starts so that it wraps to 0 after INT_DELAY_CYC
  localparam logic [PW-1:0] PSTART = (INT_DELAY_CYC == 0) ? '0 :
                                     PW'(INT_PERIOD - INT_DELAY_CYC);

  logic int_end;   // trailing edge of an internal spill
  assign int_end = (st == INTERNAL) && (pcnt == PW'(INT_GATE_CYC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; count1 <= '0; count2 <= '0; count3 <= '0; pcnt <= '0;
      unexpected <= 1'b0;
    end else begin
      unexpected <= 1'b0;
      unique case (st)
        IDLE: begin
          count1 <= '0; count2 <= '0; count3 <= '0; pcnt <= '0;
          if (ext_trig_in) st <= READY_TO_BEAM;
        end
        READY_TO_BEAM: begin
          count2 <= '0; count3 <= '0;
          if (count1 >= C1W'(BEAM_WAIT) && ext_trig_in) begin
            st <= BEAM_ACQ; count1 <= '0;
          end else if (count1 > C1W'(READY_TIMEOUT)) begin
            st <= IDLE; count1 <= '0; unexpected <= 1'b1;
          end else if (tick) count1 <= count1 + 1'b1;
        end
        BEAM_ACQ: begin
          count1 <= '0; count3 <= '0;
          if (count2 >= C2W'(ACQ_TICKS)) begin
            st <= INTERNAL; count2 <= '0; pcnt <= PSTART;
          end else if (tick) count2 <= count2 + 1'b1;
        end
        INTERNAL: begin
          count1 <= '0; count2 <= '0;
          if (ext_trig_in) begin
            st <= READY_TO_BEAM; count3 <= '0; unexpected <= 1'b1;
          end else if (count3 == 3'(NUM_INT_SPILLS)) begin
            st <= IDLE;
          end else begin
            if (int_end) count3 <= count3 + 1'b1;
            pcnt <= (pcnt == PW'(INT_PERIOD - 1)) ? '0 : pcnt + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    state        = st;
    beam_gate    = (st == BEAM_ACQ);
    int_gate     = (st == INTERNAL) && (pcnt < PW'(INT_GATE_CYC)) &&
                   (count3 != 3'(NUM_INT_SPILLS));
    int_spill_nb = count3;
  end
endmodule
