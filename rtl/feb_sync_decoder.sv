// feb_sync_decoder -- SYNC line decoder of a front-end board (SYNC-IN slave).
//
// The SYNC line is synchronous with the distributed clock and changes only
// at bit boundaries, BIT_CLKS clock cycles apart. The decoder registers the
// line, restarts its bit-phase counter on every transition and samples each
// bit in the middle of its period. While hunting it compares the last five
// sampled bits with the two start-of-frame patterns 01011 and 10100 (the
// level before the SOF followed by the SOF itself); idle runs of five equal
// bits never match. It then collects the rest of the 47-bit frame and
// accepts it only if all five odd parities, the fixed NA bits (10110) and
// the 00 end of frame are right; otherwise frame_err pulses and nothing is
// released.
//
// An accepted frame is held for (63 - compensation delay) bit periods and
// then released (two hold slots, since a frame can arrive while the previous
// one is still held): gtrig, fsync and greset pulse for one cycle, the levels
// (readout_en, daq_type, spill_gate, led_sync, spill number) update. This
// restores a fixed latency from the event at the encoder to the outputs, as
// the compensation delay field is meant to. The frame layout and SOF
// patterns follow the protocol; the phase tracking, the release rule and
// spill_gate = (daq_type != NONE) are this design's choices.
//
// Latency: 47 + 63 bit periods after the encoder's event, plus a few clock
// cycles of registers.
module feb_sync_decoder
  import mcb_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 10
) (
  input  logic        clk,
  input  logic        rst_n,        // low while the clock PLL is not locked
  input  logic        sync_in,
  output logic        gtrig,
  output logic        fsync,
  output logic        greset,
  output logic        readout_en,
  output logic [2:0]  daq_type,
  output logic        spill_gate,
  output logic        led_sync,
  output logic        spill_nb_av,
  output logic [15:0] spill_nb,
  output logic        frame_ok,     // pulse: a frame passed all checks
  output logic        frame_err     // pulse: a frame failed a check
);

  localparam int unsigned BCW = $clog2(BIT_CLKS);
  localparam int unsigned FCW = $clog2(FRAME_BITS + 1);
  localparam int unsigned RCW = $clog2((COMP_DELAY_MAX + 1) * BIT_CLKS + 1);

  typedef enum logic [1:0] {HUNT, RECV} rx_state_e;

  logic           s_q, s_prev;
  logic [BCW-1:0] phase;
  logic           sample;
  logic [3:0]     hist;  // last four sampled bits
  rx_state_e      state;
  logic [FCW-1:0] nbits;
  logic [FRAME_BITS-2:0] fr;    // frame bits received so far

  // accepted frames waiting for release. A frame is held for up to 63 bit
  // periods and frames are 47 bits long, so at most two overlap.
  logic           hold     [2];
  logic [RCW-1:0] hold_cnt [2];
  sync_frame_t    held     [2];
  sync_frame_t    rx_frame;
  logic           rx_slot;
  logic [FRAME_BITS-1:0] rx_bits;

  assign rx_bits  = {fr, s_q};
  assign rx_frame = unpack(rx_bits);
  assign rx_slot  = hold[0];          // slot 0 busy: use slot 1

  assign sample = (phase == BCW'(BIT_CLKS / 2));

  // checks on a complete frame (its most significant bit was received first)
  function automatic logic frame_valid(input logic [FRAME_BITS-1:0] f);
    logic ok;
    ok = 1'b1;
    for (int w = 0; w < NUM_WORDS; w++)
      if (^f[FRAME_BITS-1-w*WORD_BITS -: WORD_BITS] != 1'b1) ok = 1'b0;
    if (f[FRAME_BITS-1-2*WORD_BITS -: 5] != NA_BITS) ok = 1'b0;
    if (f[1:0] != 2'b00) ok = 1'b0;
    return ok;
  endfunction

  function automatic sync_frame_t unpack(input logic [FRAME_BITS-1:0] f);
    sync_frame_t u;
    u.gtrig       = f[42];
    u.fsync       = f[41];
    u.readout_en  = f[40];
    u.daq_type    = {f[39], f[37:36]};
    u.comp_delay  = f[35:30];
    u.led_sync    = f[23];
    u.greset      = f[22];
    u.spill_nb_av = f[21];
    u.spill_nb    = {f[19:12], f[10:3]};
    return u;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= 1'b0; s_prev <= 1'b0; phase <= '0; hist <= '0;
      state <= HUNT; nbits <= '0; fr <= '0;
      for (int i = 0; i < 2; i++) begin
        hold[i] <= 1'b0; hold_cnt[i] <= '0; held[i] <= '0;
      end
      gtrig <= 1'b0; fsync <= 1'b0; greset <= 1'b0;
      readout_en <= 1'b0; daq_type <= '0; spill_gate <= 1'b0; led_sync <= 1'b0;
      spill_nb_av <= 1'b0; spill_nb <= '0; frame_ok <= 1'b0; frame_err <= 1'b0;
    end else begin
      gtrig <= 1'b0; fsync <= 1'b0; greset <= 1'b0;
      frame_ok <= 1'b0; frame_err <= 1'b0;

      // bit recovery
      s_q    <= sync_in;
      s_prev <= s_q;
      if (s_q != s_prev)                      phase <= BCW'(1);
      else if (phase == BCW'(BIT_CLKS - 1))   phase <= '0;
      else                                    phase <= phase + 1'b1;

      if (sample) begin
        hist <= {hist[2:0], s_q};
        unique case (state)
          HUNT: begin
            if ({hist[3:0], s_q} == {1'b0, SOF_AFTER_LOW} ||
                {hist[3:0], s_q} == {1'b1, SOF_AFTER_HIGH}) begin
              state <= RECV;
              fr    <= (FRAME_BITS-1)'({hist[2:0], s_q});
              nbits <= FCW'(4);
            end
          end
          RECV: begin
            fr    <= {fr[FRAME_BITS-3:0], s_q};
            nbits <= nbits + 1'b1;
            if (nbits == FCW'(FRAME_BITS - 1)) begin
              state <= HUNT;
              hist  <= '0;
              if (frame_valid(rx_bits)) frame_ok  <= 1'b1;
              else                      frame_err <= 1'b1;
            end
          end
          default: state <= HUNT;
        endcase
      end

      // release after the compensation delay
      for (int i = 0; i < 2; i++) begin
        if (hold[i]) begin
          if (hold_cnt[i] == '0) begin
            hold[i]     <= 1'b0;
            gtrig       <= held[i].gtrig;
            fsync       <= held[i].fsync;
            greset      <= held[i].greset;
            readout_en  <= held[i].readout_en;
            daq_type    <= held[i].daq_type;
            spill_gate  <= (held[i].daq_type != DAQ_NONE);
            led_sync    <= held[i].led_sync;
            spill_nb_av <= held[i].spill_nb_av;
            spill_nb    <= held[i].spill_nb;
          end else begin
            hold_cnt[i] <= hold_cnt[i] - 1'b1;
          end
        end
      end

      // a frame that passed its checks takes a free slot
      if (sample && state == RECV && nbits == FCW'(FRAME_BITS - 1) && frame_valid(rx_bits)) begin
        hold[rx_slot]     <= 1'b1;
        held[rx_slot]     <= rx_frame;
        hold_cnt[rx_slot] <= RCW'((COMP_DELAY_MAX - int'(rx_frame.comp_delay)) * BIT_CLKS);
      end
    end
  end

endmodule
