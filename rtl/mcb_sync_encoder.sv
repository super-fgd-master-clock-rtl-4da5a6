// mcb_sync_encoder -- pseudo-NRZ SYNC line encoder of the Master Clock Board.
//
// With nothing to send the line is an idle square wave: it toggles every
// IDLE_HALF_BITS bit periods (1 MHz with the defaults and a 100 MHz clock).
// A GTRIG tick, or a change of the DAQ type or spill number (a "spill
// event"), makes the encoder send one 47-bit frame at the next bit boundary:
// a start of frame that depends on the line level just before it (1011 after
// a low line, 0100 after a high one, so the receiver can find it whatever the
// idle phase), five 9-bit words with odd parity and a 00 end of frame.
// Frame layout, start-of-frame rule, parity, the 0xCCCC filler of an
// unavailable spill number and the 6-bit compensation delay field follow the
// protocol; the bit rate (BIT_CLKS clock cycles per bit) is this design's
// choice, picked so that a frame (4.7 us) fits in one GTRIG period (10 us)
// and so that idle runs of five equal bits can never look like a start of
// frame.
//
// Compensation delay: an event that arrives while a frame is on the line
// waits. The encoder counts the bit periods it waited (saturating at 63)
// and sends that count; the receiver delays its outputs by 63 minus the
// count, so decoded signals keep a fixed latency after the event.
//
// GRESET requests are held until the next GTRIG frame (GRESET is always
// synchronous with GTRIG). FSYNC is sampled with the GTRIG tick.
//
// Timing: sync_out is registered and changes only at bit boundaries; the
// first SOF bit appears at the first bit boundary after the event is seen.
// With sync_en low the line is held low and no frame is sent.
module mcb_sync_encoder
  import mcb_pkg::*;
#(
  parameter int unsigned BIT_CLKS       = 10,
  parameter int unsigned IDLE_HALF_BITS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync_en,
  input  logic        gtrig_tick,
  input  logic        fsync,
  input  logic        readout_en,
  input  logic        greset_req,
  input  logic [2:0]  daq_type,
  input  logic        led_sync,
  input  logic        spill_nb_av,
  input  logic [15:0] spill_nb,
  output logic        sync_out,
  output logic        frame_active,
  output logic        frame_start,
  output logic [5:0]  last_comp_delay
);

  localparam int unsigned BCW = $clog2(BIT_CLKS);
  localparam int unsigned ICW = $clog2(IDLE_HALF_BITS + 1);
  localparam int unsigned FCW = $clog2(FRAME_BITS + 1);

  logic [BCW-1:0] bit_cnt;
  logic           bit_tick;
  logic [ICW-1:0] idle_cnt;
  logic [FCW-1:0] bits_left;
  logic [FRAME_BITS-1:0] shreg;

  logic        pend, pend_gtrig, pend_fsync, pend_greset;
  logic [5:0]  wait_bits;
  logic [2:0]  daq_prev;
  logic [15:0] spill_prev;
  logic        spill_event;
  sync_frame_t frame;
  logic [FRAME_BITS-1:0] frame_bits;

  assign bit_tick    = (bit_cnt == BCW'(BIT_CLKS - 1));
  assign spill_event = (daq_type != daq_prev) || (spill_nb != spill_prev);

  always_comb begin
    frame.gtrig       = pend_gtrig;
    frame.fsync       = pend_fsync;
    frame.readout_en  = readout_en;
    frame.daq_type    = daq_type;
    frame.comp_delay  = wait_bits;
    frame.led_sync    = led_sync;
    frame.greset      = pend_greset & pend_gtrig;
    frame.spill_nb_av = spill_nb_av;
    frame.spill_nb    = spill_nb_av ? spill_nb : SPILL_FILLER;
    frame_bits        = pack_frame(frame, sync_out);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt         <= '0;
      idle_cnt        <= '0;
      bits_left       <= '0;
      shreg           <= '0;
      sync_out        <= 1'b0;
      pend            <= 1'b0;
      pend_gtrig      <= 1'b0;
      pend_fsync      <= 1'b0;
      pend_greset     <= 1'b0;
      wait_bits       <= '0;
      daq_prev        <= '0;
      spill_prev      <= '0;
      frame_start     <= 1'b0;
      last_comp_delay <= '0;
    end else begin
      frame_start <= 1'b0;
      daq_prev    <= daq_type;
      spill_prev  <= spill_nb;
      bit_cnt     <= bit_tick ? '0 : bit_cnt + 1'b1;

      if (greset_req) pend_greset <= 1'b1;

      if (!sync_en) begin
        pend       <= 1'b0;
        pend_gtrig <= 1'b0;
        pend_fsync <= 1'b0;
        bits_left  <= '0;
        idle_cnt   <= '0;
        sync_out   <= 1'b0;
      end else begin
        // collect events
        if (gtrig_tick) begin
          pend_gtrig <= 1'b1;
          pend_fsync <= pend_fsync | fsync;
        end
        if (gtrig_tick || spill_event) pend <= 1'b1;

        if (bit_tick) begin
          if (bits_left != '0) begin
            // frame on the line: shift out the next bit
            sync_out  <= shreg[FRAME_BITS-1];
            shreg     <= {shreg[FRAME_BITS-2:0], 1'b0};
            bits_left <= bits_left - 1'b1;
            if (bits_left == FCW'(1)) idle_cnt <= '0;  // idle restarts after EOF
            if (pend && wait_bits != 6'(COMP_DELAY_MAX)) wait_bits <= wait_bits + 1'b1;
          end else if (pend) begin
            // start a frame: first SOF bit now
            sync_out        <= frame_bits[FRAME_BITS-1];
            shreg           <= {frame_bits[FRAME_BITS-2:0], 1'b0};
            bits_left       <= FCW'(FRAME_BITS - 1);
            frame_start     <= 1'b1;
            last_comp_delay <= wait_bits;
            wait_bits       <= '0;
            // events seen in this very cycle stay pending for the next frame
            pend        <= gtrig_tick | spill_event;
            pend_gtrig  <= gtrig_tick;
            pend_fsync  <= gtrig_tick & fsync;
            if (pend_gtrig && !greset_req) pend_greset <= 1'b0;
          end else begin
            // idle square wave
            if (idle_cnt == ICW'(IDLE_HALF_BITS - 1)) begin
              idle_cnt <= '0;
              sync_out <= ~sync_out;
            end else begin
              idle_cnt <= idle_cnt + 1'b1;
            end
          end
        end
      end
    end
  end

  assign frame_active = (bits_left != '0);

endmodule
