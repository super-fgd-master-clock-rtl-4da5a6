// mcb_pkg -- types and constants shared by the Master Clock Board (MCB)
// firmware and the front-end-board (FEB) SYNC-IN receiver.
//
// The SYNC line carries a 47-bit pseudo-NRZ frame: five 9-bit words, each
// ending in an odd-parity bit, followed by a 2-bit end of frame (00).
// Word 0 starts with the 4-bit start of frame (1011 after a low line, 0100
// after a high line). The frame layout, the DAQ type codes and the 0xCCCC
// filler for an unavailable spill number follow the protocol description;
// the bit rate (10 clock cycles per bit) is this design's choice.
package mcb_pkg;

  // Frame geometry
  localparam int unsigned WORD_BITS  = 9;   // 8 payload bits + odd parity
  localparam int unsigned NUM_WORDS  = 5;
  localparam int unsigned EOF_BITS   = 2;
  localparam int unsigned FRAME_BITS = NUM_WORDS * WORD_BITS + EOF_BITS; // 47

  localparam logic [3:0] SOF_AFTER_LOW  = 4'b1011;
  localparam logic [3:0] SOF_AFTER_HIGH = 4'b0100;
  localparam logic [4:0] NA_BITS        = 5'b10110;   // word 2, bits 26..22
  localparam logic [15:0] SPILL_FILLER  = 16'hCCCC;   // balanced word

  localparam int unsigned COMP_DELAY_MAX = 63;        // 6-bit field

  // DAQ type carried in the frame (3 bits)
  typedef enum logic [2:0] {
    DAQ_NONE        = 3'd0,
    DAQ_BEAM        = 3'd1,
    DAQ_COSMIC      = 3'd2,
    DAQ_BEAM_COSMIC = 3'd3,
    DAQ_FULL        = 3'd4,
    DAQ_WG          = 3'd5,
    DAQ_NA          = 3'd6
  } daq_type_e;

  // Everything one frame carries
  typedef struct packed {
    logic        gtrig;
    logic        fsync;
    logic        readout_en;
    logic [2:0]  daq_type;
    logic [5:0]  comp_delay;
    logic        led_sync;
    logic        greset;
    logic        spill_nb_av;
    logic [15:0] spill_nb;
  } sync_frame_t;

  // The 'e' slow-control byte
  typedef struct packed {
    logic [2:0] spill_gate_mode;   // bits 7..5
    logic       int_spill_nb_en;   // bit 4
    logic       spill_en;          // bit 3: spill gate & spill number on RJ45
    logic       fsync_en;          // bit 2
    logic       clkout_en;         // bit 1
    logic       syncout_en;        // bit 0
  } enc_cfg_t;

  function automatic logic odd_parity(input logic [7:0] d);
    return ~(^d);
  endfunction

  // Serialise a frame into transmit order: element FRAME_BITS-1 goes first.
  // The payload of each word is sent most significant bit first, then its
  // parity bit.
  function automatic logic [FRAME_BITS-1:0] pack_frame(input sync_frame_t f,
                                                       input logic prev_level);
    logic [7:0] w0, w1, w2, w3, w4;
    logic [3:0] sof;
    sof = prev_level ? SOF_AFTER_HIGH : SOF_AFTER_LOW;
    w0  = {sof, f.gtrig, f.fsync, f.readout_en, f.daq_type[2]};
    w1  = {f.daq_type[1:0], f.comp_delay};
    w2  = {NA_BITS, f.led_sync, f.greset, f.spill_nb_av};
    w3  = f.spill_nb[15:8];
    w4  = f.spill_nb[7:0];
    return {w0, odd_parity(w0), w1, odd_parity(w1), w2, odd_parity(w2),
            w3, odd_parity(w3), w4, odd_parity(w4), 2'b00};
  endfunction

  // ASCII helpers for the slow-control protocol
  function automatic logic [7:0] hex_to_ascii(input logic [3:0] n);
    return (n < 4'd10) ? (8'h30 + {4'd0, n}) : (8'h37 + {4'd0, n});
  endfunction

  function automatic logic is_hex_digit(input logic [7:0] c);
    return (c >= 8'h30 && c <= 8'h39) || (c >= 8'h41 && c <= 8'h46) ||
           (c >= 8'h61 && c <= 8'h66);
  endfunction

  function automatic logic [3:0] ascii_to_hex(input logic [7:0] c);
    if (c >= 8'h30 && c <= 8'h39) return c[3:0];
    else                           return c[3:0] + 4'd9;  // 'A'..'F', 'a'..'f'
  endfunction

endpackage
