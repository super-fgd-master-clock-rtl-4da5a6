// mcb_daq_mode_selector -- chooses which DAQ window is the spill gate.
//
// The 3-bit spill-gate mode of the 'e' slow-control byte selects the gate:
//   000 none, 001 60 us beam window, 010 internal (cosmic) window,
//   011 beam OR internal, 100 full 1.986 s window, 101 WAGASCI HDMI input,
//   110 external NIM IN1, 111 (unused) none.
// The gate always goes to SMA OUT0. It goes to the front-end boards (as the
// DAQ type of the SYNC frame) only when the "spill gate & spill NB on RJ45"
// bit is set: daq_type is then the mode while the gate is open and NONE
// (0) otherwise. The mode table is the specification's; that the DAQ type
// codes equal the mode codes while the gate is open is this design's
// reading of the frame's DAQ_TYPE list (NONE, BEAM, COSMIC, BEAM+COSMIC,
// FULL, WG, NA), which matches the mode list entry by entry.
//
// Purely combinational.
module mcb_daq_mode_selector
  import mcb_pkg::*;
(
  input  logic [2:0] mode,
  input  logic       spill_en,
  input  logic       beam_daq,
  input  logic       cosmic_daq,
  input  logic       full_daq,
  input  logic       wg_daq,
  input  logic       nim_in1,
  output logic       out0,
  output logic       rj45_gate,
  output logic [2:0] daq_type
);
  always_comb begin
    unique case (mode)
      3'd1:    out0 = beam_daq;
      3'd2:    out0 = cosmic_daq;
      3'd3:    out0 = beam_daq | cosmic_daq;
      3'd4:    out0 = full_daq;
      3'd5:    out0 = wg_daq;
      3'd6:    out0 = nim_in1;
      default: out0 = 1'b0;
    endcase
    rj45_gate = spill_en & out0;
    daq_type  = rj45_gate ? mode : DAQ_NONE;
  end
endmodule
