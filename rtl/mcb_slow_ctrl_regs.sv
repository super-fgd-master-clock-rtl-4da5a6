// mcb_slow_ctrl_regs -- slow-control parameter registers of the Master
// Clock Board.
//
// Two bytes written by the command decoder:
//   'e' byte (SYNC encoder): bits 7..5 spill-gate mode, bit 4 internal spill
//       number increment, bit 3 spill gate & spill number on RJ45, bit 2
//       FSYNC on RJ45, bit 1 SYNC clock out, bit 0 SYNC data out.
//   'r' byte (readout): bit 0 enable readout, bit 1 send a GRESET pulse,
//       bit 4 reset the internal spill counter.
// The bit assignments are the specification's. Enable readout is a level;
// GRESET and the counter reset are one-cycle pulses issued when an 'r' byte
// with the bit set is written (this design's reading of "send a pulse").
// Both bytes reset to 0 (everything off). Outputs are registered.
module mcb_slow_ctrl_regs
  import mcb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e_wr,
  input  logic       r_wr,
  input  logic [7:0] wr_data,
  output enc_cfg_t   cfg,
  output logic [7:0] e_value,
  output logic [7:0] r_value,
  output logic       readout_en,
  output logic       greset_pulse,
  output logic       spill_cnt_clr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_value       <= '0;
      r_value       <= '0;
      greset_pulse  <= 1'b0;
      spill_cnt_clr <= 1'b0;
    end else begin
      greset_pulse  <= r_wr & wr_data[1];
      spill_cnt_clr <= r_wr & wr_data[4];
      if (e_wr) e_value <= wr_data;
      if (r_wr) r_value <= wr_data;
    end
  end

  assign cfg        = enc_cfg_t'(e_value);
  assign readout_en = r_value[0];
endmodule
