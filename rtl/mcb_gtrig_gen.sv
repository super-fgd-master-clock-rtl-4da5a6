// mcb_gtrig_gen -- GTRIG / FSYNC time base of the Master Clock Board.
//
// GTRIG is the periodic time stamp sent to all front-end boards: one tick
// every GTRIG_PERIOD clock cycles (10 us, 100 kHz, at 100 MHz), so that the
// FEBs' 12-bit, 400 MHz timing counters (10.24 us range) never overflow
// between two GTRIGs. FSYNC (frame synchronisation) is always synchronous
// with GTRIG: it is flagged on every FSYNC_DIV-th tick (10 kHz). The rates
// follow the specification; the first tick comes GTRIG_PERIOD cycles after
// reset.
//
// gtrig_tick is a one-cycle pulse; fsync is high in the same cycle as the
// tick it marks.
module mcb_gtrig_gen #(
  parameter int unsigned GTRIG_PERIOD = 1000,
  parameter int unsigned FSYNC_DIV    = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic gtrig_tick,
  output logic fsync
);
  localparam int unsigned PW = $clog2(GTRIG_PERIOD);
  localparam int unsigned FW = (FSYNC_DIV > 1) ? $clog2(FSYNC_DIV) : 1;

  logic [PW-1:0] pcnt;
  logic [FW-1:0] fcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt       <= '0;
      fcnt       <= '0;
      gtrig_tick <= 1'b0;
      fsync      <= 1'b0;
    end else begin
      gtrig_tick <= 1'b0;
      fsync      <= 1'b0;
      if (pcnt == PW'(GTRIG_PERIOD - 2)) begin
        // the registered tick appears GTRIG_PERIOD cycles after the last
        pcnt       <= pcnt + 1'b1;
        gtrig_tick <= 1'b1;
        fsync      <= (fcnt == FW'(FSYNC_DIV - 1));
        fcnt       <= (fcnt == FW'(FSYNC_DIV - 1)) ? '0 : fcnt + 1'b1;
      end else if (pcnt == PW'(GTRIG_PERIOD - 1)) begin
        pcnt <= '0;
      end else begin
        pcnt <= pcnt + 1'b1;
      end
    end
  end
endmodule
