// feb_sync_check -- checks on a front-end board that the decoded GTRIG and
// FSYNC arrive at their expected rates, and shows it on a blinking LED.
//
// A cycle counter measures the distance between decoded GTRIG pulses: GTRIG
// is "synchro" while every interval is exactly GTRIG_PERIOD cycles. A GTRIG
// counter measures the distance between FSYNC pulses: FSYNC is "synchro"
// while it comes on every FSYNC_DIV-th GTRIG. A missing pulse clears the
// status as soon as the interval is exceeded. The LED blinks with a 100 ms
// period when both are synchro, with a 400 ms period when only GTRIG is,
// and stays off otherwise (blink periods from the specification, given as
// half periods in clock cycles; the checking rule is this design's).
module feb_sync_check #(
  parameter int unsigned GTRIG_PERIOD  = 1000,
  parameter int unsigned FSYNC_DIV     = 10,
  parameter int unsigned LED_SLOW_HALF = 20_000_000,   // 400 ms period
  parameter int unsigned LED_FAST_HALF = 5_000_000     // 100 ms period
) (
  input  logic clk,
  input  logic rst_n,
  input  logic gtrig,
  input  logic fsync,
  output logic gtrig_ok,
  output logic fsync_ok,
  output logic led
);
  localparam int unsigned PW = $clog2(GTRIG_PERIOD + 2);
  localparam int unsigned FW = $clog2(FSYNC_DIV + 2);
  localparam int unsigned LW = $clog2(LED_SLOW_HALF + 1);

  logic [PW-1:0] pcnt;
  logic [FW-1:0] gcnt;
  logic          seen_g, seen_f;
  logic [LW-1:0] lcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; gcnt <= '0; seen_g <= 1'b0; seen_f <= 1'b0;
      gtrig_ok <= 1'b0; fsync_ok <= 1'b0;
    end else begin
      // GTRIG interval
      if (gtrig) begin
        gtrig_ok <= seen_g && (pcnt == PW'(GTRIG_PERIOD - 1));
        seen_g   <= 1'b1;
        pcnt     <= '0;
      end else if (pcnt != PW'(GTRIG_PERIOD + 1)) begin
        pcnt <= pcnt + 1'b1;
      end else begin
        gtrig_ok <= 1'b0;                    // GTRIG missing
      end
      // FSYNC every FSYNC_DIV GTRIGs
      if (gtrig) begin
        if (fsync) begin
          fsync_ok <= seen_f && (gcnt == FW'(FSYNC_DIV - 1));
          seen_f   <= 1'b1;
          gcnt     <= '0;
        end else if (gcnt != FW'(FSYNC_DIV)) begin
          gcnt <= gcnt + 1'b1;
        end else begin
          fsync_ok <= 1'b0;                  // FSYNC missing
        end
      end
    end
  end

  // LED blinking
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcnt <= '0;
      led  <= 1'b0;
    end else if (!gtrig_ok) begin
      lcnt <= '0;
      led  <= 1'b0;
    end else if (lcnt >= LW'((fsync_ok ? LED_FAST_HALF : LED_SLOW_HALF) - 1)) begin
      lcnt <= '0;
      led  <= ~led;
    end else begin
      lcnt <= lcnt + 1'b1;
    end
  end
endmodule
