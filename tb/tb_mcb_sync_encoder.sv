// tb_mcb_sync_encoder -- self-checking testbench of the SYNC line encoder.
//
// The testbench drives GTRIG ticks, FSYNC, GRESET requests, DAQ type and
// spill number changes, and reads the line back with its own bit slicer:
// it samples the 47 bits of each frame in the middle of their bit periods,
// checks the start of frame against the line level before it, the odd
// parity of each word, the fixed NA bits, the 00 end of frame and every
// field against what it drove. It also checks the idle half period
// (IDLE_HALF_BITS bit periods), the compensation delay of a frame that had
// to wait, the 0xCCCC filler and that a disabled encoder holds the line low.
module tb_mcb_sync_encoder;
  localparam int BIT_CLKS = 10;
  localparam int IDLE_HALF = 5;

  logic clk = 0, rst_n = 0;
  logic sync_en, gtrig_tick, fsync, readout_en, greset_req, led_sync, spill_nb_av;
  logic [2:0] daq_type;
  logic [15:0] spill_nb;
  logic sync_out, frame_active, frame_start;
  logic [5:0] last_comp_delay;
  int checks = 0, failures = 0;
  longint cyc = 0;

  mcb_sync_encoder #(.BIT_CLKS(BIT_CLKS), .IDLE_HALF_BITS(IDLE_HALF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---- receive side: capture one frame after frame_start ----
  typedef struct {
    bit gtrig, fsync, ro, led, gr, av;
    bit [2:0] dt; bit [5:0] cd; bit [15:0] sp; bit ok;
  } rx_t;
  rx_t last_rx;
  int frames_seen = 0;
  int n_high = 0, n_low = 0;
  logic line_before;

  always @(posedge clk) line_before <= sync_out;

  // cycle numbers of the edge that took a GTRIG tick and of the edge that
  // put the first SOF bit on the line
  longint te_p, ts_p;
  always @(posedge clk) begin
    if (gtrig_tick)  te_p = cyc;
    if (frame_start) ts_p = cyc - 1;
  end

  initial begin : rx
    bit b[47];
    forever begin
      @(posedge clk);
      if (frame_start) begin
        logic prev;
        prev = line_before;
        // we are just after the first bit boundary: sample at mid-bit
        repeat (BIT_CLKS/2) @(posedge clk);
        for (int i = 0; i < 47; i++) begin
          b[i] = sync_out;
          if (i != 46) repeat (BIT_CLKS) @(posedge clk);
        end
        begin
          bit ok; int ones;
          ok = 1;
          // SOF
          if (prev == 0) ok &= ({b[0],b[1],b[2],b[3]} == 4'b1011);
          else           ok &= ({b[0],b[1],b[2],b[3]} == 4'b0100);
          for (int w = 0; w < 5; w++) begin
            ones = 0;
            for (int k = 0; k < 9; k++) ones += b[w*9+k];
            ok &= (ones % 2 == 1);
          end
          ok &= ({b[18],b[19],b[20],b[21],b[22]} == 5'b10110);
          ok &= (b[45] == 0 && b[46] == 0);
          last_rx.ok    = ok;
          last_rx.gtrig = b[4]; last_rx.fsync = b[5]; last_rx.ro = b[6];
          last_rx.dt    = {b[7], b[9], b[10]};
          for (int k = 0; k < 6; k++) last_rx.cd[5-k] = b[11+k];
          last_rx.led = b[23]; last_rx.gr = b[24]; last_rx.av = b[25];
          for (int k = 0; k < 8; k++) last_rx.sp[15-k] = b[27+k];
          for (int k = 0; k < 8; k++) last_rx.sp[7-k]  = b[36+k];
          frames_seen++;
        end
      end
    end
  end

  task automatic wait_frame(output rx_t r);
    int n;
    n = frames_seen;
    while (frames_seen == n) @(posedge clk);
    r = last_rx;
  endtask

  task automatic pulse_gtrig(input bit fs);
    @(negedge clk); gtrig_tick = 1; fsync = fs;
    @(negedge clk); gtrig_tick = 0; fsync = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_t r;
    sync_en = 0; gtrig_tick = 0; fsync = 0; readout_en = 0; greset_req = 0;
    led_sync = 0; spill_nb_av = 1; daq_type = 0; spill_nb = 16'h0000;
    repeat (5) @(negedge clk); rst_n = 1;

    // disabled: line stays low
    repeat (200) begin @(posedge clk); if (sync_out) failures++; end
    checks++;

    sync_en = 1;
    // idle: measure half periods between transitions
    begin
      longint t0, t1, t2;
      @(posedge clk iff sync_out == 1); t0 = cyc;
      @(posedge clk iff sync_out == 0); t1 = cyc;
      @(posedge clk iff sync_out == 1); t2 = cyc;
      check(t1 - t0 == IDLE_HALF*BIT_CLKS, "idle high half period");
      check(t2 - t1 == IDLE_HALF*BIT_CLKS, "idle low half period");
    end

    // random GTRIG frames, both idle levels
    for (int n = 0; n < 24; n++) begin
      bit fs, ro, gr, led; bit [2:0] dt; bit [15:0] sp;
      fs = 1'($urandom_range(1)); ro = 1'($urandom_range(1)); gr = 1'($urandom_range(1));
      led = 1'($urandom_range(1));
      sp = 16'($urandom);
      repeat ($urandom_range(200, 5)) @(negedge clk);
      readout_en = ro; led_sync = led; spill_nb = sp;
      if (gr) begin greset_req = 1; @(negedge clk); greset_req = 0; end
      repeat (BIT_CLKS*3) @(negedge clk);   // let the spill-number frame pass
      if (frame_active || frames_seen == 0) ;
      while (frame_active) @(negedge clk);
      repeat ($urandom_range(20*BIT_CLKS, 2*BIT_CLKS)) @(negedge clk);
      if (line_before) n_high++; else n_low++;
      pulse_gtrig(fs);
      wait_frame(r);
      // a spill-number change may have produced a frame first; skip it
      if (!r.gtrig) wait_frame(r);
      check(r.ok, "frame structure (SOF, parity, NA, EOF)");
      check(r.gtrig == 1, "GTRIG bit");
      check(r.fsync == fs, "FSYNC bit");
      check(r.ro == ro, "READOUT_EN bit");
      check(r.gr == gr, "GRESET bit");
      check(r.led == led, "LED SYNC bit");
      check(r.av == 1 && r.sp == sp, "spill number");
      check(r.dt == daq_type, "DAQ type");
      check(r.cd == 0, "no wait, delay 0");
    end

    check(n_high > 2 && n_low > 2, "frames started from both idle levels");

    // spill event: DAQ type change alone sends a frame with GTRIG = 0
    while (frame_active) @(negedge clk);
    repeat (30) @(negedge clk);
    daq_type = 3'd4;
    wait_frame(r);
    check(r.ok && r.gtrig == 0 && r.dt == 3'd4, "spill-event frame");

    // spill number unavailable -> 0xCCCC filler
    while (frame_active) @(negedge clk);
    repeat (30) @(negedge clk);
    spill_nb_av = 0; spill_nb = 16'h1234;
    wait_frame(r);
    check(r.ok && r.av == 0 && r.sp == 16'hCCCC, "0xCCCC filler");

    // compensation delay: GTRIG while a frame is on the line
    for (int n = 0; n < 6; n++) begin
      int waited;
      while (frame_active) @(negedge clk);
      repeat (30) @(negedge clk);
      daq_type = 3'(n % 3 + 1);
      @(posedge clk iff frame_start);
      repeat ($urandom_range(400, 20)) @(negedge clk);
      pulse_gtrig(0);
      wait_frame(r);                 // the spill frame
      wait_frame(r);
      // bit boundaries passed while the event was pending and the line busy
      waited = int'((ts_p - te_p - 1) / BIT_CLKS);
      if (waited > 63) waited = 63;
      check(r.ok && r.gtrig, "delayed GTRIG frame");
      check(int'(r.cd) == waited, $sformatf("compensation delay %0d expected %0d", r.cd, waited));
    end

    // disable: line goes low, no frames
    while (frame_active) @(negedge clk);
    sync_en = 0;
    begin
      int n0; n0 = frames_seen;
      pulse_gtrig(0);
      repeat (1000) @(negedge clk);
      check(frames_seen == n0 && sync_out == 0, "disabled encoder silent");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
