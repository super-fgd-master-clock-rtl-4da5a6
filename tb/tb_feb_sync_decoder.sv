// tb_feb_sync_decoder -- self-checking testbench of the FEB SYNC decoder.
//
// The testbench plays the encoder: it drives an idle 1 MHz square wave and
// frames it builds bit by bit (start of frame from the previous line level,
// odd parity per 9-bit word, NA bits 10110, end of frame 00) with random
// fields and random compensation delays. It checks every released field,
// that the release comes (63 - delay) bit periods after the end of frame
// with the same fixed offset for every frame, that frames with a wrong
// parity, NA bit or end of frame are rejected, and that a long idle never
// produces a frame.
module tb_feb_sync_decoder;
  localparam int BIT_CLKS = 10;

  logic clk = 0, rst_n = 0, sync_in = 0;
  logic gtrig, fsync, greset, readout_en, spill_gate, led_sync, spill_nb_av;
  logic [2:0] daq_type;
  logic [15:0] spill_nb;
  logic frame_ok, frame_err;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_ok = 0, n_err = 0;

  feb_sync_decoder #(.BIT_CLKS(BIT_CLKS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (frame_ok) n_ok++;
    if (frame_err) n_err++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic send_bit(input bit b);
    @(negedge clk); sync_in = b;
    repeat (BIT_CLKS - 1) @(negedge clk);
  endtask

  task automatic idle(input int half_periods);
    for (int h = 0; h < half_periods; h++) begin
      bit lvl; lvl = ~sync_in;
      for (int k = 0; k < 5; k++) send_bit(lvl);
    end
  endtask

  // build and send one frame; corrupt: 0 none, 1 parity, 2 NA, 3 EOF
  task automatic send_frame(input bit g, fs, ro, led, gr, av, input bit [2:0] dt,
                            input bit [5:0] cd, input bit [15:0] sp, input int corrupt);
    bit f[47];
    bit [7:0] w[5];
    w[0] = {(sync_in ? 4'b0100 : 4'b1011), g, fs, ro, dt[2]};
    w[1] = {dt[1:0], cd};
    w[2] = {5'b10110, led, gr, av};
    w[3] = sp[15:8];
    w[4] = sp[7:0];
    if (corrupt == 2) w[2][7] = 0;
    for (int i = 0; i < 5; i++) begin
      int ones; ones = 0;
      for (int k = 0; k < 8; k++) begin f[i*9+k] = w[i][7-k]; ones += w[i][7-k]; end
      f[i*9+8] = (ones % 2 == 0);
      if (corrupt == 1 && i == 3) f[i*9+8] = ~f[i*9+8];
    end
    f[45] = 0; f[46] = (corrupt == 3);
    for (int i = 0; i < 47; i++) send_bit(f[i]);
  endtask

  // release time of gtrig
  longint t_rel;
  always @(posedge clk) if (gtrig) t_rel = cyc;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint offset0;
    offset0 = -1;
    repeat (3) @(negedge clk); rst_n = 1;
    idle(20);
    check(n_ok == 0 && n_err == 0 && gtrig == 0, "idle produces no frame");

    for (int n = 0; n < 30; n++) begin
      bit fs, ro, led, gr, av; bit [2:0] dt; bit [5:0] cd; bit [15:0] sp;
      longint t_eof;
      int ok0;
      fs = 1'($urandom_range(1)); ro = 1'($urandom_range(1)); led = 1'($urandom_range(1));
      gr = 1'($urandom_range(1)); av = 1'($urandom_range(1));
      dt = 3'($urandom_range(6)); cd = 6'($urandom_range(63)); sp = 16'($urandom);
      ok0 = n_ok;
      idle($urandom_range(3, 1));
      // optionally shift the idle phase by a few bits
      for (int k = 0; k < int'($urandom_range(4)); k++) send_bit(sync_in);
      send_frame(1, fs, ro, led, gr, av, dt, cd, sp, 0);
      t_eof = cyc;
      // wait for the release: (63 - cd) bit periods plus a few cycles
      fork
        begin : w
          @(posedge clk iff gtrig);
        end
        begin : drive_idle
          idle(20);
        end
      join_any
      disable fork;
      @(negedge clk);
      check(n_ok == ok0 + 1, "frame accepted");
      check(fsync == 0 && greset == 0, "pulses last one cycle");
      check(readout_en == ro && led_sync == led && spill_nb_av == av, "level fields");
      check(daq_type == dt && spill_gate == (dt != 0), "DAQ type and spill gate");
      check(spill_nb == sp, "spill number");
      begin
        longint off;
        off = t_rel - t_eof - longint'(63 - cd) * BIT_CLKS;
        if (n == 0) offset0 = off;
        check(off == offset0 && off > -BIT_CLKS && off < BIT_CLKS,
              $sformatf("release latency offset %0d (first %0d)", off, offset0));
      end
    end

    // corrupted frames are rejected and change nothing
    for (int c = 1; c <= 3; c++) begin
      int e0, o0; logic [15:0] sp0;
      e0 = n_err; o0 = n_ok; sp0 = spill_nb;
      idle(2);
      send_frame(1, 1, 1, 1, 1, 1, 3'd2, 6'd63, ~sp0, c);
      idle(4);
      check(n_err == e0 + 1 && n_ok == o0, $sformatf("corruption %0d rejected", c));
      check(spill_nb == sp0, "rejected frame not released");
    end

    // gtrig = 0 frame (spill event): levels update, no gtrig pulse
    begin
      int g0; g0 = 0;
      idle(2);
      fork
        send_frame(0, 0, 0, 0, 0, 1, 3'd4, 6'd63, 16'hBEEF, 0);
        repeat (70*BIT_CLKS) begin @(posedge clk); if (gtrig) g0++; end
      join
      idle(2);
      check(g0 == 0 && spill_nb == 16'hBEEF && daq_type == 3'd4, "spill-event frame");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
