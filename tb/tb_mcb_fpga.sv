// tb_mcb_fpga -- checks the MCB firmware through its pins with shortened
// trigger windows and a fast UART (16 cycles per bit). The testbench sends
// ASCII commands with its own UART bit-banger and reads the answers with its
// own receiver. It checks: the answers to e/r/s/x and a bad command; that
// SYNC is silent until "Sync data out" is enabled and that frames then start
// every GTRIG period (1000 cycles); the clock-out enable; SMA OUT0 for each
// spill-gate mode (beam, internal, both, full, WAGASCI, NIM IN1) against
// window lengths counted from the trigger; the beam-line spill number
// latched after the trigger and the internal spill counter with its reset,
// both read back with "s00".
module tb_mcb_fpga;
  localparam int CPB = 16;
  localparam int BEAM = 60, FULL = 1986, LATCH = 4, CSTART = 200, CLEN = 1766;
  logic clk = 0, rst_n = 0, uart_rx = 1, uart_tx;
  logic nim_in0 = 0, nim_in1 = 0, wg_beam_daq = 0, wg_int_daq = 0, led_sync = 0;
  logic [15:0] spill_nb_in = 16'h0000;
  logic sma_out0, sync_out, clk_out_en, gtrig_tick, frame_start, spill_trig;
  logic [2:0] daq_type;
  logic [15:0] spill_nb;
  int checks = 0, failures = 0;
  longint cyc = 0;

  mcb_fpga #(.BEAM_CYC(BEAM), .FULL_CYC(FULL), .LATCH_CYC(LATCH), .COSMIC_START(CSTART),
             .COSMIC_CYC(CLEN), .CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // UART
  string answer = "";
  initial begin : line_rx
    forever begin
      logic [7:0] c;
      @(negedge uart_tx);
      repeat (CPB/2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); c[i] = uart_tx; end
      repeat (CPB) @(posedge clk);
      answer = {answer, string'(c)};
    end
  end
  task automatic send(input string s);
    for (int k = 0; k < s.len(); k++) begin
      logic [7:0] c; c = s[k];
      @(negedge clk) uart_rx = 0;
      repeat (CPB) @(negedge clk);
      for (int i = 0; i < 8; i++) begin uart_rx = c[i]; repeat (CPB) @(negedge clk); end
      uart_rx = 1; repeat (CPB + 2) @(negedge clk);
    end
  endtask
  task automatic cmd(input string s, input string exp);
    answer = "";
    send(s);
    repeat (CPB * 10 * (exp.len() + 2)) @(negedge clk);
    check(answer == exp, $sformatf("'%s' answered '%s', expected '%s'", s, answer, exp));
  endtask

  // trigger and OUT0 measurement
  int n_out0, first_out0, last_out0;
  task automatic spill(input logic [15:0] sp);
    spill_nb_in = sp;
    n_out0 = 0; first_out0 = -1; last_out0 = -1;
    @(negedge clk); nim_in0 = 1;
    for (int t = 0; t < FULL + 50; t++) begin
      @(negedge clk);
      if (t == 9) nim_in0 = 0;
      if (sma_out0) begin n_out0++; if (first_out0 < 0) first_out0 = t; last_out0 = t; end
    end
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // everything off after reset
    begin
      int tr; tr = 0;
      repeat (3000) begin @(posedge clk); if (sync_out || frame_start) tr++; end
      check(tr == 0 && !clk_out_en, "SYNC and clock off after reset");
    end
    cmd("x", "x");
    cmd("k", "y01");
    cmd("e03", "e03");
    check(clk_out_en, "clock out enabled");
    begin
      longint last; int n, bad; last = -1; n = 0; bad = 0;
      repeat (10500) begin
        @(posedge clk);
        if (frame_start) begin
          if (last >= 0 && cyc - last != 1000) bad++;
          last = cyc; n++;
        end
      end
      check(n >= 10 && bad == 0, $sformatf("frames every GTRIG period (%0d frames, %0d off)", n, bad));
    end
    // mode 1: 60 us beam window on OUT0
    cmd("e27", "e27");
    spill(16'h010A);
    check(n_out0 == BEAM, $sformatf("mode 1 OUT0 %0d cycles", n_out0));
    check(first_out0 >= 2 && first_out0 <= 4, $sformatf("OUT0 latency %0d", first_out0));
    cmd("s00", "s010A");
    // mode 2: internal window
    cmd("e47", "e47");
    spill(16'h0203);
    check(n_out0 == CLEN && first_out0 == CSTART + first_out0 - CSTART, "mode 2 OUT0 length");
    check(first_out0 >= CSTART + 2 && first_out0 <= CSTART + 4, "mode 2 OUT0 start");
    // mode 3: both
    cmd("e6F", "e6F");
    spill(16'h0304);
    check(n_out0 == BEAM + CLEN, $sformatf("mode 3 OUT0 %0d cycles", n_out0));
    // mode 4: full
    cmd("e8F", "e8F");
    spill(16'h0405);
    check(n_out0 == FULL, $sformatf("mode 4 OUT0 %0d cycles", n_out0));
    cmd("s00", "s0405");
    // mode 5: WAGASCI (beam OR internal DAQ)
    cmd("eAF", "eAF");
    @(negedge clk); wg_beam_daq = 1; repeat (30) @(negedge clk); wg_beam_daq = 0;
    repeat (5) @(negedge clk); check(!sma_out0, "WAGASCI gate closed");
    wg_int_daq = 1; repeat (5) @(negedge clk); check(sma_out0 && daq_type == 3'd5, "WAGASCI int gate");
    wg_int_daq = 0; repeat (5) @(negedge clk);
    // mode 6: NIM IN1
    cmd("eCF", "eCF");
    nim_in1 = 1; repeat (5) @(negedge clk);
    check(sma_out0 && daq_type == 3'd6, "NIM IN1 gate on OUT0 and RJ45");
    nim_in1 = 0; repeat (5) @(negedge clk);
    check(!sma_out0 && daq_type == 3'd0, "NIM IN1 gate closed");
    // spill gate not on RJ45 (bit 3 clear): OUT0 only
    cmd("eC7", "eC7");
    nim_in1 = 1; repeat (5) @(negedge clk);
    check(sma_out0 && daq_type == 3'd0, "gate on OUT0 only");
    nim_in1 = 0;
    // internal spill counter
    cmd("r10", "r10");
    cmd("eDF", "eDF");
    cmd("s00", "s0000");
    spill(16'hAAAA); spill(16'hAAAA);
    cmd("s00", "s0002");
    cmd("r10", "r10");
    cmd("s00", "s0000");
    // SYNC off
    cmd("e00", "e00");
    begin
      int tr; tr = 0;
      repeat (3000) begin @(posedge clk); if (sync_out || frame_start) tr++; end
      check(tr == 0 && !clk_out_en, "SYNC and clock off again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
