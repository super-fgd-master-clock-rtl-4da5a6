// tb_mcb_trigger_sm -- checks the window timing of the 1-pulse trigger state
// machine with shortened durations (the same relations as the 60 us / 4 us /
// 20 ms / 1.966 s / 1.986 s defaults, scaled down): each window opens and
// closes at the expected cycle after the trigger edge, the spill number is
// latched at the latch time (changes of the input after that are ignored),
// and a trigger during a running spill is ignored.
module tb_mcb_trigger_sm;
  localparam int BEAM = 60, FULL = 1986, LATCH = 4, CSTART = 200, CLEN = 1766;
  logic clk = 0, rst_n = 0, beam_trig = 0;
  logic [15:0] spill_nb_in = 0, spill_nb_latched;
  logic beam_daq, full_daq, cosmic_daq, trig_accept, spill_latched, busy;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_accept = 0;

  mcb_trigger_sm #(.BEAM_CYC(BEAM), .FULL_CYC(FULL), .LATCH_CYC(LATCH),
                   .COSMIC_START(CSTART), .COSMIC_CYC(CLEN)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; if (trig_accept) n_accept++; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      logic [15:0] sp;
      int nb, nf, nc, first_c, acc0;
      sp = 16'($urandom);
      repeat (20) @(negedge clk);
      check(!beam_daq && !full_daq && !cosmic_daq && !busy, "idle before trigger");
      acc0 = n_accept;
      spill_nb_in = sp;
      beam_trig = 1;                              // 100 ns pulse
      // t = 1 is the first cycle the windows are open
      nb = 0; nf = 0; nc = 0; first_c = -1;
      for (int t = 0; t <= FULL + 10; t++) begin
        @(negedge clk);
        if (t == 9) beam_trig = 0;
        if (t == LATCH + 3) spill_nb_in = ~sp;    // later changes are ignored
        if (t == 500) beam_trig = 1;              // retrigger during the spill
        if (t == 510) beam_trig = 0;
        nb += beam_daq; nf += full_daq; nc += cosmic_daq;
        if (cosmic_daq && first_c < 0) first_c = t;
      end
      check(nb == BEAM, $sformatf("beam window %0d cycles", nb));
      check(nf == FULL, $sformatf("full window %0d cycles", nf));
      check(nc == CLEN, $sformatf("cosmic window %0d cycles", nc));
      check(first_c == CSTART, $sformatf("cosmic start %0d", first_c));
      check(spill_nb_latched == sp, "spill number latched at 4 us");
      check(n_accept == acc0 + 1, "one trigger accepted per spill");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
