// tb_mcb_slow_ctrl_regs -- writes the specification's example bytes and
// random ones and checks every decoded field, the readout level and the
// one-cycle GRESET and spill-counter-reset pulses.
module tb_mcb_slow_ctrl_regs;
  import mcb_pkg::*;
  logic clk = 0, rst_n = 0, e_wr = 0, r_wr = 0;
  logic [7:0] wr_data = 0, e_value, r_value;
  enc_cfg_t cfg;
  logic readout_en, greset_pulse, spill_cnt_clr;
  int checks = 0, failures = 0;

  mcb_slow_ctrl_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_e(input logic [7:0] v);
    @(negedge clk); e_wr = 1; wr_data = v; @(negedge clk); e_wr = 0;
  endtask

  task automatic write_r(input logic [7:0] v, output int gp, output int cp);
    gp = 0; cp = 0;
    @(negedge clk); r_wr = 1; wr_data = v; @(negedge clk); r_wr = 0;
    repeat (4) begin
      if (greset_pulse) gp++;
      if (spill_cnt_clr) cp++;
      @(negedge clk);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gp, cp;
    repeat (3) @(negedge clk); rst_n = 1;
    check(e_value == 0 && r_value == 0 && !readout_en, "reset values");
    // "e27": sync + sync clk + FSYNC + 60 us beam DAQ pulse on OUT0
    write_e(8'h27);
    check(cfg.syncout_en && cfg.clkout_en && cfg.fsync_en && !cfg.spill_en &&
          !cfg.int_spill_nb_en && cfg.spill_gate_mode == 3'b001, "e27 fields");
    // "eDF": NIM1 to OUT0 and RJ45, internal spill number increment
    write_e(8'hDF);
    check(cfg.syncout_en && cfg.clkout_en && cfg.fsync_en && cfg.spill_en &&
          cfg.int_spill_nb_en && cfg.spill_gate_mode == 3'b110, "eDF fields");
    write_r(8'h01, gp, cp);
    check(readout_en && gp == 0 && cp == 0, "r01 enables readout only");
    write_r(8'h03, gp, cp);
    check(readout_en && gp == 1 && cp == 0, "r03 readout + one GRESET pulse");
    write_r(8'h10, gp, cp);
    check(!readout_en && gp == 0 && cp == 1, "r10 one spill counter reset");
    write_r(8'h00, gp, cp);
    check(!readout_en && gp == 0 && cp == 0, "r00 stops readout");
    for (int n = 0; n < 50; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      write_e(v);
      check(e_value == v && cfg.spill_gate_mode == v[7:5] && cfg.int_spill_nb_en == v[4] &&
            cfg.spill_en == v[3] && cfg.fsync_en == v[2] && cfg.clkout_en == v[1] &&
            cfg.syncout_en == v[0], "random e byte");
      v = 8'($urandom);
      write_r(v, gp, cp);
      check(r_value == v && readout_en == v[0] && gp == int'(v[1]) && cp == int'(v[4]),
            "random r byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
