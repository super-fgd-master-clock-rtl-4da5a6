// tb_mcb_daq_mode_selector -- exhaustive check of the DAQ mode selector
// against the mode table: every mode, every spill-enable value and every
// combination of the five gate sources.
module tb_mcb_daq_mode_selector;
  logic [2:0] mode;
  logic spill_en, beam_daq, cosmic_daq, full_daq, wg_daq, nim_in1;
  logic out0, rj45_gate;
  logic [2:0] daq_type;
  int checks = 0, failures = 0;

  mcb_daq_mode_selector dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++)
      for (int e = 0; e < 2; e++)
        for (int s = 0; s < 32; s++) begin
          logic exp_out; logic [2:0] exp_dt;
          mode = 3'(m); spill_en = 1'(e);
          {beam_daq, cosmic_daq, full_daq, wg_daq, nim_in1} = 5'(s);
          case (m)
            1: exp_out = beam_daq;
            2: exp_out = cosmic_daq;
            3: exp_out = beam_daq | cosmic_daq;
            4: exp_out = full_daq;
            5: exp_out = wg_daq;
            6: exp_out = nim_in1;
            default: exp_out = 0;
          endcase
          exp_dt = (e && exp_out) ? 3'(m) : 3'd0;
          #1;
          checks++;
          if (out0 !== exp_out || rj45_gate !== (e && exp_out) || daq_type !== exp_dt) begin
            failures++;
            $display("FAIL mode %0d en %0d src %b: out0 %b gate %b type %0d", m, e, s[4:0],
                     out0, rj45_gate, daq_type);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
