// tb_cvu: clock/voltage tuning unit. Raises the frequency through the LinP
// policy, checks the supply target against the linear interpolation between
// 0.76 V at 32 kHz and 1.31 V at 25 MHz (computed here in real arithmetic),
// the fixed supply without voltage scaling, the override to the lowest
// frequency, and that the gated-clock enable drops for a frequency switch and
// while the processor is stopped.
module tb_cvu;
  import nvp_pkg::*;
  logic clk = 0, rst = 1, init = 1, tick = 0, dfl_en = 0, dvr_en = 1, fmin = 0, cpu_en = 1;
  policy_e mode = POL_LINP;
  level_t p_lvl = 4'd5, e_lvl = 4'd9;
  freq_code_t code;
  logic [10:0] vdd;
  logic gate, fchg, h, l, inv;
  int checks = 0, failures = 0, nchg = 0;

  cvu dut (.clk, .rst, .init_i(init), .tick_i(tick), .mode_i(mode), .dfl_en_i(dfl_en),
           .dvr_en_i(dvr_en), .p_lvl_i(p_lvl), .e_lvl_i(e_lvl), .freq_min_i(fmin),
           .cpu_clk_en_i(cpu_en), .freq_code_o(code), .vdd_mv_o(vdd), .gate_en_o(gate),
           .freq_change_o(fchg), .dfl_hit_o(h), .dfl_learn_o(l), .dfl_invalidate_o(inv));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && fchg) nchg++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_vdd(int c);
    real f_khz = (c + 1) * 32.0;
    return 760 + int'($ceil((f_khz - 32.0) * (1310.0 - 760.0) / (25000.0 - 32.0) - 1e-9));
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (code %0d vdd %0d gate %0d)", what, code, vdd, gate); end
  endtask

  initial begin
    int gate_low;
    repeat (2) @(negedge clk);
    init = 0; rst = 0;
    repeat (4) @(negedge clk);
    chk(code == 0 && vdd == 11'(exp_vdd(0)) && gate, "idle at lowest frequency");
    for (int k = 1; k <= 31; k++) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      // the gate must be low right after the change, then reopen
      gate_low = 0;
      for (int c = 0; c < 6; c++) begin
        if (!gate) gate_low++;
        @(negedge clk);
      end
      chk(code == freq_code_t'(k), $sformatf("step to %0d", k));
      chk(vdd == 11'(exp_vdd(k)), $sformatf("vdd for code %0d expected %0d", k, exp_vdd(k)));
      chk(gate_low >= 2 && gate, "gate closed during the switch");
    end
    chk(nchg == 31, "31 frequency changes");
    // no voltage scaling: the supply needed by the highest code
    dvr_en = 0;
    repeat (2) @(negedge clk);
    chk(vdd == 11'(exp_vdd(31)), "fixed supply without DVR");
    dvr_en = 1;
    // override
    fmin = 1;
    repeat (2) @(negedge clk);
    chk(code == 0 && vdd == 11'(exp_vdd(0)), "override to the lowest frequency");
    fmin = 0;
    // processor stopped: gate closed
    repeat (4) @(negedge clk);
    chk(gate, "gate open while running");
    cpu_en = 0;
    repeat (2) @(negedge clk);
    chk(!gate, "gate closed while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
