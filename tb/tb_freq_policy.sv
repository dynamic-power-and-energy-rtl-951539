// tb_freq_policy: steps each reactive policy through a scripted sequence of
// stored-energy bands, one timestep per entry, and compares the frequency code
// and the settled pulse with hand-derived expectations (scaled frequency s is
// code + 1; band 9 = above E_thH, 8 = between E_thM and E_thH, 7 = between
// E_thL and E_thM, 6 = below E_thL).
module tb_freq_policy;
  import nvp_pkg::*;
  logic clk = 0, rst = 1, tick = 0, restart = 0, load = 0;
  policy_e mode = POL_LINP;
  freq_code_t load_code = '0, code;
  level_t e_lvl = '0;
  logic settled, mispred;
  int checks = 0, failures = 0;
  logic settled_seen;

  freq_policy dut (.clk, .rst, .tick_i(tick), .mode_i(mode), .restart_i(restart), .load_i(load),
                   .load_code_i(load_code), .e_lvl_i(e_lvl), .code_o(code), .settled_o(settled),
                   .mispred_o(mispred));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int e, int exp_code, bit exp_settled);
    @(negedge clk) begin e_lvl = level_t'(e); tick = 1; end
    @(negedge clk) tick = 0;
    settled_seen = settled;
    checks++;
    if (code !== freq_code_t'(exp_code) || settled_seen !== exp_settled) begin
      failures++;
      $display("FAIL mode %s e=%0d: code %0d settled %0d, expected %0d %0d",
               mode.name(), e, code, settled_seen, exp_code, exp_settled);
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic do_restart(policy_e m);
    @(negedge clk) begin restart = 1; mode = m; end
    @(negedge clk) restart = 0;
    checks++;
    if (code !== '0) begin failures++; $display("FAIL restart code %0d", code); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // ---- LinP ----
    do_restart(POL_LINP);
    step(6, 0, 0);                         // inactive below E_thH
    step(9, 1, 0); step(9, 2, 0); step(9, 3, 0); step(9, 4, 0); step(9, 5, 0);
    step(8, 5, 0);                         // first misprediction: hold
    step(8, 5, 0);
    step(7, 4, 1);                         // second misprediction: one step down
    step(7, 4, 0);
    step(6, 3, 0); step(6, 2, 0);          // below E_thL: step down each timestep
    step(9, 3, 0);
    // ---- EBLP ----
    do_restart(POL_EBLP);
    step(9, 1, 0); step(9, 3, 0); step(9, 7, 0); step(9, 15, 0); step(9, 31, 0);
    step(9, 31, 0);                        // saturates at s = 32
    step(8, 0, 0);                         // first misprediction at s = 32: back to minimum
    step(9, 1, 0); step(9, 3, 0); step(9, 7, 0); step(9, 15, 0);  // exponential up to 16
    step(9, 16, 0); step(9, 17, 0);        // then linear
    step(8, 16, 1);                        // second misprediction
    step(8, 16, 0);
    step(7, 15, 0);                        // falling through E_thM
    step(7, 15, 0);
    step(6, 14, 0);
    // ---- DTT ----
    do_restart(POL_DTT);
    step(9, 1, 0); step(9, 2, 0); step(9, 3, 0);
    step(8, 2, 0);                         // through E_thH: turn down
    step(7, 1, 0); step(6, 0, 0); step(6, 0, 0);
    step(7, 1, 1);                         // through E_thL upwards: turn up, settled
    step(8, 2, 0); step(8, 3, 0); step(9, 4, 0);
    step(8, 3, 0);
    // ---- load ----
    @(negedge clk) begin load = 1; load_code = 5'd20; end
    @(negedge clk) load = 0;
    checks++;
    if (code !== 5'd20) begin failures++; $display("FAIL load"); end
    mode = POL_LINP;
    step(8, 20, 0);                        // loaded code held in the window
    step(9, 21, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
