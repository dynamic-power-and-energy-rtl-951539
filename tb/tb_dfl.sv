// tb_dfl: dynamic frequency learning around the LinP policy. Learns a frequency
// for one <power, energy> band pair by searching, keeps it across a reset,
// predicts it directly on the next visit, holds it for the validation window,
// invalidates it when the energy band moves during validation, and searches
// again afterwards. With learning disabled the plain policy runs.
module tb_dfl;
  import nvp_pkg::*;
  localparam int VAL = 4;
  logic clk = 0, rst = 1, init = 1, tick = 0, en = 1, restart = 0;
  policy_e mode = POL_LINP;
  level_t p_lvl = 4'd3, e_lvl = 4'd0;
  freq_code_t code;
  logic hit, learn, inval;
  int checks = 0, failures = 0, nhit = 0, nlearn = 0, ninval = 0;

  dfl #(.VAL_LINP(VAL), .VAL_EBLP(VAL), .VAL_DTT(VAL)) dut (
    .clk, .rst, .init_i(init), .tick_i(tick), .dfl_en_i(en), .mode_i(mode), .restart_i(restart),
    .p_lvl_i(p_lvl), .e_lvl_i(e_lvl), .code_o(code), .hit_o(hit), .learn_o(learn),
    .invalidate_o(inval));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (hit)   nhit++;
    if (learn) nlearn++;
    if (inval) ninval++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int p, int e, int exp_code);
    @(negedge clk) begin p_lvl = level_t'(p); e_lvl = level_t'(e); tick = 1; end
    @(negedge clk) tick = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (code !== freq_code_t'(exp_code)) begin
      failures++;
      $display("FAIL p=%0d e=%0d code %0d expected %0d", p, e, code, exp_code);
    end
  endtask

  task automatic counts(int h, int l, int i, string what);
    checks++;
    if (nhit != h || nlearn != l || ninval != i) begin
      failures++;
      $display("FAIL %s: hits %0d learns %0d invalidations %0d", what, nhit, nlearn, ninval);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    init = 0; rst = 0;
    // search: LinP climbs, then settles one step down at the second misprediction
    step(3, 9, 1);
    step(3, 9, 2);
    step(3, 9, 3);
    step(3, 8, 3);
    step(3, 7, 2);
    counts(0, 1, 0, "after search");
    // the table survives a reset (nonvolatile)
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    checks++; if (code !== '0) begin failures++; $display("FAIL reset code"); end
    // prediction: jump straight to the learned frequency
    step(3, 9, 2);
    counts(1, 1, 0, "first hit");
    // validation window: frequency frozen even though energy is high
    for (int i = 0; i < VAL; i++) step(3, 9, 2);
    // validation over: predicted again
    step(3, 9, 2);
    counts(2, 1, 0, "second hit");
    // energy band changes during validation: invalidate
    step(3, 8, 2);
    counts(2, 1, 1, "invalidated");
    // the pair is searched again; the policy continues from the loaded code
    step(3, 9, 3);
    counts(2, 1, 1, "miss after invalidation");
    // another power band has no entry
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    step(5, 9, 1);
    counts(2, 1, 1, "other band");
    // learning disabled: plain policy, no lookups
    en = 0;
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    step(3, 9, 1);
    step(3, 9, 2);
    counts(2, 1, 1, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
