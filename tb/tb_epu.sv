// tb_epu: energy policy unit with its ALD. A simple BRU model answers backup
// and restore requests after a few cycles. Checks the state sequence from a
// cold start, the warning override to the lowest frequency, the processor clock
// enable, a conventional (ALD off) backup, an ALD-learned deferred backup and
// an elided one, and resuming only above the resume threshold.
module tb_epu;
  import nvp_pkg::*;
  localparam int EW = 16;
  logic clk = 0, rst = 1, init = 1, ald_en = 0, warn = 0, iret = 0;
  logic [3:0] plvl = 4'd2;
  logic [EW-1:0] ecap = 0, eback = 300, eres = 500, emin = 200, epi = 50;
  logic bk, rs, bdone = 0, clk_en, fmin, wov, dly, eli, lrn;
  sys_state_e st;
  int checks = 0, failures = 0, nbk = 0, nrs = 0, nwov = 0;

  epu #(.EW(EW), .CNT_W(16)) dut (
    .clk, .rst, .init_i(init), .ald_en_i(ald_en), .warn_i(warn), .p_lvl_i(plvl),
    .e_cap_i(ecap), .e_back_i(eback), .e_resume_i(eres), .e_min_i(emin), .epi_i(epi),
    .instr_ret_i(iret), .bru_backup_o(bk), .bru_restore_o(rs), .bru_done_i(bdone),
    .state_o(st), .cpu_clk_en_o(clk_en), .freq_min_o(fmin), .warn_override_o(wov),
    .ald_delay_o(dly), .ald_elide_o(eli), .ald_learn_o(lrn));

  always #5 clk = ~clk;

  // BRU model: done four cycles after a request
  int bru_cnt = -1;
  always_ff @(posedge clk) begin
    bdone <= 1'b0;
    if (bk || rs) bru_cnt <= 4;
    else if (bru_cnt > 0) bru_cnt <= bru_cnt - 1;
    else if (bru_cnt == 0) begin bdone <= 1'b1; bru_cnt <= -1; end
    if (!rst && bk)  nbk++;
    if (!rst && rs)  nrs++;
    if (!rst && wov) nwov++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (state %s)", what, st.name()); end
  endtask

  task automatic wait_state(sys_state_e s, int max_cycles);
    int n = 0;
    while (st != s && n < max_cycles) begin @(negedge clk); n++; end
    chk(st == s, $sformatf("reach %s", s.name()));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    init = 0; rst = 0;
    repeat (3) @(negedge clk);
    chk(st == SYS_OFF && !clk_en && fmin, "off while energy low");
    ecap = 450;                        // above backup, below resume: stay off
    repeat (5) @(negedge clk);
    chk(st == SYS_OFF, "no start below resume threshold");
    ecap = 600;
    wait_state(SYS_RESTORE, 5);
    wait_state(SYS_RUN, 10);
    chk(nrs == 1 && clk_en && !fmin, $sformatf("running after restore nrs=%0d en=%0d fmin=%0d", nrs, clk_en, fmin));
    // warning forces the lowest frequency
    warn = 1;
    repeat (2) @(negedge clk);
    chk(fmin && nwov == 1 && st == SYS_RUN, "warning override");
    warn = 0;
    @(negedge clk);
    chk(!fmin, "override released");
    // conventional backup (ALD disabled)
    ecap = 290;
    wait_state(SYS_BACKUP, 3);
    @(negedge clk);
    chk(nbk == 1 && !clk_en, "immediate backup, clock stopped");
    wait_state(SYS_HALT, 10);
    ecap = 520;
    wait_state(SYS_RUN, 20);
    // ALD: first emergency learns (600-200)/50 = 8
    ald_en = 1;
    ecap = 290;
    wait_state(SYS_BACKUP, 5);
    ecap = 600;
    wait_state(SYS_HALT, 10);
    wait_state(SYS_RUN, 20);
    // second emergency at the same power level: deferred by 8 instructions
    ecap = 290;
    wait_state(SYS_DELAY, 3);
    chk(clk_en && fmin, "processor runs at lowest frequency during the delay");
    for (int i = 0; i < 7; i++) begin
      @(negedge clk) iret = 1;
      @(negedge clk) iret = 0;
    end
    repeat (3) @(negedge clk);
    chk(st == SYS_DELAY && nbk == 2, "still delaying after 7 instructions");
    @(negedge clk) iret = 1;
    @(negedge clk) iret = 0;
    wait_state(SYS_BACKUP, 4);
    @(negedge clk);
    chk(nbk == 3, "backup after the 8th instruction");
    ecap = 600;
    wait_state(SYS_RUN, 30);
    // third emergency: energy comes back during the delay -> elided
    ecap = 290;
    wait_state(SYS_DELAY, 3);
    ecap = 350;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) iret = 1;
      @(negedge clk) iret = 0;
    end
    wait_state(SYS_RUN, 5);
    chk(nbk == 3, "backup elided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
