// tb_nvp_pmu_top: end-to-end test of the power management unit, with short timesteps
// (16 reference cycles for RF, 40 for solar) so that many policy decisions fit
// in a short run; all other parameters are the defaults.
//
// The testbench plays the analog front end and the processor. It scripts the
// sampled input power and stored energy, drives 32 free-running candidate
// clocks ((k+1) x the reference frequency), and models the processor state
// (PC and a 16-byte register file) clocked by the unit's gated system clock:
// one instruction retires every two system-clock cycles and changes PC and one
// register. Processor state is scrambled at every power failure. Checked:
//   * restored PC/register file equal the last committed checkpoint (also
//     after a backup cut short by power loss: rollback),
//   * the system clock rate matches the selected frequency code,
//   * the supply target follows the frequency with DVR and is fixed without,
//   * the state sequence of start, emergency, backup, halt and resume,
//   * every mechanism happened at least once: backup, restore, rollback, ALD
//     delay / elided backup / learning, DFL hit / learn / invalidation,
//     frequency change, warning override, each of LinP, EBLP, DTT raising the
//     frequency, the solar timestep and DVR voltage change.
module tb_nvp_pmu_top;
  import nvp_pkg::*;
  localparam int  NCLK    = 32;
  localparam real REF_HALF = 15625.0;   // 32 kHz reference, in ns
  localparam int  TICK    = 16;     // reference cycles per RF timestep

  logic clk = 0, rst = 1, nv_init = 1;
  logic solar = 0, ald_en = 0, dfl_en = 1, dvr_en = 1;
  policy_e mode = POL_LINP;
  logic [15:0] p_th = 1000, p_max = 10000, e_full = 10000, e_back = 2000, e_resume = 3000,
               e_min = 1000, epi = 100, p_in = 0, e_cap = 0;
  logic [NCLK-1:0] clk_in = '0;
  logic sys_clk;
  freq_code_t code;
  logic [10:0] vdd;
  logic instr_tgl = 0;
  logic [15:0] pc = 0;
  logic [7:0] rf [16];
  logic [7:0] rf_rdata, pc_byte, rf_byte;
  logic [4:0] br_addr;
  logic br_restore, pc_start, pc_fin = 0, rf_start, rf_fin = 0, pc_ld, rf_we;
  sys_state_e state;
  logic ckpt_valid;
  pmu_events_t ev;

  nvp_pmu_top #(.RF_CYCLES(16), .SOLAR_CYCLES(40)) dut (
    .clk, .rst, .nv_init_i(nv_init), .solar_i(solar), .mode_i(mode), .ald_en_i(ald_en),
    .dfl_en_i(dfl_en), .dvr_en_i(dvr_en), .p_th_i(p_th), .p_max_i(p_max), .e_full_i(e_full),
    .e_back_i(e_back), .e_resume_i(e_resume), .e_min_i(e_min), .epi_i(epi), .p_in_i(p_in),
    .e_cap_i(e_cap), .clk_in_i(clk_in), .sys_clk_o(sys_clk), .freq_code_o(code), .vdd_mv_o(vdd),
    .instr_tgl_i(instr_tgl), .pc_i(pc), .rf_rdata_i(rf_rdata), .br_addr_o(br_addr),
    .br_restore_o(br_restore), .pc_start_br_o(pc_start), .pc_finish_br_i(pc_fin),
    .rf_start_br_o(rf_start), .rf_finish_br_i(rf_fin), .pc_ld_o(pc_ld), .pc_byte_o(pc_byte),
    .rf_we_o(rf_we), .rf_byte_o(rf_byte), .state_o(state), .ckpt_valid_o(ckpt_valid), .ev_o(ev));

  // ---------------- clocks ----------------
  always #(REF_HALF * 1ns) clk = ~clk;
  for (genvar k = 0; k < NCLK; k++) begin : g_osc
    initial begin
      #((k * 97) * 1ns);
      forever #((REF_HALF / (k + 1)) * 1ns) clk_in[k] = ~clk_in[k];
    end
  end

  // ---------------- processor model ----------------
  logic phase = 0;
  always @(posedge sys_clk) begin
    phase <= !phase;
    if (phase) begin
      instr_tgl <= !instr_tgl;
      pc <= pc + 16'd1;
      rf[pc[3:0]] <= rf[pc[3:0]] + 8'd7 + pc[7:0];
    end
  end
  assign rf_rdata = (br_addr >= 5'd2) ? rf[br_addr - 5'd2] : 8'h00;
  always @(posedge clk) begin
    pc_fin <= pc_start;
    rf_fin <= rf_start;
    if (pc_ld) pc[8*br_addr[0] +: 8] <= pc_byte;
    if (rf_we) rf[br_addr - 5'd2] <= rf_byte;
  end

  task automatic scramble();
    pc = 16'($urandom);
    for (int i = 0; i < 16; i++) rf[i] = 8'($urandom);
  endtask

  // ---------------- scoreboard and counters ----------------
  int checks = 0, failures = 0;
  int n_backup = 0, n_restore = 0, n_rollback = 0, n_ald_delay = 0, n_ald_elide = 0,
      n_ald_learn = 0, n_dfl_hit = 0, n_dfl_learn = 0, n_dfl_inval = 0, n_fchange = 0,
      n_warn = 0, n_ticks = 0, n_linp_up = 0, n_eblp_up = 0, n_dtt_up = 0, n_vdd_change = 0;
  logic [15:0] ck_pc [2];
  logic [7:0]  ck_rf [2][16];
  logic [15:0] pend_pc;
  logic [7:0]  pend_rf [16];
  logic        prev_ckpt_ok = 0, have_ckpt = 0;
  freq_code_t  code_q = '0;
  logic [10:0] vdd_q = '0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state %s code %0d e_cap %0d p_in %0d)", what, state.name(), code, e_cap, p_in);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (dut.u_timer.tick_o) n_ticks++;
    if (code != code_q && code > code_q) begin
      if (mode == POL_LINP) n_linp_up++;
      if (mode == POL_EBLP) n_eblp_up++;
      if (mode == POL_DTT)  n_dtt_up++;
    end
    if (vdd != vdd_q && vdd_q != 0) n_vdd_change++;
    code_q <= code;
    vdd_q  <= vdd;
    // the processor state at the start of a backup is what must come back
    if (pc_start && !br_restore && !pc_fin) begin
      pend_pc = pc;
      for (int i = 0; i < 16; i++) pend_rf[i] = rf[i];
    end
    if (ev.backup_done) begin
      n_backup++;
      ck_pc[1] = ck_pc[0];
      for (int i = 0; i < 16; i++) ck_rf[1][i] = ck_rf[0][i];
      ck_pc[0] = pend_pc;
      for (int i = 0; i < 16; i++) ck_rf[0][i] = pend_rf[i];
      prev_ckpt_ok = have_ckpt;
      have_ckpt = 1;
    end
    if (ev.rollback)       n_rollback++;
    if (ev.ald_delay)      n_ald_delay++;
    if (ev.ald_elide)      n_ald_elide++;
    if (ev.ald_learn)      n_ald_learn++;
    if (ev.dfl_hit)        n_dfl_hit++;
    if (ev.dfl_learn)      n_dfl_learn++;
    if (ev.dfl_invalidate) n_dfl_inval++;
    if (ev.freq_change)    n_fchange++;
    if (ev.warn_override)  n_warn++;
  end

  // Compare after the restore has been written (one cycle after done).
  logic restore_check = 0;
  always @(posedge clk) begin
    restore_check <= !rst && ev.restore_done && have_ckpt;
    if (!rst && ev.restore_done) n_restore++;
    if (restore_check) begin
      checks++;
      if (pc !== ck_pc[0]) begin
        failures++;
        $display("FAIL restored pc %h expected %h", pc, ck_pc[0]);
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (rf[i] !== ck_rf[0][i]) begin failures++; $display("FAIL restored rf[%0d]", i); end
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  task automatic set_env(int p, int e);
    @(negedge clk);
    p_in = 16'(p);
    e_cap = 16'(e);
  endtask

  task automatic ticks(int n);
    repeat (n) @(posedge clk iff dut.u_timer.tick_o);
    repeat (4) @(negedge clk);
  endtask

  task automatic wait_state(sys_state_e s, int max_cycles);
    int n = 0;
    while (state != s && n < max_cycles) begin @(negedge clk); n++; end
    chk(state == s, $sformatf("reach %s", s.name()));
  endtask

  // Count system-clock edges over a window of reference cycles.
  task automatic check_rate(string what);
    int r = 0;
    freq_code_t c;
    repeat (3) @(negedge clk);
    @(posedge clk);
    c = code;
    fork
      begin repeat (8) @(posedge clk); end
      forever begin @(posedge sys_clk); r++; end
    join_any
    disable fork;
    chk(code == c && r >= 8 * (int'(c) + 1) - 2 && r <= 8 * (int'(c) + 1) + 2,
        $sformatf("%s: %0d system clocks in 8 reference cycles at code %0d", what, r, c));
  endtask

  task automatic power_fail();
    @(negedge clk);
    rst = 1;
    scramble();
    e_cap = 0;
    repeat (4) @(negedge clk);
    rst = 0;
  endtask

  // ---------------- scenario ----------------
  initial begin
    int c0;
    scramble();
    repeat (3) @(negedge clk);
    nv_init = 0;
    rst = 0;
    // cold start
    set_env(5000, 500);
    repeat (5) @(negedge clk);
    chk(state == SYS_OFF, "off with an empty capacitor");
    set_env(5000, 5000);
    wait_state(SYS_RUN, 20);
    chk(!ckpt_valid, "no checkpoint after factory init");
    check_rate("lowest frequency");
    // LinP search with learning: rise while above E_thH, settle, learn
    set_env(5000, 9500);
    ticks(5);
    chk(code == 5, $sformatf("LinP after five timesteps above E_thH: code %0d", code));
    check_rate("LinP");
    chk(vdd > 11'd760, "DVR raised the supply");
    set_env(5000, 8500);
    ticks(1);
    set_env(5000, 7500);
    ticks(1);
    chk(n_dfl_learn == 1 && code == 4, $sformatf("DFL learned code %0d", code));
    // a warning pulls the frequency down
    set_env(500, 7500);
    ticks(1);
    chk(code == 0 && n_warn == 1, "warning override");
    // back above E_thH at the same power: the learned frequency is used at once
    set_env(5000, 9500);
    ticks(1);
    chk(n_dfl_hit == 1 && code == 4, $sformatf("DFL prediction, code %0d", code));
    check_rate("predicted frequency");
    set_env(5000, 8500);
    ticks(1);
    chk(n_dfl_inval == 1, "DFL invalidation on a band change");
    // conventional backup, then restore
    set_env(500, 1900);
    wait_state(SYS_BACKUP, 10);
    wait_state(SYS_HALT, 100);
    scramble();
    set_env(500, 3500);
    wait_state(SYS_RUN, 100);
    // ALD: learn, then defer, then elide
    ald_en = 1;
    set_env(500, 1900);
    wait_state(SYS_BACKUP, 10);
    set_env(500, 2500);                      // left after backup: (2500-1000)/100 = 15
    wait_state(SYS_HALT, 100);
    repeat (2) @(negedge clk);
    chk(n_ald_learn == 1, "ALD learned");
    set_env(500, 3500);
    wait_state(SYS_RUN, 100);
    set_env(500, 1900);
    wait_state(SYS_DELAY, 10);
    c0 = n_backup;
    repeat (20) @(negedge clk);
    chk(state == SYS_DELAY && n_backup == c0, "ALD defers the backup");
    wait_state(SYS_BACKUP, 60);
    wait_state(SYS_HALT, 100);
    set_env(500, 3500);
    wait_state(SYS_RUN, 100);
    set_env(500, 1900);
    wait_state(SYS_DELAY, 10);
    set_env(500, 2500);
    wait_state(SYS_RUN, 60);
    chk(n_ald_elide == 1, "ALD elided a backup");
    // power failure in the middle of a backup: the older checkpoint comes back
    ald_en = 0;
    set_env(500, 1900);
    wait_state(SYS_BACKUP, 10);
    repeat (8) @(negedge clk);
    power_fail();
    // the interrupted image is not a checkpoint: forget it in the scoreboard
    set_env(500, 3500);
    wait_state(SYS_RUN, 100);
    chk(n_rollback == 1, "rollback after an interrupted backup");
    // EBLP and DTT raise the frequency too
    mode = POL_EBLP;
    set_env(5000, 9500);
    ticks(4);
    chk(code == 15, $sformatf("EBLP doubles: code %0d", code));
    check_rate("EBLP");
    mode = POL_DTT;
    set_env(500, 9500);
    ticks(1);
    set_env(7000, 9500);
    ticks(3);
    chk(code == 3, $sformatf("DTT steps: code %0d", code));
    // without DVR the supply is fixed at the top code's value
    dvr_en = 0;
    ticks(1);
    c0 = int'(vdd);
    ticks(1);
    chk(int'(vdd) == c0 && code != 0, "fixed supply without DVR");
    dvr_en = 1;
    // solar timestep
    c0 = n_ticks;
    solar = 1;
    repeat (40 + 2) @(negedge clk);
    chk(n_ticks == c0 + 1, "one solar timestep");
    solar = 0;
    // every mechanism must have happened
    chk(n_backup > 0,     "backup happened");
    chk(n_restore > 0,    "restore happened");
    chk(n_rollback > 0,   "rollback happened");
    chk(n_ald_delay > 0,  "ALD delay happened");
    chk(n_ald_elide > 0,  "ALD elision happened");
    chk(n_ald_learn > 0,  "ALD learning happened");
    chk(n_dfl_hit > 0,    "DFL hit happened");
    chk(n_dfl_learn > 0,  "DFL learning happened");
    chk(n_dfl_inval > 0,  "DFL invalidation happened");
    chk(n_fchange > 0,    "frequency change happened");
    chk(n_warn > 0,       "warning override happened");
    chk(n_linp_up > 0,    "LinP raised the frequency");
    chk(n_eblp_up > 0,    "EBLP raised the frequency");
    chk(n_dtt_up > 0,     "DTT raised the frequency");
    chk(n_vdd_change > 0, "DVR changed the supply");
    $display("mechanisms: backup %0d restore %0d rollback %0d ald_delay %0d ald_elide %0d ald_learn %0d dfl_hit %0d dfl_learn %0d dfl_inval %0d fchange %0d warn %0d linp %0d eblp %0d dtt %0d vdd %0d",
             n_backup, n_restore, n_rollback, n_ald_delay, n_ald_elide, n_ald_learn, n_dfl_hit,
             n_dfl_learn, n_dfl_inval, n_fchange, n_warn, n_linp_up, n_eblp_up, n_dtt_up, n_vdd_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
