// tb_nvp_pmu_trace: closed-loop workload test of the power management unit.
//
// The testbench models the storage capacitor and the processor's consumption,
// so the unit's frequency choices feed back into the stored energy it sees.
// Each reference cycle the capacitor gains p_in/100 units and loses 4 units per
// system-clock edge (dynamic energy) plus 20 units while the processor clock
// runs (static energy) or while a backup or restore is moving data. It is
// clamped at capacity; what the clamp throws away is counted as wasted. A
// power failure happens when a running, backing-up or restoring system falls
// below e_min: the unit is reset and the processor state is scrambled.
//
// The input is a generated piecewise-constant power trace in the style of an
// RF harvesting trace: segments of 5 to 40 timesteps, alternating between a
// strong level (5000 to 16000) and a weak one (0 to 2000, below the
// warning threshold). Timesteps are 16 reference
// cycles instead of 6400; the energy scale is chosen so a timestep at the top
// frequency spends about 20 % of capacity.
//
// A second input is a solar day with 1 s timesteps shortened to 40 reference
// cycles: a half-sine with cloudy segments at a quarter of the power. It is
// run at the lowest frequency and with DTT+ALD+DFL.
//
// The same RF trace is run under several policy combinations:
//   baseline   lowest frequency always, conventional backup
//   LinP/EBLP/DTT with ALD, without and with the learning table
//   LinP+ALD+DFL on a second trace after training on the first, with the table
//   kept (no factory clear in between)
// Checked: every restore brings back the last committed checkpoint; each
// policy combination retires more instructions and wastes less harvested
// energy than the baseline; the trained learning table makes predictions on
// the new trace; backups, restores and warnings happen. A summary line per
// run reports instructions, backups, rollbacks, power failures and waste.
// DVR is enabled but its effect on energy is not modelled.
module tb_nvp_pmu_trace;
  import nvp_pkg::*;
  localparam int  NCLK     = 32;
  localparam real REF_HALF = 15625.0;   // 32 kHz reference, in ns
  localparam int  TICK     = 16;        // reference cycles per timestep
  localparam int  T        = 400;       // timesteps per run
  localparam int  STICK    = 40;        // reference cycles per solar timestep
  localparam int  TS       = 160;       // solar timesteps per run
  localparam int  NCFG     = 11;
  localparam int  E_FULL   = 10000;

  logic clk = 0, nv_init = 1, force_rst = 1, rst;
  logic solar = 0, ald_en = 0, dfl_en = 0, dvr_en = 1;
  policy_e mode = POL_LINP;
  logic [15:0] p_th = 2400, p_max = 16000, e_full = 16'(E_FULL), e_back = 2000,
               e_resume = 3000, e_min = 1000, epi = 60, p_in = 0, e_cap = 0;
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

  nvp_pmu_top #(.RF_CYCLES(TICK), .SOLAR_CYCLES(STICK)) dut (
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
  int   edges = 0;     // system-clock edges since the last energy update
  int   instr = 0;     // instructions retired in the current run
  always @(posedge sys_clk) begin
    edges++;
    phase <= !phase;
    if (phase) begin
      instr++;
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

  // ---------------- capacitor model ----------------
  int  energy = 0, wasted = 0, pf_hold = 0, n_pfail = 0;
  bit  powered;
  assign rst = force_rst || (pf_hold > 0);
  assign powered = (state == SYS_RUN || state == SYS_DELAY || state == SYS_BACKUP ||
                    state == SYS_RESTORE);
  sys_state_e state_q = SYS_OFF;

  always @(negedge clk) begin
    int cost;
    cost = 4 * edges + ((state == SYS_RUN || state == SYS_DELAY || state == SYS_BACKUP ||
                         state == SYS_RESTORE) && !rst ? 20 : 0);
    edges = 0;
    energy = energy + int'(p_in) / 100 - cost;
    if (energy > E_FULL) begin
      wasted += energy - E_FULL;
      energy = E_FULL;
    end
    if (energy < 0) energy = 0;
    if (pf_hold > 0) pf_hold--;
    else if (!force_rst && powered && energy < int'(e_min)) begin
      n_pfail++;
      pf_hold = 4;
      scramble();
    end
    // the processor is off while halted: its volatile state is lost
    if (state == SYS_HALT && state_q != SYS_HALT) scramble();
    state_q = state;
    e_cap = 16'(energy);
  end

  // ---------------- checkpoint scoreboard ----------------
  int checks = 0, failures = 0;
  int n_backup = 0, n_restore = 0, n_rollback = 0, n_ald_delay = 0, n_ald_elide = 0,
      n_dfl_hit = 0, n_dfl_learn = 0, n_warn = 0;
  logic [15:0] ck_pc, pend_pc;
  logic [7:0]  ck_rf [16];
  logic [7:0]  pend_rf [16];
  logic        have_ckpt = 0, restore_check = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (pc_start && !br_restore && !pc_fin) begin
      pend_pc = pc;
      for (int i = 0; i < 16; i++) pend_rf[i] = rf[i];
    end
    if (ev.backup_done) begin
      n_backup++;
      ck_pc = pend_pc;
      for (int i = 0; i < 16; i++) ck_rf[i] = pend_rf[i];
      have_ckpt = 1;
    end
    if (ev.restore_done)  n_restore++;
    if (ev.rollback)      n_rollback++;
    if (ev.ald_delay)     n_ald_delay++;
    if (ev.ald_elide)     n_ald_elide++;
    if (ev.dfl_hit)       n_dfl_hit++;
    if (ev.dfl_learn)     n_dfl_learn++;
    if (ev.warn_override) n_warn++;
  end

  always @(posedge clk) begin
    restore_check <= !rst && ev.restore_done && have_ckpt;
    if (restore_check) begin
      logic ok;
      ok = (pc === ck_pc);
      for (int i = 0; i < 16; i++) if (rf[i] !== ck_rf[i]) ok = 0;
      chk(ok, $sformatf("restored state differs from the last checkpoint (pc %h, expected %h)",
                        pc, ck_pc));
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat ((NCFG - 2) * (T * TICK + 40) + 2 * (TS * STICK + 40) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- traces ----------------
  int trace [3][T];
  int levels [8] = '{0, 500, 1000, 2000, 5000, 8000, 12000, 16000};

  task automatic make_trace(int which);
    int t = 0, len, lvl;
    bit hi = 1, first = 1;
    while (t < T) begin
      len = 5 + int'($urandom_range(35));
      lvl = hi ? levels[4 + int'($urandom_range(3))] : levels[int'($urandom_range(3))];
      // the first weak segment is a long outage, so every run backs up
      if (!hi && first) begin lvl = 0; len = 40; first = 0; end
      for (int i = 0; i < len && t < T; i++) trace[which][t++] = lvl;
      hi = !hi;
    end
  endtask

  // A day of solar input: a half-sine from dawn to dusk with cloudy segments
  // of 3 to 15 timesteps at a quarter of the clear-sky power.
  task automatic make_solar_trace(int which);
    int t = 0, len;
    bit cloudy = 0;
    while (t < TS) begin
      len = 3 + int'($urandom_range(12));
      for (int i = 0; i < len && t < TS; i++) begin
        trace[which][t] = int'(16000.0 * $sin(3.14159265 * real'(t) / real'(TS)));
        if (cloudy) trace[which][t] = trace[which][t] / 4;
        t++;
      end
      cloudy = !cloudy && ($urandom_range(1) == 1);
    end
  endtask

  // ---------------- runs ----------------
  int r_instr [NCFG], r_waste [NCFG], r_backup [NCFG], r_rollback [NCFG], r_pfail [NCFG],
      r_hit [NCFG], r_delay [NCFG], r_elide [NCFG], r_warn [NCFG], r_restore [NCFG];
  string r_name [NCFG];

  task automatic run(int id, string name, policy_e m, bit ald, bit dfl, bit base, int tr,
                     bit clear, bit sol = 0);
    @(negedge clk);
    force_rst = 1;
    nv_init   = clear;
    mode      = m;
    ald_en    = ald;
    dfl_en    = dfl;
    p_th      = base ? 16'hFFFF : 16'd2400;
    solar     = sol;
    repeat (3) @(negedge clk);
    energy = 0; wasted = 0; instr = 0; n_pfail = 0;
    n_backup = 0; n_restore = 0; n_rollback = 0; n_ald_delay = 0; n_ald_elide = 0;
    n_dfl_hit = 0; n_dfl_learn = 0; n_warn = 0;
    if (clear) have_ckpt = 0;
    scramble();
    nv_init   = 0;
    force_rst = 0;
    for (int t = 0; t < (sol ? TS : T); t++) begin
      p_in = 16'(trace[tr][t]);
      repeat (sol ? STICK : TICK) @(negedge clk);
    end
    r_name[id] = name;       r_instr[id] = instr;       r_waste[id] = wasted;
    r_backup[id] = n_backup; r_rollback[id] = n_rollback; r_pfail[id] = n_pfail;
    r_hit[id] = n_dfl_hit;   r_delay[id] = n_ald_delay; r_elide[id] = n_ald_elide;
    r_warn[id] = n_warn;     r_restore[id] = n_restore;
    $display("%-22s instr %7d  backups %3d  restores %3d  rollbacks %2d  power failures %2d  ald delay %3d elide %3d  dfl learn %3d hits %3d  wasted %8d",
             name, instr, n_backup, n_restore, n_rollback, n_pfail, n_ald_delay, n_ald_elide,
             n_dfl_learn, n_dfl_hit, wasted);
  endtask

  initial begin
    scramble();
    make_trace(0);
    make_trace(1);
    make_solar_trace(2);
    run(0, "baseline (lowest f)", POL_LINP, 0, 0, 1, 0, 1);
    run(1, "LinP+ALD",            POL_LINP, 1, 0, 0, 0, 1);
    run(2, "EBLP+ALD",            POL_EBLP, 1, 0, 0, 0, 1);
    run(3, "DTT+ALD",             POL_DTT,  1, 0, 0, 0, 1);
    run(4, "LinP+ALD+DFL",        POL_LINP, 1, 1, 0, 0, 1);
    run(5, "EBLP+ALD+DFL",        POL_EBLP, 1, 1, 0, 0, 1);
    run(6, "DTT+ALD+DFL",         POL_DTT,  1, 1, 0, 0, 1);
    run(7, "LinP+ALD+DFL train",  POL_LINP, 1, 1, 0, 1, 1);
    run(8, "LinP+ALD+DFL test",   POL_LINP, 1, 1, 0, 0, 0);
    run(9, "solar baseline",      POL_LINP, 0, 0, 1, 2, 1, 1);
    run(10, "solar DTT+ALD+DFL",  POL_DTT,  1, 1, 0, 2, 1, 1);
    chk(r_instr[10] > r_instr[9],
        $sformatf("solar: the policies retire more instructions than the baseline (%0d vs %0d)",
                  r_instr[10], r_instr[9]));
    chk(r_waste[10] < r_waste[9], "solar: the policies waste less energy than the baseline");
    for (int i = 1; i < 9; i++) begin
      chk(r_instr[i] > r_instr[0],
          $sformatf("%s retires more instructions than the baseline (%0d vs %0d)",
                    r_name[i], r_instr[i], r_instr[0]));
      chk(r_waste[i] < r_waste[0],
          $sformatf("%s wastes less energy than the baseline (%0d vs %0d)",
                    r_name[i], r_waste[i], r_waste[0]));
    end
    chk(r_hit[8] > 0, "the trained table predicts on a new trace");
    chk(r_backup[0] > 0 && r_restore[0] > 0, "baseline backs up and restores");
    chk(r_warn[1] > 0, "warnings override the policy");
    chk(r_delay[1] + r_delay[2] + r_delay[3] > 0, "ALD defers backups");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
