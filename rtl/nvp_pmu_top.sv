// nvp_pmu_top: power management unit of an energy-harvesting nonvolatile
// processor (NVP).
//
// The NVP runs from a storage capacitor charged by an energy harvester. This
// unit decides, from the sampled input power and stored energy, how fast (and
// at which voltage) the processor runs, when its state is saved to nonvolatile
// storage and when it is restored:
//   * level detectors turn the samples into 10-level bands: stored energy in
//     tenths of capacity, input power in tenths of the operating threshold
//     p_th (used by the ALD below it) and in tenths of p_max (used by the
//     frequency learning table above it);
//   * epu (with ald) runs the system state, forces the lowest frequency on a
//     power warning, and starts backups, deferring them by learned counts;
//   * bru + nvm_backup save and restore the PC and register file into a
//     double-buffered checkpoint with atomic valid flags;
//   * cvu (with dfl and freq_policy) picks frequency and supply voltage once
//     per timestep from policy_timer;
//   * clk_select switches the processor clock among the N_CLK candidate clocks
//     glitch-free and gates it.
// The processor core, the oscillators and the analog front end are outside:
// their signals are ports. PMU logic runs on clk, the always-on reference
// clock (32 kHz assumed). Processor handshakes (finish B/R) are taken as
// synchronous to clk; instr_tgl_i toggles once per retired instruction and is
// synchronised here.
module nvp_pmu_top
  import nvp_pkg::*;
#(
  parameter int unsigned N_CLK        = 32,
  parameter int unsigned RF_CYCLES    = 6400,
  parameter int unsigned SOLAR_CYCLES = 32000,
  parameter int unsigned PC_WORDS     = 2,
  parameter int unsigned RF_WORDS     = 16,
  parameter int unsigned EW           = 16,
  localparam int unsigned AW          = $clog2(PC_WORDS + RF_WORDS)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                nv_init_i,     // factory clear of all nonvolatile flags/tables
  // configuration
  input  logic                solar_i,
  input  policy_e             mode_i,
  input  logic                ald_en_i,
  input  logic                dfl_en_i,
  input  logic                dvr_en_i,
  input  logic [EW-1:0]       p_th_i,        // operating power threshold (warning below)
  input  logic [EW-1:0]       p_max_i,
  input  logic [EW-1:0]       e_full_i,      // capacitor capacity
  input  logic [EW-1:0]       e_back_i,      // backup threshold
  input  logic [EW-1:0]       e_resume_i,    // restart threshold
  input  logic [EW-1:0]       e_min_i,       // dead level
  input  logic [EW-1:0]       epi_i,         // conservative energy per instruction
  // sensing (from the analog detectors)
  input  logic [EW-1:0]       p_in_i,
  input  logic [EW-1:0]       e_cap_i,
  // clocks (from oscillators and dividers), index = frequency code
  input  logic [N_CLK-1:0]    clk_in_i,
  output logic                sys_clk_o,
  output freq_code_t          freq_code_o,
  output logic [10:0]         vdd_mv_o,      // LDO target
  // processor backup interface
  input  logic                instr_tgl_i,
  input  logic [8*PC_WORDS-1:0] pc_i,
  input  logic [7:0]          rf_rdata_i,
  output logic [AW-1:0]       br_addr_o,
  output logic                br_restore_o,
  output logic                pc_start_br_o,
  input  logic                pc_finish_br_i,
  output logic                rf_start_br_o,
  input  logic                rf_finish_br_i,
  output logic                pc_ld_o,
  output logic [7:0]          pc_byte_o,
  output logic                rf_we_o,
  output logic [7:0]          rf_byte_o,
  // status
  output sys_state_e          state_o,
  output logic                ckpt_valid_o,
  output pmu_events_t         ev_o
);
  localparam int unsigned NTHR = NUM_LVL - 1;

  // ---------------- detectors ----------------
  logic [NTHR-1:0][EW-1:0] thr_e, thr_pa, thr_pd;
  level_t e_lvl, pa_lvl, pd_lvl;
  logic   warn;

  always_comb begin
    for (int k = 0; k < NTHR; k++) begin
      thr_e[k]  = EW'((32'(e_full_i) * (k + 1)) / 10);
      thr_pa[k] = EW'((32'(p_th_i)   * (k + 1)) / 10);
      thr_pd[k] = EW'((32'(p_max_i)  * (k + 1)) / 10);
    end
  end

  level_detector #(.W(EW), .NTHR(NTHR)) u_det_e  (.value_i(e_cap_i), .thr_i(thr_e),  .level_o(e_lvl),  .therm_o());
  level_detector #(.W(EW), .NTHR(NTHR)) u_det_pa (.value_i(p_in_i),  .thr_i(thr_pa), .level_o(pa_lvl), .therm_o());
  level_detector #(.W(EW), .NTHR(NTHR)) u_det_pd (.value_i(p_in_i),  .thr_i(thr_pd), .level_o(pd_lvl), .therm_o());

  assign warn = (p_in_i < p_th_i);

  // ---------------- timestep ----------------
  logic tick;
  policy_timer #(.RF_CYCLES(RF_CYCLES), .SOLAR_CYCLES(SOLAR_CYCLES)) u_timer (
    .clk, .rst, .solar_i, .tick_o(tick)
  );

  // ---------------- retired-instruction synchroniser ----------------
  logic [2:0] tgl_sync;
  logic       instr_ret;
  always_ff @(posedge clk) begin
    if (rst) tgl_sync <= '0;
    else     tgl_sync <= {tgl_sync[1:0], instr_tgl_i};
  end
  assign instr_ret = tgl_sync[2] ^ tgl_sync[1];

  // ---------------- energy policy unit ----------------
  logic bru_backup, bru_restore, bru_done, cpu_clk_en, freq_min;
  epu #(.EW(EW), .CNT_W(16)) u_epu (
    .clk, .rst,
    .init_i          (nv_init_i),
    .ald_en_i,
    .warn_i          (warn),
    .p_lvl_i         (pa_lvl),
    .e_cap_i, .e_back_i, .e_resume_i, .e_min_i, .epi_i,
    .instr_ret_i     (instr_ret),
    .bru_backup_o    (bru_backup),
    .bru_restore_o   (bru_restore),
    .bru_done_i      (bru_done),
    .state_o         (state_o),
    .cpu_clk_en_o    (cpu_clk_en),
    .freq_min_o      (freq_min),
    .warn_override_o (ev_o.warn_override),
    .ald_delay_o     (ev_o.ald_delay),
    .ald_elide_o     (ev_o.ald_elide),
    .ald_learn_o     (ev_o.ald_learn)
  );

  // ---------------- backup and recovery ----------------
  logic          nvm_we, nvm_slot, sel1, sel2;
  logic          v_we, v_slot, v_val, n_we, n_val, newest;
  logic [1:0]    valid_rb;
  logic [AW-1:0] addr;

  bru #(.PC_WORDS(PC_WORDS), .RF_WORDS(RF_WORDS)) u_bru (
    .clk, .rst,
    .backup_i       (bru_backup),
    .restore_i      (bru_restore),
    .busy_o         (),
    .done_o         (bru_done),
    .rollback_o     (ev_o.rollback),
    .ckpt_valid_o   (ckpt_valid_o),
    .restore_dir_o  (br_restore_o),
    .pc_start_br_o, .pc_finish_br_i, .rf_start_br_o, .rf_finish_br_i,
    .pc_ld_o, .rf_we_o,
    .nvm_we_o       (nvm_we),
    .nvm_slot_o     (nvm_slot),
    .addr_o         (addr),
    .sel1_o         (sel1),
    .sel2_o         (sel2),
    .valid_we_o     (v_we),
    .valid_slot_o   (v_slot),
    .valid_val_o    (v_val),
    .newest_we_o    (n_we),
    .newest_val_o   (n_val),
    .valid_rb_i     (valid_rb),
    .newest_rb_i    (newest)
  );

  nvm_backup #(.PC_WORDS(PC_WORDS), .RF_WORDS(RF_WORDS)) u_nvm (
    .clk,
    .we_i         (nvm_we),
    .slot_i       (nvm_slot),
    .addr_i       (addr),
    .sel1_i       (sel1),
    .pc_i         (pc_i),
    .rf_rdata_i   (rf_rdata_i),
    .sel2_i       (sel2),
    .to_pc_o      (pc_byte_o),
    .to_rf_o      (rf_byte_o),
    .init_i       (nv_init_i),
    .valid_we_i   (v_we),
    .valid_slot_i (v_slot),
    .valid_val_i  (v_val),
    .newest_we_i  (n_we),
    .newest_val_i (n_val),
    .valid_o      (valid_rb),
    .newest_o     (newest)
  );

  assign br_addr_o          = addr;
  assign ev_o.backup_done   = bru_done && !br_restore_o;
  assign ev_o.restore_done  = bru_done && br_restore_o;

  // ---------------- clock and voltage ----------------
  logic gate_en;
  cvu u_cvu (
    .clk, .rst,
    .init_i           (nv_init_i),
    .tick_i           (tick),
    .mode_i, .dfl_en_i, .dvr_en_i,
    .p_lvl_i          (pd_lvl),
    .e_lvl_i          (e_lvl),
    .freq_min_i       (freq_min),
    .cpu_clk_en_i     (cpu_clk_en),
    .freq_code_o      (freq_code_o),
    .vdd_mv_o         (vdd_mv_o),
    .gate_en_o        (gate_en),
    .freq_change_o    (ev_o.freq_change),
    .dfl_hit_o        (ev_o.dfl_hit),
    .dfl_learn_o      (ev_o.dfl_learn),
    .dfl_invalidate_o (ev_o.dfl_invalidate)
  );

  clk_select #(.N(N_CLK)) u_clksel (
    .rst_n     (!rst),
    .clk_i     (clk_in_i),
    .sel_i     (($clog2(N_CLK))'(freq_code_o)),
    .gate_en_i (gate_en),
    .sys_clk_o (sys_clk_o),
    .active_o  ()
  );
endmodule
