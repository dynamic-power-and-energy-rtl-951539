// epu: Energy Policy Unit.
//
// Watches the input-power warning and the stored energy and runs the system
// power state (nvp_pkg::sys_state_e):
//   OFF/HALT --(energy > resume threshold)--> RESTORE --(BRU done)--> RUN
//   RUN --(energy <= backup threshold)--> DELAY --(ALD says back up)--> BACKUP
//   DELAY --(ALD: energy restored, backup elided)--> RUN
//   BACKUP --(BRU done)--> HALT
// While the warning is raised (input power below its threshold), and in every
// state but RUN, freq_min_o overrides the frequency policy with the lowest
// frequency, stretching the stored energy in the hope that the power dip is
// short. The Adaptive Learning Detection unit (ald) decides how long a backup
// may be deferred; with ald_en_i low the backup starts at the emergency, as in
// a conventional single-threshold system. The processor clock is enabled in
// RUN and DELAY only.
//
// From the article: the warning override to the lowest frequency, the backup
// trigger at a critical energy level, the ALD, and holding the processor until
// enough energy for a backup is stored. The resume threshold (hysteresis above
// the backup threshold) and the exact state sequence are this design's choices.
module epu
  import nvp_pkg::*;
#(
  parameter int unsigned EW    = 16,
  parameter int unsigned CNT_W = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           init_i,        // factory initialisation of the ALD table
  input  logic           ald_en_i,
  input  logic           warn_i,        // input power below its threshold
  input  logic [3:0]     p_lvl_i,       // input power band, 10 % .. 100 % of the threshold
  input  logic [EW-1:0]  e_cap_i,
  input  logic [EW-1:0]  e_back_i,
  input  logic [EW-1:0]  e_resume_i,
  input  logic [EW-1:0]  e_min_i,
  input  logic [EW-1:0]  epi_i,
  input  logic           instr_ret_i,
  // backup and recovery unit
  output logic           bru_backup_o,
  output logic           bru_restore_o,
  input  logic           bru_done_i,
  // to the clock/voltage unit and the processor
  output sys_state_e     state_o,
  output logic           cpu_clk_en_o,
  output logic           freq_min_o,
  output logic           warn_override_o, // pulse: warning took over the frequency
  output logic           ald_delay_o,     // pulse
  output logic           ald_elide_o,     // pulse
  output logic           ald_learn_o      // pulse
);
  sys_state_e st;
  logic       emergency, ald_start, warn_q;

  assign state_o      = st;
  assign cpu_clk_en_o = (st == SYS_RUN) || (st == SYS_DELAY);
  assign freq_min_o   = warn_i || (st != SYS_RUN);
  assign emergency    = (st == SYS_RUN) && (e_cap_i <= e_back_i) && ald_en_i;

  ald #(.NENT(10), .CNT_W(CNT_W), .EW(EW)) u_ald (
    .clk, .rst, .init_i,
    .emergency_i   (emergency),
    .p_lvl_i       (p_lvl_i),
    .instr_ret_i   (instr_ret_i),
    .e_cap_i, .e_back_i, .e_min_i, .epi_i,
    .backup_done_i (bru_done_i && st == SYS_BACKUP),
    .start_backup_o(ald_start),
    .delay_o       (),
    .delay_start_o (ald_delay_o),
    .elide_o       (ald_elide_o),
    .learn_o       (ald_learn_o),
    .read_n_o      ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st              <= SYS_OFF;
      bru_backup_o    <= 1'b0;
      bru_restore_o   <= 1'b0;
      warn_q          <= 1'b0;
      warn_override_o <= 1'b0;
    end else begin
      bru_backup_o    <= 1'b0;
      bru_restore_o   <= 1'b0;
      warn_q          <= warn_i;
      warn_override_o <= warn_i && !warn_q && (st == SYS_RUN);
      unique case (st)
        SYS_OFF, SYS_HALT: if (e_cap_i > e_resume_i) begin
          bru_restore_o <= 1'b1;
          st            <= SYS_RESTORE;
        end
        SYS_RESTORE: if (bru_done_i) st <= SYS_RUN;
        SYS_RUN: if (e_cap_i <= e_back_i) begin
          if (ald_en_i) begin
            st <= SYS_DELAY;
          end else begin
            bru_backup_o <= 1'b1;
            st           <= SYS_BACKUP;
          end
        end
        SYS_DELAY: begin
          if (ald_start) begin
            bru_backup_o <= 1'b1;
            st           <= SYS_BACKUP;
          end else if (ald_elide_o) begin
            st <= SYS_RUN;
          end
        end
        SYS_BACKUP: if (bru_done_i) st <= SYS_HALT;
        default: st <= SYS_OFF;
      endcase
    end
  end
endmodule
