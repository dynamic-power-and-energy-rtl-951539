// ald: Adaptive Learning Detection.
//
// Decides when the backup is actually started once stored energy has fallen to
// the backup threshold (an "emergency"). A table of NENT learned instruction
// counts, indexed by the input-power band at the time of the emergency, says
// how many more instructions can safely run before backing up.
//   * Entry invalid: backup starts at once. When it has finished, the energy
//     left above the minimum operating energy (e_cap_i - e_min_i) is divided by
//     a conservative per-instruction energy (epi_i); the quotient is stored and
//     the entry marked valid (learn_o).
//   * Entry valid: the entry is first marked invalid, then the backup is held
//     back while N instructions retire (delay_o). At the end, if stored energy
//     is above the backup threshold again, no backup is made (elide_o);
//     otherwise the backup starts. Either way the entry becomes valid again
//     (after the backup has completed, in the second case).
// Table and valid bits are nonvolatile (no reset; init_i clears the valid
// bits): if power dies during the delay or the backup, the entry stays invalid,
// which removes a prediction that turned out too aggressive.
//
// From the article: the 10-entry table indexed by 10 power levels, the
// learn/delay/elide/invalidate rules. The count width, the instruction-retire
// interface and the divider-based cost model are this design's choices. The
// quotient is computed by a combinational divider and saturates at 2^CNT_W-1.
// Timing: start_backup_o is a one-cycle pulse, one cycle after emergency_i for
// an invalid entry, one cycle after the N-th retired instruction otherwise.
module ald #(
  parameter int unsigned NENT  = 10,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned EW    = 16,
  localparam int unsigned IW   = $clog2(NENT)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             init_i,
  input  logic             emergency_i,   // pulse: stored energy reached the backup threshold
  input  logic [IW-1:0]    p_lvl_i,       // input power band (below the operating threshold)
  input  logic             instr_ret_i,   // one instruction retired
  input  logic [EW-1:0]    e_cap_i,       // stored energy sample
  input  logic [EW-1:0]    e_back_i,      // backup threshold
  input  logic [EW-1:0]    e_min_i,       // energy below which the processor stops working
  input  logic [EW-1:0]    epi_i,         // conservative energy per instruction
  input  logic             backup_done_i,
  output logic             start_backup_o,
  output logic             delay_o,       // currently running the extra instructions
  output logic             delay_start_o, // pulse
  output logic             elide_o,       // pulse
  output logic             learn_o,       // pulse
  output logic [CNT_W-1:0] read_n_o       // count read for the current emergency
);
  typedef enum logic [1:0] {A_IDLE, A_DELAY, A_WAIT_BK, A_LEARN} ald_state_e;

  ald_state_e       st;
  logic [CNT_W-1:0] tbl [NENT];
  logic [NENT-1:0]  valid;
  logic [IW-1:0]    idx;
  logic [CNT_W-1:0] n, cnt;
  logic [EW-1:0]    surplus, quot;
  logic             tbl_we;
  logic [CNT_W-1:0] tbl_wdata;

  assign delay_o  = (st == A_DELAY);
  assign read_n_o = n;

  // Conservative count: remaining usable energy / energy per instruction.
  always_comb begin
    surplus = (e_cap_i > e_min_i) ? e_cap_i - e_min_i : '0;
    quot    = (epi_i == '0) ? '0 : surplus / epi_i;
    if (EW > CNT_W && (quot >> CNT_W) != '0) tbl_wdata = '1;
    else                                     tbl_wdata = CNT_W'(quot);
    tbl_we = (st == A_LEARN) && backup_done_i;
  end

  // Table (nonvolatile storage, no reset).
  always_ff @(posedge clk) begin
    if (tbl_we) tbl[idx] <= tbl_wdata;
  end

  // Valid bits (nonvolatile: only init_i clears them).
  always_ff @(posedge clk) begin
    if (init_i) begin
      valid <= '0;
    end else if (!rst) begin
      if (st == A_IDLE && emergency_i && valid[p_lvl_i]) valid[p_lvl_i] <= 1'b0;
      if (tbl_we) valid[idx] <= 1'b1;
      if (st == A_WAIT_BK && backup_done_i) valid[idx] <= 1'b1;
      if (st == A_DELAY && cnt == n && e_cap_i > e_back_i) valid[idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st             <= A_IDLE;
      idx            <= '0;
      n              <= '0;
      cnt            <= '0;
      start_backup_o <= 1'b0;
      delay_start_o  <= 1'b0;
      elide_o        <= 1'b0;
      learn_o        <= 1'b0;
    end else begin
      start_backup_o <= 1'b0;
      delay_start_o  <= 1'b0;
      elide_o        <= 1'b0;
      learn_o        <= 1'b0;
      unique case (st)
        A_IDLE: if (emergency_i) begin
          idx <= p_lvl_i;
          cnt <= '0;
          if (valid[p_lvl_i]) begin
            n             <= tbl[p_lvl_i];
            delay_start_o <= 1'b1;
            st            <= A_DELAY;
          end else begin
            n              <= '0;
            start_backup_o <= 1'b1;
            st             <= A_LEARN;
          end
        end
        A_DELAY: begin
          if (cnt == n) begin
            if (e_cap_i > e_back_i) begin
              elide_o <= 1'b1;
              st      <= A_IDLE;
            end else begin
              start_backup_o <= 1'b1;
              st             <= A_WAIT_BK;
            end
          end else if (instr_ret_i) begin
            cnt <= cnt + 1'b1;
          end
        end
        A_WAIT_BK: if (backup_done_i) st <= A_IDLE;
        A_LEARN: if (backup_done_i) begin
          learn_o <= 1'b1;
          st      <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
