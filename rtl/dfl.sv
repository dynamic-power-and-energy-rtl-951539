// dfl: Dynamic Frequency Learning.
//
// Remembers, for each <input power band, stored energy band> pair (10 x 10 =
// 100 entries of 5-bit frequency + valid bit), the frequency the reactive
// policy settled on, so that the next visit to the same pair jumps straight to
// it instead of searching again. It wraps the reactive policy (freq_policy).
// A state machine acts on each timestep in which stored energy is above the
// preferred window (band >= 9):
//   PREDICT   valid entry: load its frequency, enter VALIDATE (hit_o).
//             invalid entry: enter SEARCH for that entry.
//   SEARCH    the reactive policy runs; when it reports a settled frequency
//             that frequency is written to the entry (learn_o), back to PREDICT.
//   VALIDATE  the policy is frozen for val_steps timesteps. If either band
//             changes meanwhile, the entry is invalidated (invalidate_o);
//             either way the machine returns to PREDICT.
// Outside those timesteps, and when dfl_en_i is low, the reactive policy runs
// on its own. The table is nonvolatile: no reset, init_i clears the valid bits.
//
// From the article: table size and entry format, the three states and their
// transitions, the 10..20-step validation window. The validation length per
// policy (VAL_LINP/VAL_EBLP/VAL_DTT) and invalidating on a change of either band
// are this design's choices. Timing: the table is written one cycle after the
// settled pulse; a loaded prediction appears on code_o one cycle after tick_i.
module dfl
  import nvp_pkg::*;
#(
  parameter int unsigned VAL_LINP = 20,
  parameter int unsigned VAL_EBLP = 15,
  parameter int unsigned VAL_DTT  = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       init_i,
  input  logic       tick_i,
  input  logic       dfl_en_i,
  input  policy_e    mode_i,
  input  logic       restart_i,
  input  level_t     p_lvl_i,
  input  level_t     e_lvl_i,
  output freq_code_t code_o,
  output logic       hit_o,          // pulse
  output logic       learn_o,        // pulse
  output logic       invalidate_o    // pulse
);
  typedef enum logic [1:0] {D_PREDICT, D_SEARCH, D_VALIDATE} dfl_state_e;
  localparam int unsigned NENT = NUM_LVL * NUM_LVL;

  dfl_state_e  st;
  freq_code_t  tbl [NENT];
  logic [NENT-1:0] valid;
  logic [6:0]  idx, sidx;
  level_t      sp, se;
  logic [4:0]  vcnt;
  logic        pol_tick, pol_load, settled, above_h;
  freq_code_t  pol_code;

  assign idx     = 7'(p_lvl_i) * 7'd10 + 7'(e_lvl_i);
  assign above_h = (e_lvl_i >= level_t'(LVL_THH));
  assign code_o  = pol_code;

  // The policy gets the timestep except while a prediction is being validated
  // or when this timestep is used for a lookup.
  always_comb begin
    pol_tick = tick_i;
    pol_load = 1'b0;
    if (dfl_en_i) begin
      if (st == D_VALIDATE) pol_tick = 1'b0;
      if (st == D_PREDICT && above_h && tick_i && valid[idx]) begin
        pol_tick = 1'b0;
        pol_load = 1'b1;
      end
    end
  end

  freq_policy u_policy (
    .clk, .rst,
    .tick_i      (pol_tick),
    .mode_i      (mode_i),
    .restart_i   (restart_i),
    .load_i      (pol_load),
    .load_code_i (tbl[idx]),
    .e_lvl_i     (e_lvl_i),
    .code_o      (pol_code),
    .settled_o   (settled),
    .mispred_o   ()
  );

  // Learned frequencies (nonvolatile storage, no reset).
  always_ff @(posedge clk) begin
    if (st == D_SEARCH && settled && dfl_en_i && !rst && !restart_i) tbl[sidx] <= pol_code;
  end

  always_ff @(posedge clk) begin
    if (init_i) begin
      valid <= '0;
    end else if (!rst && dfl_en_i && !restart_i) begin
      if (st == D_SEARCH && settled) valid[sidx] <= 1'b1;
      if (st == D_VALIDATE && tick_i && (p_lvl_i != sp || e_lvl_i != se)) valid[sidx] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || restart_i || !dfl_en_i) begin
      st           <= D_PREDICT;
      sidx         <= '0;
      sp           <= '0;
      se           <= '0;
      vcnt         <= '0;
      hit_o        <= 1'b0;
      learn_o      <= 1'b0;
      invalidate_o <= 1'b0;
    end else begin
      hit_o        <= 1'b0;
      learn_o      <= 1'b0;
      invalidate_o <= 1'b0;
      unique case (st)
        D_PREDICT: if (tick_i && above_h) begin
          sidx <= idx;
          sp   <= p_lvl_i;
          se   <= e_lvl_i;
          if (valid[idx]) begin
            hit_o <= 1'b1;
            unique case (mode_i)
              POL_LINP: vcnt <= 5'(VAL_LINP);
              POL_EBLP: vcnt <= 5'(VAL_EBLP);
              default:  vcnt <= 5'(VAL_DTT);
            endcase
            st <= D_VALIDATE;
          end else begin
            st <= D_SEARCH;
          end
        end
        D_SEARCH: if (settled) begin
          learn_o <= 1'b1;
          st      <= D_PREDICT;
        end
        D_VALIDATE: if (tick_i) begin
          if (p_lvl_i != sp || e_lvl_i != se) begin
            invalidate_o <= 1'b1;
            st           <= D_PREDICT;
          end else if (vcnt <= 5'd1) begin
            st <= D_PREDICT;
          end else begin
            vcnt <= vcnt - 1'b1;
          end
        end
        default: st <= D_PREDICT;
      endcase
    end
  end
endmodule
