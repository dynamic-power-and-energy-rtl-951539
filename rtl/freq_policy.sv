// freq_policy: reactive dynamic-frequency-scaling policies.
//
// Once per timestep (tick_i) the policy looks at the stored-energy band and
// moves the frequency code. All policies start at the lowest frequency and only
// become active once stored energy is above E_thH (band >= 9, i.e. > 90 %); the
// thresholds E_thH/E_thM/E_thL are the 90/80/70 % band edges of nvp_pkg.
//  LinP  E > E_thH: one step up. Energy falling through E_thH (first
//        misprediction): hold. Falling through E_thM (second misprediction):
//        one step down, then hold. Below E_thL: one step down per timestep.
//  EBLP  E > E_thH: the scaled frequency s = code+1 doubles. At the first
//        misprediction (falling through E_thH) s_over = s is kept and s drops to
//        the minimum; it then doubles again up to s_over/2 and from there rises
//        one step per timestep. The second misprediction steps down once; from
//        then on it behaves like LinP.
//  DTT   rises one step per timestep; falling through E_thH turns the
//        direction down, rising through E_thL turns it up again, so the
//        frequency oscillates around the point where consumption matches input.
// settled_o pulses when the policy has found a stable frequency: LinP's and
// EBLP's second misprediction, and every upward DTT turn that follows a
// downward one. restart_i (lowest frequency forced by the energy policy unit)
// returns the policy to its initial state. load_i sets the code directly (a
// learned prediction) and leaves the
// policy in its tracking state.
//
// The three policies, their thresholds and steps follow the article; the
// per-step decrease below E_thL, the exact crossing conditions and the DTT
// turn points are this design's reading of it. Timing: code_o changes one
// cycle after tick_i.
module freq_policy
  import nvp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tick_i,
  input  policy_e    mode_i,
  input  logic       restart_i,
  input  logic       load_i,
  input  freq_code_t load_code_i,
  input  level_t     e_lvl_i,
  output freq_code_t code_o,
  output logic       settled_o,
  output logic       mispred_o     // pulse: a misprediction/turn was detected
);
  typedef enum logic [1:0] {PH_EXP1, PH_EXP2, PH_LIN} eblp_phase_e;

  localparam int unsigned SMAX = NUM_FREQ;   // highest scaled frequency

  logic        active, above_h, above_m, above_l, prev_h, prev_m, prev_l;
  logic        dir_up, turned_down;
  eblp_phase_e phase;
  logic [6:0]  s, s_over, s_next, s_half;

  assign above_h = (e_lvl_i >= level_t'(LVL_THH));
  assign above_m = (e_lvl_i >= level_t'(LVL_THM));
  assign above_l = (e_lvl_i >= level_t'(LVL_THL));
  assign s       = {2'b00, code_o} + 7'd1;
  assign s_half  = s_over >> 1;

  function automatic freq_code_t to_code(logic [6:0] sv);
    if (sv > 7'(SMAX)) return freq_code_t'(SMAX - 1);
    if (sv == 0)       return '0;
    return freq_code_t'(sv - 7'd1);
  endfunction

  function automatic freq_code_t dec(freq_code_t c);
    return (c == '0) ? '0 : c - 1'b1;
  endfunction

  // EBLP increase step.
  always_comb begin
    unique case (phase)
      PH_EXP1: s_next = s << 1;
      PH_EXP2: s_next = ((s << 1) > s_half) ? ((s < s_half) ? s_half : s + 7'd1) : s << 1;
      default: s_next = s + 7'd1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || restart_i) begin
      code_o      <= '0;
      active      <= 1'b0;
      prev_h      <= 1'b0;
      prev_m      <= 1'b0;
      prev_l      <= 1'b0;
      dir_up      <= 1'b1;
      turned_down <= 1'b0;
      phase       <= PH_EXP1;
      s_over      <= 7'(SMAX);
      settled_o   <= 1'b0;
      mispred_o   <= 1'b0;
    end else begin
      settled_o <= 1'b0;
      mispred_o <= 1'b0;
      if (load_i) begin
        code_o      <= load_code_i;
        active      <= 1'b1;
        phase       <= PH_LIN;
        dir_up      <= 1'b1;
        turned_down <= 1'b0;
        prev_h      <= above_h;
        prev_m      <= above_m;
        prev_l      <= above_l;
      end else if (tick_i) begin
        prev_h <= above_h;
        prev_m <= above_m;
        prev_l <= above_l;
        if (!active) begin
          if (above_h) begin
            active <= 1'b1;
            code_o <= (mode_i == POL_EBLP) ? to_code(s << 1) : code_o + 1'b1;
          end
        end else begin
          unique case (mode_i)
            POL_LINP: begin
              if (above_h) begin
                code_o <= to_code(s + 7'd1);
              end else if (prev_h) begin
                mispred_o <= 1'b1;                 // first misprediction: hold
              end else if (!above_m && prev_m) begin
                code_o    <= dec(code_o);          // second misprediction
                mispred_o <= 1'b1;
                settled_o <= 1'b1;
              end else if (!above_l) begin
                code_o <= dec(code_o);
              end
            end
            POL_EBLP: begin
              if (above_h) begin
                code_o <= to_code(s_next);
                if (phase == PH_EXP2 && (s << 1) > s_half) phase <= PH_LIN;
              end else if (prev_h) begin
                mispred_o <= 1'b1;
                if (phase == PH_LIN) begin
                  code_o    <= dec(code_o);        // second misprediction
                  settled_o <= 1'b1;
                end else begin
                  s_over <= s;                     // first misprediction
                  code_o <= '0;
                  phase  <= PH_EXP2;
                end
              end else if (phase == PH_LIN && !above_m && prev_m) begin
                code_o <= dec(code_o);
              end else if (!above_l) begin
                code_o <= dec(code_o);
              end
            end
            default: begin                          // POL_DTT
              if (!above_h && prev_h) begin
                dir_up      <= 1'b0;
                turned_down <= 1'b1;
                mispred_o   <= 1'b1;
                code_o      <= dec(code_o);
              end else if (above_l && !prev_l && !dir_up) begin
                dir_up    <= 1'b1;
                mispred_o <= 1'b1;
                settled_o <= turned_down;
                code_o    <= to_code(s + 7'd1);
              end else if (above_h) begin
                dir_up <= 1'b1;
                code_o <= to_code(s + 7'd1);
              end else if (dir_up) begin
                code_o <= to_code(s + 7'd1);
              end else begin
                code_o <= dec(code_o);
              end
            end
          endcase
        end
      end
    end
  end
endmodule
