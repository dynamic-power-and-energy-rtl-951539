// cvu: Clock Frequency and Voltage Tuning Unit.
//
// Chooses the processor's clock frequency and supply voltage.
//  * Frequency: the learning unit (dfl, with the reactive policy inside)
//    proposes a code each timestep. The energy policy unit's freq_min_i
//    overrides it with the lowest frequency and restarts the policy.
//  * Voltage (DVR): with dvr_en_i the supply target is the minimum voltage for
//    the selected frequency, interpolated linearly between the two measured
//    operating points VDD_LO_MV at 32 kHz and VDD_HI_MV at F_HI_KHZ, rounded
//    up to the next millivolt. With dvr_en_i low the voltage stays at the
//    value needed by the highest code (frequency scaling only).
//  * Gated clock control: gate_en_o is low while the processor is stopped and
//    for HOLD_CYCLES reference cycles after every frequency change, so the
//    processor does not run while the clock selector switches over.
// The operating points and the override come from the article; the linear
// voltage interpolation and the hold time are this design's choices.
// Timing: freq_code_o, vdd_mv_o and gate_en_o are registered.
module cvu
  import nvp_pkg::*;
#(
  parameter int unsigned VDD_LO_MV   = 760,
  parameter int unsigned VDD_HI_MV   = 1310,
  parameter int unsigned F_HI_KHZ    = 25000,
  parameter int unsigned HOLD_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        init_i,
  input  logic        tick_i,
  input  policy_e     mode_i,
  input  logic        dfl_en_i,
  input  logic        dvr_en_i,
  input  level_t      p_lvl_i,
  input  level_t      e_lvl_i,
  input  logic        freq_min_i,     // energy policy unit override
  input  logic        cpu_clk_en_i,
  output freq_code_t  freq_code_o,
  output logic [10:0] vdd_mv_o,
  output logic        gate_en_o,
  output logic        freq_change_o,  // pulse
  output logic        dfl_hit_o,
  output logic        dfl_learn_o,
  output logic        dfl_invalidate_o
);
  localparam int unsigned SLOPE_NUM = (VDD_HI_MV - VDD_LO_MV) * 32;
  localparam int unsigned SLOPE_DEN = F_HI_KHZ - 32;

  freq_code_t  prop, next_code;
  logic [1:0]  hold;
  logic [10:0] vdd_calc;

  dfl u_dfl (
    .clk, .rst, .init_i,
    .tick_i       (tick_i),
    .dfl_en_i     (dfl_en_i),
    .mode_i       (mode_i),
    .restart_i    (freq_min_i),
    .p_lvl_i      (p_lvl_i),
    .e_lvl_i      (e_lvl_i),
    .code_o       (prop),
    .hit_o        (dfl_hit_o),
    .learn_o      (dfl_learn_o),
    .invalidate_o (dfl_invalidate_o)
  );

  assign next_code = freq_min_i ? '0 : prop;

  // Minimum supply for next_code: VDD_LO + ceil(code * 32kHz * slope).
  always_comb begin
    freq_code_t c;
    c = dvr_en_i ? next_code : freq_code_t'(NUM_FREQ - 1);
    vdd_calc = 11'(VDD_LO_MV + (32'(c) * SLOPE_NUM + SLOPE_DEN - 1) / SLOPE_DEN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      freq_code_o   <= '0;
      vdd_mv_o      <= '0;
      hold          <= 2'(HOLD_CYCLES);
      gate_en_o     <= 1'b0;
      freq_change_o <= 1'b0;
    end else begin
      freq_code_o   <= next_code;
      vdd_mv_o      <= vdd_calc;
      freq_change_o <= (next_code != freq_code_o);
      if (next_code != freq_code_o) hold <= 2'(HOLD_CYCLES);
      else if (hold != 0)           hold <= hold - 1'b1;
      gate_en_o <= cpu_clk_en_i && (hold == 0) && (next_code == freq_code_o);
    end
  end
endmodule
