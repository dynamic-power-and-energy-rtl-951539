// level_detector: multi-threshold detector for input power or stored energy.
//
// The analog sensors deliver a sampled value; this block compares it with a
// ladder of NTHR thresholds and reports how many of them the value reaches, a
// band index 0..NTHR. With the default NTHR = 9 that is the 10 discretised
// levels used by the learning tables. Thresholds must be given in ascending
// order. Purely combinational; the band is valid in the same cycle as the
// sample. The 10-band discretisation follows the article; comparing a digital
// sample (rather than a bank of analog comparators) is this design's choice.
module level_detector #(
  parameter int unsigned W    = 16,
  parameter int unsigned NTHR = 9
) (
  input  logic [W-1:0]               value_i,
  input  logic [NTHR-1:0][W-1:0]     thr_i,     // ascending thresholds
  output logic [$clog2(NTHR+1)-1:0]  level_o,   // number of thresholds reached
  output logic [NTHR-1:0]            therm_o    // thermometer code, bit k: value >= thr[k]
);
  always_comb begin
    level_o = '0;
    for (int k = 0; k < NTHR; k++) begin
      therm_o[k] = (value_i >= thr_i[k]);
      if (therm_o[k]) level_o = level_o + 1'b1;
    end
  end
endmodule
