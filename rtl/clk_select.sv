// clk_select: glitch-free selection among N clocks, with clock gating.
//
// The candidate clocks come from oscillators and dividers (one per frequency
// code). Each input i has an enable that is requested when sel_i == i and every
// other input's enable is off, and that passes a two-flip-flop synchroniser
// clocked on the falling edge of clock i. The output is the OR of (clk_i AND
// enable_i). Because an enable only changes while its own clock is low, and a
// new clock is enabled only after the old one has been disabled, the output
// never carries a runt pulse. Switching therefore costs two cycles of the old
// clock plus two cycles of the new one. The result passes an AND gate whose
// enable (gate_en_i, from the frequency unit) is resampled on the falling edge
// of the selected clock, giving sys_clk_o.
//
// From the article: clock multiplexer with a two-stage select-and-synchronise
// process, a two-cycle switching penalty and an AND gate for the gated clock.
// The falling-edge synchronisers and the enable interlock are this design's
// choices. sel_i may change at any time; rst_n is an asynchronous clear.
module clk_select #(
  parameter int unsigned N = 32
) (
  input  logic                 rst_n,
  input  logic [N-1:0]         clk_i,
  input  logic [$clog2(N)-1:0] sel_i,
  input  logic                 gate_en_i,
  output logic                 sys_clk_o,
  output logic [N-1:0]         active_o    // enable of each input (one-hot when settled)
);
  logic [N-1:0] req, s2;
  logic         mux_clk, gate_q;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      req[i] = (sel_i == ($clog2(N))'(i));
      for (int j = 0; j < N; j++)
        if (j != i && s2[j]) req[i] = 1'b0;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_sync
    logic q1, q2;
    always_ff @(negedge clk_i[i] or negedge rst_n) begin
      if (!rst_n) begin
        q1 <= 1'b0;
        q2 <= 1'b0;
      end else begin
        q1 <= req[i];
        q2 <= q1 && req[i];
      end
    end
    assign s2[i] = q2;
  end

  assign mux_clk  = |(clk_i & s2);
  assign active_o = s2;

  always_ff @(negedge mux_clk or negedge rst_n) begin
    if (!rst_n) gate_q <= 1'b0;
    else        gate_q <= gate_en_i;
  end

  assign sys_clk_o = mux_clk & gate_q;
endmodule
