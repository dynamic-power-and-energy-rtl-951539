// policy_timer: timestep generator for the policy engines.
//
// The policy state machines act once per timestep: 200 ms for RF-powered
// operation and 1 s for solar-powered operation, both from the article.
// Counted on the always-on reference clock (32 kHz by default, an assumption),
// the periods are RF_CYCLES and SOLAR_CYCLES. tick_o is a one-cycle pulse at the
// end of each period; changing solar_i restarts the count.
module policy_timer #(
  parameter int unsigned RF_CYCLES    = 6400,   // 200 ms at 32 kHz
  parameter int unsigned SOLAR_CYCLES = 32000   // 1 s at 32 kHz
) (
  input  logic clk,
  input  logic rst,
  input  logic solar_i,   // 1: solar source period, 0: RF source period
  output logic tick_o
);
  localparam int unsigned CW = $clog2((RF_CYCLES > SOLAR_CYCLES ? RF_CYCLES : SOLAR_CYCLES) + 1);
  logic [CW-1:0] cnt;
  logic          solar_q;
  logic [CW-1:0] last;

  assign last = solar_i ? CW'(SOLAR_CYCLES - 1) : CW'(RF_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      tick_o  <= 1'b0;
      solar_q <= solar_i;
    end else begin
      solar_q <= solar_i;
      tick_o  <= 1'b0;
      if (solar_q != solar_i) begin
        cnt <= '0;
      end else if (cnt == last) begin
        cnt    <= '0;
        tick_o <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
