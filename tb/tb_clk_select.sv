// tb_clk_select: four free-running clocks of unrelated periods. Checks that the
// output runs at the selected clock's rate after each switch, that switching
// completes within two cycles of the old plus three of the new clock, that no
// output pulse (high or low) is shorter than half a period of the fastest
// clock involved, and that the gate stops the output.
module tb_clk_select;
  localparam int N = 4;
  localparam real HALF [N] = '{50.0, 23.0, 11.0, 7.0};
  logic [N-1:0] clks = '0;
  logic rst_n = 0, gate = 0, sys_clk;
  logic [1:0] sel = 0;
  logic [N-1:0] act;
  int checks = 0, failures = 0;
  realtime last_edge = 0, min_pulse = 1.0e9;
  int rises = 0;

  clk_select #(.N(N)) dut (.rst_n, .clk_i(clks), .sel_i(sel), .gate_en_i(gate), .sys_clk_o(sys_clk), .active_o(act));

  for (genvar i = 0; i < N; i++) begin : g_clk
    initial begin
      #(i * 3);
      forever #(HALF[i]) clks[i] = ~clks[i];
    end
  end

  always @(sys_clk) begin
    if ($realtime - last_edge < min_pulse && last_edge > 0) min_pulse = $realtime - last_edge;
    last_edge = $realtime;
    if (sys_clk) rises++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(int s);
    int r0;
    realtime t0;
    r0 = rises;
    t0 = $realtime;
    #(40 * 2 * HALF[s]);
    chk((rises - r0) >= 39 && (rises - r0) <= 41,
        $sformatf("clock %0d: %0d rising edges in 40 periods", s, rises - r0));
  endtask

  initial begin
    int order [6] = '{0, 3, 1, 2, 0, 3};
    int prev;
    realtime t0;
    #20 rst_n = 1;
    gate = 1;
    #(10 * 2 * HALF[0]);
    measure(0);
    prev = 0;
    for (int k = 1; k < 6; k++) begin
      sel = 2'(order[k]);
      t0 = $realtime;
      wait (act == N'(1 << order[k]));
      chk($realtime - t0 <= 2 * 2 * HALF[prev] + 3 * 2 * HALF[order[k]] + 1,
          $sformatf("switch %0d->%0d took %0t", prev, order[k], $realtime - t0));
      min_pulse = 1.0e9;
      #(4 * 2 * HALF[order[k]]);
      measure(order[k]);
      prev = order[k];
    end
    // glitch check over a burst of switches
    min_pulse = 1.0e9;
    for (int k = 0; k < 20; k++) begin
      sel = 2'($urandom_range(0, N - 1));
      #($urandom_range(5, 300));
    end
    #2000;
    chk(min_pulse >= HALF[3] - 0.01, $sformatf("shortest output pulse %0t", min_pulse));
    // gate
    gate = 0;
    #500;
    prev = rises;
    #1000;
    chk(rises == prev, "gated output stays low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
