// tb_policy_timer: measures the distance between ticks for the RF and the
// solar period and checks that a change of source restarts the count.
module tb_policy_timer;
  localparam int RF = 10, SOL = 25;
  logic clk = 0, rst = 1, solar = 0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, nticks = 0;

  policy_timer #(.RF_CYCLES(RF), .SOLAR_CYCLES(SOL)) dut (.clk, .rst, .solar_i(solar), .tick_o(tick));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_period(int period, int n);
    int prev;
    @(posedge clk iff tick);
    prev = cyc;
    repeat (n) begin
      @(posedge clk iff tick);
      checks++;
      if (cyc - prev != period) begin
        failures++;
        $display("FAIL period %0d expected %0d", cyc - prev, period);
      end
      prev = cyc;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    check_period(RF, 5);
    @(negedge clk) solar = 1;
    check_period(SOL, 4);
    // After a switch back, the first tick comes a full RF period later.
    @(negedge clk) solar = 0;
    last = cyc;
    @(posedge clk iff tick);
    checks++;
    if (cyc - last != RF + 1) begin
      failures++;
      $display("FAIL restart distance %0d", cyc - last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
