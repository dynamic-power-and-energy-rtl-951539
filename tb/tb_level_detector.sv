// tb_level_detector: random samples against random ascending threshold ladders;
// the expected band is counted independently with a while-loop search.
module tb_level_detector;
  localparam int W = 16, NTHR = 9;
  logic [W-1:0]           value;
  logic [NTHR-1:0][W-1:0] thr;
  logic [3:0]             level;
  logic [NTHR-1:0]        therm;
  int checks = 0, failures = 0;

  level_detector #(.W(W), .NTHR(NTHR)) dut (.value_i(value), .thr_i(thr), .level_o(level), .therm_o(therm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned base, exp_lvl;
    for (int t = 0; t < 2000; t++) begin
      base = $urandom_range(0, 500);
      for (int k = 0; k < NTHR; k++) begin
        base += $urandom_range(1, 700);
        thr[k] = W'(base);
      end
      case (t % 4)
        0: value = thr[$urandom_range(0, NTHR-1)];           // exactly on a threshold
        1: value = W'(0);
        2: value = thr[NTHR-1] + W'($urandom_range(0, 50));
        default: value = W'($urandom_range(0, 7000));
      endcase
      #1;
      exp_lvl = 0;
      while (exp_lvl < NTHR && value >= thr[exp_lvl]) exp_lvl++;
      checks++;
      if (level !== 4'(exp_lvl)) begin
        failures++;
        $display("FAIL value=%0d level=%0d expected=%0d", value, level, exp_lvl);
      end
      checks++;
      if (therm !== NTHR'((1 << exp_lvl) - 1)) begin
        failures++;
        $display("FAIL therm=%b for level %0d", therm, exp_lvl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
