// tb_ald: adaptive learning detection. Covers: an invalid entry backs up at
// once and learns (energy left - minimum) / energy-per-instruction; a valid
// entry delays the backup by exactly that many retired instructions; a delay
// that ends with energy restored elides the backup; a power failure during the
// delay leaves the entry invalid; entries of other power levels are separate;
// init clears everything.
module tb_ald;
  localparam int EW = 16, CW = 16;
  logic clk = 0, rst = 1, init = 1;
  logic emerg = 0, iret = 0, bdone = 0;
  logic [3:0] plvl = 0;
  logic [EW-1:0] ecap = 0, eback = 300, emin = 200, epi = 40;
  logic start, delay, dstart, elide, learn;
  logic [CW-1:0] readn;
  int checks = 0, failures = 0;
  int nstart = 0, nelide = 0, nlearn = 0, ndstart = 0;

  ald #(.NENT(10), .CNT_W(CW), .EW(EW)) dut (
    .clk, .rst, .init_i(init), .emergency_i(emerg), .p_lvl_i(plvl), .instr_ret_i(iret),
    .e_cap_i(ecap), .e_back_i(eback), .e_min_i(emin), .epi_i(epi), .backup_done_i(bdone),
    .start_backup_o(start), .delay_o(delay), .delay_start_o(dstart), .elide_o(elide),
    .learn_o(learn), .read_n_o(readn));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (start)  nstart++;
    if (elide)  nelide++;
    if (learn)  nlearn++;
    if (dstart) ndstart++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic emergency(logic [3:0] lvl);
    @(negedge clk) begin emerg = 1; plvl = lvl; end
    @(negedge clk) emerg = 0;
    @(negedge clk);
  endtask

  task automatic finish_backup(logic [EW-1:0] e_after);
    repeat (5) @(negedge clk);
    ecap = e_after;
    bdone = 1;
    @(negedge clk) bdone = 0;
    @(negedge clk);
  endtask

  // retire n instructions (one every 3 cycles); return how many had retired
  // when start_backup appeared (-1 if never).
  task automatic retire(int n, output int at_start);
    at_start = -1;
    for (int i = 0; i < n + 3; i++) begin
      @(negedge clk) iret = (i < n);
      if (start && at_start < 0) at_start = i;
      @(negedge clk) iret = 0;
      if (start && at_start < 0) at_start = i + 1;
      @(negedge clk);
      if (start && at_start < 0) at_start = i + 1;
    end
  endtask

  initial begin
    int s0, at;
    repeat (2) @(negedge clk);
    init = 0; rst = 0;
    // 1. no prediction: immediate backup, then learn (1000-200)/40 = 20
    ecap = 250;
    s0 = nstart;
    emergency(4'd3);
    chk(nstart == s0 + 1 && !delay, "immediate backup on invalid entry");
    finish_backup(16'd1000);
    chk(nlearn == 1, "learned after backup");
    // 2. valid entry: the backup waits for 20 instructions
    ecap = 250;
    s0 = nstart;
    emergency(4'd3);
    chk(ndstart == 1 && delay && readn == 16'd20, "delay started with N=20");
    chk(nstart == s0, "no backup at start of delay");
    retire(25, at);
    chk(at == 20, $sformatf("backup after exactly 20 instructions (got %0d)", at));
    finish_backup(16'd250);
    // 3. valid again: energy restored during the delay -> elided
    ecap = 250;
    s0 = nstart;
    emergency(4'd3);
    chk(delay, "delay again (entry restored valid)");
    ecap = 400;
    retire(22, at);
    chk(nelide == 1 && nstart == s0, "backup elided when energy restored");
    // 4. valid: power failure during the delay
    ecap = 250;
    emergency(4'd3);
    retire(5, at);
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    s0 = nstart;
    emergency(4'd3);
    chk(nstart == s0 + 1 && !delay, "entry invalid after failure during delay");
    finish_backup(16'd600);             // relearn (600-200)/40 = 10
    // 5. other level is independent and still invalid
    s0 = nstart;
    emergency(4'd7);
    chk(nstart == s0 + 1, "level 7 has no prediction");
    finish_backup(16'd150);              // below e_min: learns 0
    // 6. relearned value for level 3 is 10
    ecap = 250;
    emergency(4'd3);
    chk(delay && readn == 16'd10, "relearned N=10");
    retire(12, at);
    chk(at == 10, "backup after 10 instructions");
    finish_backup(16'd250);
    // 7. init clears the table
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    s0 = nstart;
    emergency(4'd3);
    chk(nstart == s0 + 1 && !delay, "init clears predictions");
    finish_backup(16'd250);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
