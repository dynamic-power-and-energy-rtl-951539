// tb_bru: backup and recovery unit with the nonvolatile store and a small
// processor-state model (PC and register file that answer the start/finish
// B/R handshake two cycles after the request). Checks cold start, restore of
// the newest checkpoint, alternation of the two slots, the transfer latency,
// and rollback to the older checkpoint after a backup cut short by power loss.
module tb_bru;
  localparam int PCW = 2, RFW = 16, WORDS = PCW + RFW, AW = $clog2(WORDS);
  localparam int FIN_LAT = 2;
  logic clk = 0, rst = 1, init = 1;
  logic backup = 0, restore = 0, busy, done, rollback, ckpt_valid, dir;
  logic pc_start, pc_fin, rf_start, rf_fin, pc_ld, rf_we;
  logic nvm_we, nvm_slot, sel1, sel2, vwe, vslot, vval, nwe, nval, newest;
  logic [1:0] vrb;
  logic [AW-1:0] addr;
  logic [7:0] to_pc, to_rf, rf_rdata;
  logic [15:0] pc;
  logic [7:0]  rf [RFW];
  logic [1:0]  pc_req_age, rf_req_age;
  int checks = 0, failures = 0;

  bru #(.PC_WORDS(PCW), .RF_WORDS(RFW)) dut (
    .clk, .rst, .backup_i(backup), .restore_i(restore), .busy_o(busy), .done_o(done),
    .rollback_o(rollback), .ckpt_valid_o(ckpt_valid), .restore_dir_o(dir),
    .pc_start_br_o(pc_start), .pc_finish_br_i(pc_fin), .rf_start_br_o(rf_start),
    .rf_finish_br_i(rf_fin), .pc_ld_o(pc_ld), .rf_we_o(rf_we), .nvm_we_o(nvm_we),
    .nvm_slot_o(nvm_slot), .addr_o(addr), .sel1_o(sel1), .sel2_o(sel2), .valid_we_o(vwe),
    .valid_slot_o(vslot), .valid_val_o(vval), .newest_we_o(nwe), .newest_val_o(nval),
    .valid_rb_i(vrb), .newest_rb_i(newest));

  nvm_backup #(.PC_WORDS(PCW), .RF_WORDS(RFW)) nvm (
    .clk, .we_i(nvm_we), .slot_i(nvm_slot), .addr_i(addr), .sel1_i(sel1), .pc_i(pc),
    .rf_rdata_i(rf_rdata), .sel2_i(sel2), .to_pc_o(to_pc), .to_rf_o(to_rf), .init_i(init),
    .valid_we_i(vwe), .valid_slot_i(vslot), .valid_val_i(vval), .newest_we_i(nwe),
    .newest_val_i(nval), .valid_o(vrb), .newest_o(newest));

  // processor state model
  assign rf_rdata = (addr >= AW'(PCW)) ? rf[addr - AW'(PCW)] : 8'h00;
  assign pc_fin = pc_start && pc_req_age == 2'(FIN_LAT);
  assign rf_fin = rf_start && rf_req_age == 2'(FIN_LAT);
  always_ff @(posedge clk) begin
    pc_req_age <= !pc_start ? 2'd0 : (pc_req_age == 2'(FIN_LAT) ? pc_req_age : pc_req_age + 1'b1);
    rf_req_age <= !rf_start ? 2'd0 : (rf_req_age == 2'(FIN_LAT) ? rf_req_age : rf_req_age + 1'b1);
    if (pc_ld) pc[8*addr[0] +: 8] <= to_pc;
    if (rf_we) rf[addr - AW'(PCW)] <= to_rf;
  end

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [15:0] pc; logic [7:0] rf [RFW]; } snap_t;

  function automatic snap_t take();
    snap_t s;
    s.pc = pc;
    for (int i = 0; i < RFW; i++) s.rf[i] = rf[i];
    return s;
  endfunction

  task automatic scramble();
    pc = 16'($urandom);
    for (int i = 0; i < RFW; i++) rf[i] = 8'($urandom);
  endtask

  task automatic same(snap_t s, string what);
    checks++;
    if (pc !== s.pc) begin failures++; $display("FAIL %s: pc %h expected %h", what, pc, s.pc); end
    for (int i = 0; i < RFW; i++) begin
      checks++;
      if (rf[i] !== s.rf[i]) begin failures++; $display("FAIL %s: rf[%0d]", what, i); end
    end
  endtask

  // Start an operation and return the cycles until done and whether rollback pulsed.
  task automatic run(input logic is_restore, output int cycles, output logic rb);
    @(negedge clk);
    if (is_restore) restore = 1; else backup = 1;
    @(negedge clk);
    restore = 0; backup = 0;
    cycles = 1; rb = 0;
    while (!done) begin
      if (rollback) rb = 1;
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    snap_t s1, s2;
    int cyc;
    logic rb;
    // expected latency in cycles from the request to done: the request is taken,
    // each phase waits FIN_LAT + 1 cycles for its finish answer, one byte per
    // cycle, and a backup adds the flag-clear and commit cycles.
    int exp_restore = 1 + 2 * (FIN_LAT + 1) + PCW + RFW;
    int exp_backup  = exp_restore + 2;
    scramble();
    repeat (2) @(negedge clk);
    init = 0; rst = 0;
    // cold start: nothing to restore
    run(1, cyc, rb);
    checks++; if (ckpt_valid) begin failures++; $display("FAIL ckpt valid after init"); end
    // first checkpoint
    scramble(); s1 = take();
    run(0, cyc, rb);
    checks++; if (cyc != exp_backup) begin failures++; $display("FAIL backup took %0d cycles, expected %0d", cyc, exp_backup); end
    checks++; if (!ckpt_valid) begin failures++; $display("FAIL no checkpoint"); end
    scramble();
    run(1, cyc, rb);
    checks++; if (cyc != exp_restore) begin failures++; $display("FAIL restore took %0d cycles, expected %0d", cyc, exp_restore); end
    checks++; if (rb) begin failures++; $display("FAIL unexpected rollback"); end
    same(s1, "restore 1");
    // second checkpoint goes to the other slot
    scramble(); s2 = take();
    run(0, cyc, rb);
    checks++; if (newest !== 1'b1) begin failures++; $display("FAIL second backup slot"); end
    scramble();
    run(1, cyc, rb);
    same(s2, "restore 2");
    // third backup cut short by a power failure in the register-file phase
    scramble();
    @(negedge clk) backup = 1;
    @(negedge clk) backup = 0;
    repeat (FIN_LAT + PCW + 6) @(negedge clk);
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    scramble();
    run(1, cyc, rb);
    checks++; if (!rb) begin failures++; $display("FAIL no rollback after interrupted backup"); end
    same(s2, "rollback restore");
    // a complete backup after the rollback is restored normally
    scramble(); s1 = take();
    run(0, cyc, rb);
    scramble();
    run(1, cyc, rb);
    checks++; if (rb) begin failures++; $display("FAIL rollback after good backup"); end
    same(s1, "restore 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
