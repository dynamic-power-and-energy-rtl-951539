// tb_nvm_backup: fills both slots through the input multiplexer (PC bytes and
// register-file bytes), reads them back through the output multiplexer, and
// exercises the atomic flags, including that reset-free flags survive while
// only init clears them.
module tb_nvm_backup;
  localparam int PCW = 2, RFW = 16, WORDS = PCW + RFW, AW = $clog2(WORDS);
  logic clk = 0;
  logic we, slot, sel1, sel2, init, vwe, vslot, vval, nwe, nval, newest;
  logic [AW-1:0] addr;
  logic [15:0] pc;
  logic [7:0] rfd, to_pc, to_rf;
  logic [1:0] valid;
  logic [7:0] model [2][WORDS];
  int checks = 0, failures = 0;

  nvm_backup #(.PC_WORDS(PCW), .RF_WORDS(RFW)) dut (
    .clk, .we_i(we), .slot_i(slot), .addr_i(addr), .sel1_i(sel1), .pc_i(pc), .rf_rdata_i(rfd),
    .sel2_i(sel2), .to_pc_o(to_pc), .to_rf_o(to_rf), .init_i(init), .valid_we_i(vwe),
    .valid_slot_i(vslot), .valid_val_i(vval), .newest_we_i(nwe), .newest_val_i(nval),
    .valid_o(valid), .newest_o(newest));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    {we, slot, sel1, sel2, vwe, vslot, vval, nwe, nval} = '0;
    addr = '0; pc = '0; rfd = '0;
    init = 1;
    @(negedge clk) init = 0;
    checks++; if (valid !== 2'b00 || newest !== 1'b0) begin failures++; $display("FAIL init"); end
    for (int s = 0; s < 2; s++) begin
      pc = 16'($urandom);
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        we = 1; slot = 1'(s); addr = AW'(a);
        sel1 = (a >= PCW);
        rfd = 8'($urandom);
        model[s][a] = (a < PCW) ? pc[8*a +: 8] : rfd;
      end
      @(negedge clk) we = 0;
    end
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < WORDS; a++) begin
        slot = 1'(s); addr = AW'(a); sel2 = (a >= PCW);
        #1;
        if (a < PCW) begin chk(to_pc, model[s][a], "to_pc"); chk(to_rf, 8'h00, "to_rf idle"); end
        else         begin chk(to_rf, model[s][a], "to_rf"); chk(to_pc, 8'h00, "to_pc idle"); end
      end
    // flags
    @(negedge clk) begin vwe = 1; vslot = 1; vval = 1; nwe = 1; nval = 1; end
    @(negedge clk) begin vwe = 1; vslot = 0; vval = 1; nwe = 0; end
    @(negedge clk) vwe = 0;
    checks++; if (valid !== 2'b11 || newest !== 1'b1) begin failures++; $display("FAIL flags set"); end
    @(negedge clk) begin vwe = 1; vslot = 1; vval = 0; end
    @(negedge clk) vwe = 0;
    checks++; if (valid !== 2'b01) begin failures++; $display("FAIL flag clear"); end
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    checks++; if (valid !== 2'b00 || newest !== 1'b0) begin failures++; $display("FAIL init clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
