// nvm_backup: double-buffered nonvolatile checkpoint store.
//
// Holds two checkpoint slots of WORDS bytes each. A slot image is the program
// counter (PC_WORDS bytes, little-endian, at addresses 0..PC_WORDS-1) followed by
// the register file (addresses PC_WORDS..WORDS-1). The input multiplexer (sel1)
// picks the byte to store: a PC byte or the register-file read data. The output
// multiplexer (sel2) routes the read byte either to the PC or to the register
// file. Writes take effect on the clock edge; reads are combinational.
// Beside the data it keeps the atomic flags: a valid bit per slot and a pointer
// to the newest slot, written and read back by the backup and recovery unit.
//
// The block, its two multiplexers and the select/address control come from the
// block diagram of the PMU; the byte organisation, widths and two-slot layout
// are this design's choices. The array has no reset: in silicon these are
// ferroelectric cells that keep their contents when power is lost, so only the
// backup and recovery unit decides whether a slot holds a valid image.
module nvm_backup #(
  parameter int unsigned PC_WORDS = 2,
  parameter int unsigned RF_WORDS = 16,
  localparam int unsigned WORDS   = PC_WORDS + RF_WORDS,
  localparam int unsigned AW      = $clog2(WORDS)
) (
  input  logic                    clk,
  input  logic                    we_i,       // store the selected byte
  input  logic                    slot_i,     // checkpoint slot 0 / 1
  input  logic [AW-1:0]           addr_i,
  input  logic                    sel1_i,     // 0: PC byte, 1: register-file byte
  input  logic [8*PC_WORDS-1:0]   pc_i,       // live program counter
  input  logic [7:0]              rf_rdata_i, // live register-file byte at addr
  input  logic                    sel2_i,     // 0: read data to PC, 1: to register file
  output logic [7:0]              to_pc_o,
  output logic [7:0]              to_rf_o,
  // Atomic flags: per-slot valid bits and the newest-slot pointer.
  input  logic                    init_i,     // factory initialisation: clear the flags
  input  logic                    valid_we_i,
  input  logic                    valid_slot_i,
  input  logic                    valid_val_i,
  input  logic                    newest_we_i,
  input  logic                    newest_val_i,
  output logic [1:0]              valid_o,    // flag readback
  output logic                    newest_o
);
  logic [7:0] mem [2][WORDS];
  logic [7:0] wdata, rdata;

  // Input multiplexer (Sel1).
  always_comb begin
    wdata = rf_rdata_i;
    if (!sel1_i) begin
      wdata = 8'h00;
      for (int k = 0; k < PC_WORDS; k++)
        if (addr_i == AW'(k)) wdata = pc_i[8*k +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (we_i) mem[slot_i][addr_i] <= wdata;
  end

  // Flags are nonvolatile too: only init_i clears them, not the PMU reset.
  always_ff @(posedge clk) begin
    if (init_i) begin
      valid_o  <= 2'b00;
      newest_o <= 1'b0;
    end else begin
      if (valid_we_i)  valid_o[valid_slot_i] <= valid_val_i;
      if (newest_we_i) newest_o <= newest_val_i;
    end
  end

  // Output multiplexer (Sel2).
  assign rdata   = mem[slot_i][addr_i];
  assign to_pc_o = sel2_i ? 8'h00 : rdata;
  assign to_rf_o = sel2_i ? rdata : 8'h00;
endmodule
