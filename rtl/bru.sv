// bru: Backup and Recovery Unit.
//
// On backup_i it saves the processor state into the older of the two checkpoint
// slots of the nonvolatile store; on restore_i it reloads the newest valid slot.
// Each transfer runs in two phases, PC then register file. A phase raises its
// "start B/R" request, waits for the unit's "finish B/R" answer (the unit has
// frozen its state for a backup, or is ready to accept data for a restore), then
// moves the bytes one per cycle through the store's multiplexers, then drops the
// request. A backup writes the slot that does not hold the newest valid image.
// It first points the newest pointer at that slot and clears its valid flag,
// and sets the flag again only after the last byte. A backup cut short by power
// loss thus leaves the newest slot invalid: the restore then falls back to the
// older, still valid, checkpoint and rollback_o pulses. done_o pulses when a request has finished (also when there was no
// checkpoint to restore; ckpt_valid_o tells whether one exists).
//
// Timing: from the request to done_o a restore takes 1 + PC_WORDS + RF_WORDS
// cycles plus the two waits for the finish answers (each at least one cycle);
// a backup takes two cycles more (flag clear and commit).
//
// From the article: the start/finish B/R signals per unit, the atomic flag and
// its readback, double buffering for safe recovery. Byte-serial transfer, phase
// order and handshake rules are this design's choices.
module bru #(
  parameter int unsigned PC_WORDS = 2,
  parameter int unsigned RF_WORDS = 16,
  localparam int unsigned WORDS   = PC_WORDS + RF_WORDS,
  localparam int unsigned AW      = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          backup_i,       // trigger from the EPU
  input  logic          restore_i,
  output logic          busy_o,
  output logic          done_o,
  output logic          rollback_o,
  output logic          ckpt_valid_o,   // some slot holds a committed image
  // processor side
  output logic          restore_dir_o,  // 0: backup, 1: restore
  output logic          pc_start_br_o,
  input  logic          pc_finish_br_i,
  output logic          rf_start_br_o,
  input  logic          rf_finish_br_i,
  output logic          pc_ld_o,        // restore: load byte addr of the PC
  output logic          rf_we_o,        // restore: write register-file byte
  // nonvolatile store side
  output logic          nvm_we_o,
  output logic          nvm_slot_o,
  output logic [AW-1:0] addr_o,
  output logic          sel1_o,
  output logic          sel2_o,
  output logic          valid_we_o,
  output logic          valid_slot_o,
  output logic          valid_val_o,
  output logic          newest_we_o,
  output logic          newest_val_o,
  input  logic [1:0]    valid_rb_i,     // atomic flag readback
  input  logic          newest_rb_i
);
  typedef enum logic [2:0] {
    B_IDLE, B_CLEAR, B_PC_REQ, B_PC_XFER, B_RF_REQ, B_RF_XFER, B_COMMIT
  } bru_state_e;

  bru_state_e    st;
  logic          dir;    // 1: restore
  logic          slot;
  logic [AW-1:0] addr;

  assign busy_o        = (st != B_IDLE);
  assign ckpt_valid_o  = |valid_rb_i;
  assign restore_dir_o = dir;
  assign pc_start_br_o = (st == B_PC_REQ) || (st == B_PC_XFER);
  assign rf_start_br_o = (st == B_RF_REQ) || (st == B_RF_XFER);
  assign addr_o        = addr;
  assign nvm_slot_o    = slot;
  assign sel1_o        = (st == B_RF_XFER);
  assign sel2_o        = (st == B_RF_XFER);
  assign nvm_we_o      = !dir && ((st == B_PC_XFER) || (st == B_RF_XFER));
  assign pc_ld_o       = dir && (st == B_PC_XFER);
  assign rf_we_o       = dir && (st == B_RF_XFER);
  assign valid_we_o    = (st == B_CLEAR) || (st == B_COMMIT);
  assign valid_slot_o  = slot;
  assign valid_val_o   = (st == B_COMMIT);
  assign newest_we_o   = (st == B_CLEAR);
  assign newest_val_o  = slot;

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= B_IDLE;
      dir        <= 1'b0;
      slot       <= 1'b0;
      addr       <= '0;
      done_o     <= 1'b0;
      rollback_o <= 1'b0;
    end else begin
      done_o     <= 1'b0;
      rollback_o <= 1'b0;
      unique case (st)
        B_IDLE: begin
          addr <= '0;
          if (backup_i) begin
            dir  <= 1'b0;
            // Write the slot that does not hold the newest valid image.
            slot <= valid_rb_i[newest_rb_i] ? !newest_rb_i : newest_rb_i;
            st   <= B_CLEAR;
          end else if (restore_i) begin
            dir <= 1'b1;
            if (valid_rb_i[newest_rb_i]) begin
              slot <= newest_rb_i;
              st   <= B_PC_REQ;
            end else if (valid_rb_i[!newest_rb_i]) begin
              slot       <= !newest_rb_i;
              rollback_o <= 1'b1;
              st         <= B_PC_REQ;
            end else begin
              done_o <= 1'b1;   // nothing to restore: cold start
            end
          end
        end
        B_CLEAR:  st <= B_PC_REQ;
        B_PC_REQ: if (pc_finish_br_i) st <= B_PC_XFER;
        B_PC_XFER: begin
          if (addr == AW'(PC_WORDS - 1)) st <= B_RF_REQ;
          addr <= addr + 1'b1;
        end
        B_RF_REQ: if (rf_finish_br_i) st <= B_RF_XFER;
        B_RF_XFER: begin
          if (addr == AW'(WORDS - 1)) begin
            addr <= '0;
            if (dir) begin
              done_o <= 1'b1;
              st     <= B_IDLE;
            end else begin
              st <= B_COMMIT;
            end
          end else begin
            addr <= addr + 1'b1;
          end
        end
        B_COMMIT: begin
          done_o <= 1'b1;
          st     <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end

  // A request must not arrive while one is running.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst)
    busy_o |-> !(backup_i || restore_i));
endmodule
