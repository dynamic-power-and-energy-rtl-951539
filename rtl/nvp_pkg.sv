// nvp_pkg: types and constants shared by the power management unit (PMU) of an
// energy-harvesting nonvolatile processor.
//
// Frequencies are carried as a 5-bit code c, meaning (c+1) x 32 kHz, so the 32
// settings span 32 kHz .. 1.024 MHz; the 5-bit width matches the 5-bit frequency
// field of the learning table. Power and stored energy are discretised into 10
// bands (level 0..9). The energy thresholds of the reactive policies sit on band
// edges: E_thH = 90 %, E_thM = 80 %, E_thL = 70 % of capacity, which keeps the
// capacitor in its preferred 70-90 % window.
package nvp_pkg;

  localparam int unsigned FREQ_W   = 5;   // frequency code width
  localparam int unsigned NUM_FREQ = 32;  // number of selectable frequencies
  localparam int unsigned LVL_W    = 4;   // band index width
  localparam int unsigned NUM_LVL  = 10;  // bands per detector

  // Band indices of the reactive-policy thresholds (energy level >= band).
  localparam int unsigned LVL_THH = 9;    // E > 90 % of capacity
  localparam int unsigned LVL_THM = 8;    // E > 80 %
  localparam int unsigned LVL_THL = 7;    // E > 70 %

  typedef logic [FREQ_W-1:0] freq_code_t;
  typedef logic [LVL_W-1:0]  level_t;

  // Reactive frequency policy selection.
  typedef enum logic [1:0] {
    POL_LINP = 2'd0,   // linear
    POL_EBLP = 2'd1,   // exponential-bottom-linear
    POL_DTT  = 2'd2    // double threshold tracking
  } policy_e;

  // System (processor power) state kept by the energy policy unit.
  typedef enum logic [2:0] {
    SYS_OFF     = 3'd0,  // waiting for enough stored energy to start
    SYS_RESTORE = 3'd1,  // restoring the checkpoint
    SYS_RUN     = 3'd2,  // processor running
    SYS_DELAY   = 3'd3,  // emergency, running the learned extra instructions
    SYS_BACKUP  = 3'd4,  // backing up
    SYS_HALT    = 3'd5   // backed up, processor clock stopped
  } sys_state_e;

  // Single-cycle event strobes brought out of the top for monitoring.
  typedef struct packed {
    logic backup_done;    // a checkpoint was committed
    logic restore_done;   // a checkpoint was restored
    logic rollback;       // restore had to fall back to the older checkpoint
    logic ald_delay;      // ALD delayed a backup by a learned count
    logic ald_elide;      // ALD delay ended with energy restored: no backup
    logic ald_learn;      // ALD stored a new instruction count
    logic dfl_hit;        // DFL found a valid prediction
    logic dfl_learn;      // DFL stored a searched frequency
    logic dfl_invalidate; // DFL dropped a prediction during validation
    logic freq_change;    // the selected frequency changed
    logic warn_override;  // the EPU forced the minimum frequency
  } pmu_events_t;

  // Frequency of code c in kHz.
  function automatic int unsigned freq_khz(freq_code_t c);
    return (int'(c) + 1) * 32;
  endfunction

endpackage
