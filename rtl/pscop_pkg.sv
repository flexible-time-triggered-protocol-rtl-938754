// pscop_pkg: types and constants shared by the Planning Scheduler CoProcessor
// (PSCoP) blocks.
//
// The CPU sees PSCoP as a small register file. An address is {sel, slot}:
// sel selects the register kind and slot the register slot (VPT) it belongs
// to. Slots 0..N-1 stand for the register slots the text numbers 1..N, slot 0
// having the highest priority. sel = 3 addresses the global registers, with
// the slot field as their index. This map is this design's own choice; the
// register kinds (P, Ph, C per slot, one EC register, one control/status
// register) follow the description of the coprocessor's CPU interface.
// P and Ph live in the VPTs; C and the EC duration live in the Schedule Plan
// Builder, which the CCU reaches over the same configuration bus.
package pscop_pkg;

  // Register kind, upper two address bits.
  typedef enum logic [1:0] {
    REG_P      = 2'd0,   // period of the variable, in ECs
    REG_PH     = 2'd1,   // initial phase, in ECs
    REG_C      = 2'd2,   // transaction duration, in EC time units
    REG_GLOBAL = 2'd3    // global registers, indexed by the slot field
  } reg_sel_e;

  // Global register indices (slot field when sel = REG_GLOBAL).
  localparam int unsigned GREG_EC   = 0;  // EC duration, in EC time units
  localparam int unsigned GREG_CTRL = 1;  // write: control, read: status

  // Control register bit.
  localparam int unsigned CTRL_RUN = 0;

  // Status register bits.
  localparam int unsigned ST_RUN     = 0;  // coprocessor started
  localparam int unsigned ST_BUSY    = 1;  // a plan is being built
  localparam int unsigned ST_FULL0   = 2;  // plan memory bank 0 holds a plan
  localparam int unsigned ST_FULL1   = 3;  // plan memory bank 1 holds a plan
  localparam int unsigned ST_RDBANK  = 4;  // bank the CPU reads next
  localparam int unsigned ST_MISS    = 5;  // some variable missed its deadline

  // Schedule Plan Builder states. One allocation is SEL then A1..A5
  // (6 clocks); closing an EC is SEL then E1, E2 (3 clocks). The text gives
  // the two clock counts; the steps behind them are this design's.
  typedef enum logic [3:0] {
    SPB_IDLE,   // stopped
    SPB_SEL,    // read the granted slot off the bus, test its C, latch both
    SPB_A1,     // take C off the time left in the EC
    SPB_A2,     // mark the transaction in the EC word
    SPB_A3,     // acknowledge the VPT, which drops its request
    SPB_A4,     // daisy chain ripples to the next request
    SPB_A5,     // next granted slot settles on the bus
    SPB_E1,     // write the EC word into the plan memory
    SPB_E2,     // start the next EC: VPTs advance, time left reloaded
    SPB_WAIT    // plan done; wait for a free plan memory bank
  } spb_state_e;

endpackage
