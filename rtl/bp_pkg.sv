// bp_pkg: types and constants shared by the tagless per-address two-level
// branch predictor.
//
// The second-level table holds two-bit saturating up/down counters; their four
// states are named here. The most significant counter bit is the prediction
// (1 = taken). The encoding (00 strongly not-taken .. 11 strongly taken) is the
// usual one for such counters and is this design's choice.
//
// The program counter width and the number of low address bits that are
// always zero for an aligned instruction are also fixed here. The 32-bit,
// word-aligned choice matches the MIPS and Alpha machines on which the
// predictor was evaluated, but it is a choice of this design.
package bp_pkg;

  localparam int unsigned PC_W       = 32;  // branch and target address width
  localparam int unsigned ALIGN_BITS = 2;   // instruction bytes = 2**ALIGN_BITS

  typedef logic [PC_W-1:0] pc_t;

  typedef enum logic [1:0] {
    CTR_STRONG_NT = 2'b00,
    CTR_WEAK_NT   = 2'b01,
    CTR_WEAK_T    = 2'b10,
    CTR_STRONG_T  = 2'b11
  } ctr_t;

  // One resolved conditional branch, as sent back by the execute stage.
  typedef struct packed {
    logic valid;   // a conditional branch resolved this cycle
    pc_t  pc;      // its address
    logic taken;   // its outcome
    pc_t  target;  // its target address (meaningful when taken)
  } bp_update_t;

  // One prediction, returned one cycle after the lookup.
  typedef struct packed {
    logic valid;         // answers a lookup made in the previous cycle
    logic taken;         // predicted direction
    logic target_valid;  // the BTB holds a target for this index
    pc_t  target;        // predicted target (meaningful when target_valid)
  } bp_predict_t;

endpackage
