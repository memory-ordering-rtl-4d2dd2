// vbr_pkg: types and constants shared by the value-based memory ordering back end.
//
// In value-based ordering the load queue is a plain FIFO. Each entry keeps the
// premature load's address and value plus a few marks taken at issue time; a
// replay stage in front of commit re-reads the L1 data cache for the loads that
// need it, and a compare stage checks the two values. This package holds the
// word widths, the load-queue entry layout, the kinds of instruction that flow
// through the back end, and the four replay-filter configurations that the
// design can run in.
//
// Widths are this design's choice (64-bit PowerPC effective addresses, PCs and
// words); the filter configurations are the four evaluated for the design.
package vbr_pkg;

  localparam int unsigned ADDR_W = 64;  // effective address of a load/store
  localparam int unsigned DATA_W = 64;  // compared word
  localparam int unsigned PC_W   = 64;  // instruction address

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [PC_W-1:0]   pc_t;

  // Replay-filter configuration (a run-time mode input).
  typedef enum logic [1:0] {
    FM_REPLAY_ALL      = 2'd0,  // every load replays
    FM_NO_REORDER      = 2'd1,  // only loads that issued out of order replay
    FM_NO_RECENT_MISS  = 2'd2,  // no-recent-miss + no-unresolved-store
    FM_NO_RECENT_SNOOP = 2'd3   // no-recent-snoop + no-unresolved-store (main one)
  } filter_mode_e;

  // Kind of the instruction presented by the reorder buffer to the back end.
  typedef enum logic [1:0] {
    IK_OTHER = 2'd0,
    IK_LOAD  = 2'd1,
    IK_STORE = 2'd2
  } inst_kind_e;

  // One load-queue entry: the premature load's result and its marks.
  typedef struct packed {
    pc_t   pc;
    addr_t addr;       // effective address, reused by the replay
    data_t data;       // premature value
    logic  nus;        // issued past an older store with unresolved address
    logic  reordered;  // issued while an older load or store was incomplete
    logic  no_replay;  // re-execution of a load that caused a replay squash
  } lq_entry_t;

  // Per-cycle event pulses of the back end, for counters and observation.
  typedef struct packed {
    logic replay_issued;    // a load replay was sent to the L1D port
    logic replay_filtered;  // a load passed the replay stage without replaying
    logic raw_replay;       // a replay caused by the no-unresolved-store mark
    logic rule3_skip;       // a load skipped replay because it caused a squash
    logic store_wait;       // a replay waited for an older store to reach L1D
    logic replay_miss_wait; // the compare stage waited on a slow replay access
    logic squash;           // replay value differed from the premature value
    logic r_leave;          // a load left the replay stage (age below)
  } vbr_events_t;

endpackage
