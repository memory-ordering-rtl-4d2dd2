// replay_decision: does the load in the replay stage access the cache again?
//
// Four filter configurations are supported (filter_mode_e):
//   replay all        : every load replays;
//   no-reorder        : only loads marked reordered at issue replay;
//   no-recent-miss    : a load replays if it issued past an unresolved store
//                       address (no-unresolved-store filter) or the
//                       no-recent-miss flag forces it;
//   no-recent-snoop   : as above with the no-recent-snoop flag (main mode).
// The consistency filter and the no-unresolved-store filter are combined by OR,
// since either alone is too aggressive. Whatever the mode, a load that is the
// re-execution of a load that caused a replay squash never replays (forward
// progress). Filtered loads still flow through the stages, without a cache
// access, a compare or a squash.
//
// Interface: purely combinational. replay is the decision; raw_replay says the
// no-unresolved-store mark alone asked for it; rule3_skip says the no-replay
// bit suppressed a replay. All rules follow the design.
module replay_decision
  import vbr_pkg::*;
(
  input  filter_mode_e mode,
  input  logic         nus,
  input  logic         reordered,
  input  logic         no_replay,
  input  logic         miss_force,
  input  logic         snoop_force,
  output logic         replay,
  output logic         raw_replay,
  output logic         rule3_skip
);
  logic want;

  always_comb begin
    raw_replay = 1'b0;
    unique case (mode)
      FM_REPLAY_ALL:      want = 1'b1;
      FM_NO_REORDER:      want = reordered;
      FM_NO_RECENT_MISS: begin
        want       = nus | miss_force;
        raw_replay = nus & ~miss_force;
      end
      FM_NO_RECENT_SNOOP: begin
        want       = nus | snoop_force;
        raw_replay = nus & ~snoop_force;
      end
      default:            want = 1'b1;
    endcase
    replay     = want & ~no_replay;
    rule3_skip = want & no_replay;
    if (no_replay) raw_replay = 1'b0;
  end

endmodule
