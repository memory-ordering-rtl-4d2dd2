// issue_marker: the no-reorder mark, computed when a load issues.
//
// A load that issues while no older load or store is still incomplete executed
// in program order and cannot break the consistency model, so under the
// no-reorder filter it need not replay. This block looks at the load queue's
// per-entry "done" bits: every valid entry that lies between the queue head and
// the issuing load (in circular order) is older, and if any of them is not done
// the issuing load is marked reordered. Older stores are summarised by one input
// from the store side.
//
// Interface: purely combinational. head_idx and issue_idx are queue indices;
// valid_vec/done_vec hold one bit per entry. The rule (mark loads issuing while
// prior loads or stores are incomplete) follows the no-reorder filter; taking
// the load state from the FIFO's done bits is this design's choice.
module issue_marker #(
  parameter int unsigned DEPTH = 128
) (
  input  logic [DEPTH-1:0]         valid_vec,
  input  logic [DEPTH-1:0]         done_vec,
  input  logic [$clog2(DEPTH)-1:0] head_idx,
  input  logic [$clog2(DEPTH)-1:0] issue_idx,
  input  logic                     older_st_incomplete,
  output logic                     reordered
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [IW-1:0] issue_dist;
  logic          older_load_incomplete;

  always_comb begin
    issue_dist = issue_idx - head_idx;
    older_load_incomplete = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      // distance of entry i from the head; smaller than the issuing load's means older
      if (IW'(IW'(i) - head_idx) < issue_dist && valid_vec[i] && !done_vec[i])
        older_load_incomplete = 1'b1;
    end
    reordered = older_load_incomplete | older_st_incomplete;
  end

endmodule
