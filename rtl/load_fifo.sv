// load_fifo: the non-associative load queue of value-based memory ordering.
//
// Loads enter in program order at dispatch and leave in program order at
// commit. Nothing ever searches the queue by address: stores, other loads and
// external invalidations do not look into it. Each entry only records what the
// back end needs later: the load's PC, the address and value of its premature
// (out-of-order) execution, and its marks for the replay filters
// (no-unresolved-store, reordered, and the "do not replay" bit of a load that
// is re-executed after causing a replay squash).
//
// Three pointers walk the circular buffer: tail (next allocation), rp (next
// load to enter the replay stage) and head (next load to commit). An age is an
// index with one extra wrap bit, so ages stay unique over two trips round the
// queue. The reordered mark is taken at issue by issue_marker from the done bits.
//
// Interface and timing (all synchronous to clk, one operation of each kind per
// cycle):
//   alloc_*  : dispatch; alloc_age is the new load's age, accepted when
//              alloc_valid && alloc_ready.
//   issue_*  : premature issue of the load with issue_age; stores its marks.
//   exec_*   : premature completion; stores address and value, sets done.
//   rd_*     : the entry at rp, valid once it has executed; rd_take moves rp on.
//   pop      : the head load commits.
//   rewind_* : drop rewind_age and everything younger (squash or branch
//              recovery); rp moves back too if it had passed that age.
// The FIFO organisation, its content and the size (a 128-entry queue) follow
// the design; pointers, ages and the port set are this design's choices.
module load_fifo
  import vbr_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned IW    = $clog2(DEPTH),
  localparam int unsigned AGE_W = IW + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // dispatch
  input  logic             alloc_valid,
  input  pc_t              alloc_pc,
  input  logic             alloc_no_replay,
  output logic             alloc_ready,
  output logic [AGE_W-1:0] alloc_age,
  // premature issue
  input  logic             issue_valid,
  input  logic [AGE_W-1:0] issue_age,
  input  logic             issue_nus,
  input  logic             issue_older_st_incomplete,
  // premature completion
  input  logic             exec_valid,
  input  logic [AGE_W-1:0] exec_age,
  input  addr_t            exec_addr,
  input  data_t            exec_data,
  // replay-stage read port
  output logic             rd_valid,
  output lq_entry_t        rd_entry,
  output logic [AGE_W-1:0] rd_age,
  input  logic             rd_take,
  // commit
  input  logic             pop,
  // squash / recovery
  input  logic             rewind_valid,
  input  logic [AGE_W-1:0] rewind_age,
  // status
  output logic             empty,
  output logic             unreplayed,     // loads still before the replay stage
  output logic [AGE_W-1:0] youngest_age,   // age of the newest load in the queue
  output logic [AGE_W-1:0] count
);

  logic [AGE_W-1:0] head_q, rp_q, tail_q;

  pc_t        pc_q    [DEPTH];
  addr_t      addr_q  [DEPTH];
  data_t      data_q  [DEPTH];
  logic [DEPTH-1:0] nus_q, reord_q, norep_q, done_q;
  logic [DEPTH-1:0] valid_vec;

  logic [IW-1:0] head_i, rp_i, tail_i, issue_i, exec_i;
  logic          full, reordered;
  logic          do_alloc;

  assign head_i  = head_q[IW-1:0];
  assign rp_i    = rp_q[IW-1:0];
  assign tail_i  = tail_q[IW-1:0];
  assign issue_i = issue_age[IW-1:0];
  assign exec_i  = exec_age[IW-1:0];

  assign count        = tail_q - head_q;  // at most DEPTH, which fits in AGE_W bits
  assign full         = (count == AGE_W'(DEPTH));
  assign empty        = (tail_q == head_q);
  assign unreplayed   = (tail_q != rp_q);
  assign youngest_age = tail_q - 1'b1;

  assign alloc_ready = !full && !rewind_valid;
  assign alloc_age   = tail_q;
  assign do_alloc    = alloc_valid && alloc_ready;

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++)
      valid_vec[i] = AGE_W'(IW'(IW'(i) - head_i)) < count;
  end

  issue_marker #(.DEPTH(DEPTH)) u_marker (
    .valid_vec          (valid_vec),
    .done_vec           (done_q),
    .head_idx           (head_i),
    .issue_idx          (issue_i),
    .older_st_incomplete(issue_older_st_incomplete),
    .reordered          (reordered)
  );

  assign rd_valid = unreplayed && done_q[rp_i];
  assign rd_age   = rp_q;
  always_comb begin
    rd_entry.pc        = pc_q[rp_i];
    rd_entry.addr      = addr_q[rp_i];
    rd_entry.data      = data_q[rp_i];
    rd_entry.nus       = nus_q[rp_i];
    rd_entry.reordered = reord_q[rp_i];
    rd_entry.no_replay = norep_q[rp_i];
  end

  // distance from head, used to tell whether rp lies beyond the rewind point
  logic [AGE_W-1:0] rewind_dist, rp_dist;
  assign rewind_dist = rewind_age - head_q;
  assign rp_dist     = rp_q - head_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      rp_q   <= '0;
      tail_q <= '0;
    end else begin
      if (pop) head_q <= head_q + 1'b1;
      if (rewind_valid) begin
        tail_q <= rewind_age;
        if (rewind_dist <= rp_dist) rp_q <= rewind_age;
        else if (rd_take)           rp_q <= rp_q + 1'b1;
      end else begin
        if (do_alloc) tail_q <= tail_q + 1'b1;
        if (rd_take)  rp_q   <= rp_q + 1'b1;
      end
    end
  end

  // entry payload (no reset needed: valid is derived from the pointers)
  always_ff @(posedge clk) begin
    if (do_alloc) begin
      pc_q[tail_i] <= alloc_pc;
    end
    if (exec_valid) begin
      addr_q[exec_i] <= exec_addr;
      data_q[exec_i] <= exec_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nus_q   <= '0;
      reord_q <= '0;
      norep_q <= '0;
      done_q  <= '0;
    end else begin
      if (do_alloc) begin
        norep_q[tail_i] <= alloc_no_replay;
        done_q[tail_i]  <= 1'b0;
        nus_q[tail_i]   <= 1'b0;
        reord_q[tail_i] <= 1'b0;
      end
      if (issue_valid) begin
        nus_q[issue_i]   <= issue_nus;
        reord_q[issue_i] <= reordered;
      end
      if (exec_valid) done_q[exec_i] <= 1'b1;
    end
  end

  // A load is committed only after it has passed the replay stage.
  a_pop_after_replay: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> (head_q != rp_q));
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n)
    rd_take |-> rd_valid);

endmodule
