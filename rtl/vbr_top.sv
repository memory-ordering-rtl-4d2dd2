// vbr_top: value-based memory ordering back end of an out-of-order core.
//
// The core executes loads early ("premature" loads) exactly as a conventional
// machine would, but it keeps them in a plain FIFO instead of an associative
// load queue: no store address, load or external invalidation ever searches
// it. Ordering is instead checked at the back end. Just before commit a load
// may read the L1 data cache a second time ("replay") and, if the value it gets
// differs from the premature value, the load and everything after it are
// squashed and re-executed. Replays are in program order, one per cycle, and
// only after all older stores are in the cache, so a load that replays
// correctly has honoured both its own thread's store-to-load dependences and
// the memory consistency model.
//
// Filters decide which loads need the second access (replay_decision):
// no-reorder, no-recent-miss and no-recent-snoop (each a flag and age register,
// recent_event_filter) and no-unresolved-store (a mark taken at issue). A
// PC-indexed one-bit dependence predictor (dep_predictor) is trained by
// replay squashes. The load that caused a squash is re-executed without a
// replay: the first load allocated after a squash carries a no-replay bit.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   mode            : filter configuration (vbr_pkg::filter_mode_e).
//   alloc_*         : load dispatch into the FIFO, in program order.
//   issue_*/exec_*  : premature issue marks and premature completion.
//   dp_*            : dependence predictor lookup (result next cycle).
//   flush_*         : core recovery (e.g. a branch misprediction) dropping
//                     loads from flush_age on; must not reach loads already in
//                     the back end.
//   fill_event      : a cache block arrived from another processor's cache.
//   snoop_event     : an external write/invalidation was observed.
//   ret_*           : in-order stream of completed instructions from the ROB.
//   dc_*            : the single back-end L1D port (stores at commit, replays).
//   squash_*        : replay squash; the core restarts at squash_pc.
//   commit_*        : one pulse per committed instruction.
//   events, leave_age, miss_flag, snoop_flag, lq_count : observation.
// The structure follows the design; sizes are its 128-entry queue and 4k-entry
// predictor. Widths, handshakes and the flush port are this design's choices.
module vbr_top
  import vbr_pkg::*;
#(
  parameter int unsigned LQ_DEPTH   = 128,
  parameter int unsigned DP_ENTRIES = 4096,
  localparam int unsigned AGE_W     = $clog2(LQ_DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  filter_mode_e     mode,
  // dispatch
  input  logic             alloc_valid,
  input  pc_t              alloc_pc,
  output logic             alloc_ready,
  output logic [AGE_W-1:0] alloc_age,
  // premature issue and completion
  input  logic             issue_valid,
  input  logic [AGE_W-1:0] issue_age,
  input  logic             issue_nus,
  input  logic             issue_older_st_incomplete,
  input  logic             exec_valid,
  input  logic [AGE_W-1:0] exec_age,
  input  addr_t            exec_addr,
  input  data_t            exec_data,
  // dependence predictor lookup
  input  pc_t              dp_lookup_pc,
  output logic             dp_lookup_wait,
  // core recovery
  input  logic             flush_valid,
  input  logic [AGE_W-1:0] flush_age,
  // cache-hierarchy events
  input  logic             fill_event,
  input  logic             snoop_event,
  // retirement stream
  input  logic             ret_valid,
  input  inst_kind_e       ret_kind,
  input  addr_t            ret_st_addr,
  input  data_t            ret_st_data,
  output logic             ret_ready,
  // back-end L1D port
  output logic             dc_req_valid,
  output logic             dc_req_we,
  output addr_t            dc_req_addr,
  output data_t            dc_req_wdata,
  input  logic             dc_req_ready,
  input  logic             dc_resp_valid,
  input  data_t            dc_resp_data,
  // squash and commit
  output logic             squash_valid,
  output logic [AGE_W-1:0] squash_age,
  output pc_t              squash_pc,
  output logic             commit_valid,
  output inst_kind_e       commit_kind,
  output data_t            commit_data,
  output logic [AGE_W-1:0] commit_age,
  // observation
  output vbr_events_t      events,
  output logic [AGE_W-1:0] leave_age,
  output logic             miss_flag,
  output logic             snoop_flag,
  output logic [AGE_W-1:0] lq_count
);

  logic             lq_rd_valid, lq_take, lq_pop, lq_empty, lq_unreplayed;
  lq_entry_t        lq_rd_entry;
  logic [AGE_W-1:0] lq_rd_age, lq_youngest;
  logic             rewind_valid;
  logic [AGE_W-1:0] rewind_age;
  logic             noreplay_pending;
  logic             train_valid;
  logic             miss_force, snoop_force;
  logic             window_loads, r_load;
  logic [AGE_W-1:0] window_youngest;
  logic             st_req, st_gnt, ld_req, ld_gnt;
  addr_t            st_addr, ld_addr;
  data_t            st_wdata;

  // a replay squash takes precedence: it is older than anything the core flushes
  assign rewind_valid = squash_valid || flush_valid;
  assign rewind_age   = squash_valid ? squash_age : flush_age;

  load_fifo #(.DEPTH(LQ_DEPTH)) u_lq (
    .clk                      (clk),
    .rst_n                    (rst_n),
    .alloc_valid              (alloc_valid),
    .alloc_pc                 (alloc_pc),
    .alloc_no_replay          (noreplay_pending),
    .alloc_ready              (alloc_ready),
    .alloc_age                (alloc_age),
    .issue_valid              (issue_valid),
    .issue_age                (issue_age),
    .issue_nus                (issue_nus),
    .issue_older_st_incomplete(issue_older_st_incomplete),
    .exec_valid               (exec_valid),
    .exec_age                 (exec_age),
    .exec_addr                (exec_addr),
    .exec_data                (exec_data),
    .rd_valid                 (lq_rd_valid),
    .rd_entry                 (lq_rd_entry),
    .rd_age                   (lq_rd_age),
    .rd_take                  (lq_take),
    .pop                      (lq_pop),
    .rewind_valid             (rewind_valid),
    .rewind_age               (rewind_age),
    .empty                    (lq_empty),
    .unreplayed               (lq_unreplayed),
    .youngest_age             (lq_youngest),
    .count                    (lq_count)
  );

  // Rule 3: after a replay squash the core restarts at the squashing load, so
  // the next load it dispatches is that load; it must not be replayed again.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          noreplay_pending <= 1'b0;
    else if (squash_valid)               noreplay_pending <= 1'b1;
    else if (alloc_valid && alloc_ready) noreplay_pending <= 1'b0;
  end

  // Loads that have not yet left the replay stage: those still in the FIFO
  // ahead of it, one being allocated now, and one held in the replay stage.
  // The youngest of them is the one being allocated or else the newest FIFO
  // entry (a load held in the replay stage with none behind it is that entry).
  assign window_loads    = lq_unreplayed || (alloc_valid && alloc_ready) || r_load;
  assign window_youngest = (alloc_valid && alloc_ready) ? alloc_age : lq_youngest;

  recent_event_filter #(.AGE_W(AGE_W)) u_miss_filter (
    .clk         (clk),
    .rst_n       (rst_n),
    .event_i     (fill_event),
    .window_loads(window_loads),
    .youngest_age(window_youngest),
    .leave_valid (events.r_leave),
    .leave_age   (leave_age),
    .force_replay(miss_force),
    .flag        (miss_flag)
  );

  recent_event_filter #(.AGE_W(AGE_W)) u_snoop_filter (
    .clk         (clk),
    .rst_n       (rst_n),
    .event_i     (snoop_event),
    .window_loads(window_loads),
    .youngest_age(window_youngest),
    .leave_valid (events.r_leave),
    .leave_age   (leave_age),
    .force_replay(snoop_force),
    .flag        (snoop_flag)
  );

  dep_predictor #(.ENTRIES(DP_ENTRIES)) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .lookup_pc  (dp_lookup_pc),
    .lookup_wait(dp_lookup_wait),
    .train_valid(train_valid),
    .train_pc   (squash_pc)
  );

  replay_pipeline #(.AGE_W(AGE_W)) u_pipe (
    .clk          (clk),
    .rst_n        (rst_n),
    .mode         (mode),
    .miss_force   (miss_force),
    .snoop_force  (snoop_force),
    .ret_valid    (ret_valid),
    .ret_kind     (ret_kind),
    .ret_st_addr  (ret_st_addr),
    .ret_st_data  (ret_st_data),
    .ret_ready    (ret_ready),
    .lq_rd_valid  (lq_rd_valid),
    .lq_rd_entry  (lq_rd_entry),
    .lq_rd_age    (lq_rd_age),
    .lq_take      (lq_take),
    .lq_pop       (lq_pop),
    .st_req       (st_req),
    .st_addr      (st_addr),
    .st_wdata     (st_wdata),
    .st_gnt       (st_gnt),
    .ld_req       (ld_req),
    .ld_addr      (ld_addr),
    .ld_gnt       (ld_gnt),
    .dc_resp_valid(dc_resp_valid),
    .dc_resp_data (dc_resp_data),
    .squash_valid (squash_valid),
    .squash_age   (squash_age),
    .squash_pc    (squash_pc),
    .train_valid  (train_valid),
    .commit_valid (commit_valid),
    .commit_kind  (commit_kind),
    .commit_data  (commit_data),
    .commit_age   (commit_age),
    .events       (events),
    .leave_age    (leave_age),
    .r_load       (r_load)
  );

  cache_port_arbiter u_arb (
    .st_req    (st_req),
    .st_addr   (st_addr),
    .st_wdata  (st_wdata),
    .ld_req    (ld_req),
    .ld_addr   (ld_addr),
    .st_gnt    (st_gnt),
    .ld_gnt    (ld_gnt),
    .port_req  (dc_req_valid),
    .port_we   (dc_req_we),
    .port_addr (dc_req_addr),
    .port_wdata(dc_req_wdata),
    .port_ready(dc_req_ready)
  );

endmodule
