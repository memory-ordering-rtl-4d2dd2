// replay_pipeline: the replay, compare and commit stages of value-based ordering.
//
// Every instruction leaving the reorder buffer in program order flows through
// three stages: R (replay), C (compare) and M (commit). Only loads and stores
// cause work:
//   R  A load takes its entry from the load FIFO. replay_decision says whether
//      it replays. A replaying load reuses its premature address and reads the
//      L1 data cache through the back-end port, but only when no older store is
//      still in C or M (all prior stores have written the cache) and no earlier
//      replay read is still outstanding (replays stay in program order, and a
//      slow replay holds back the ones after it). At most one replay per cycle.
//   C  The replayed value comes back and is compared with the premature value.
//      Equal: the load moves on. Different: a squash is raised for this load
//      and everything younger; R and C are emptied, the load FIFO is rewound,
//      and the dependence predictor bit of the load's PC is set if the load
//      had issued past an unresolved store address.
//   M  Stores write the cache here, with priority on the shared port; loads
//      leave the load FIFO.
// Filtered loads pass R and C without any cache access or compare.
//
// Interface and timing:
//   ret_*     : in-order instruction stream from the reorder buffer, valid/ready.
//               A load is only accepted when its FIFO entry has executed.
//   lq_*      : FIFO read port at the replay pointer, take and commit pop.
//   st_*/ld_* : requests to cache_port_arbiter and its grants.
//   dc_resp_* : replay read data, one response per accepted read, in order, at
//               least one cycle after the request (one cycle on an L1 hit gives
//               one replay per cycle).
//   squash_*  : one-cycle pulse with the squashing load's age and PC.
//   commit_*  : one-cycle pulse per committed instruction.
// The stages, the ordering rules and the priority follow the design; squashing
// the load itself together with younger instructions (it is then re-executed
// and, by rule 3, not replayed again), the handshakes and training only on
// loads marked no-unresolved-store are this design's choices.
module replay_pipeline
  import vbr_pkg::*;
#(
  parameter int unsigned AGE_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  filter_mode_e     mode,
  input  logic             miss_force,
  input  logic             snoop_force,
  // in-order retirement stream
  input  logic             ret_valid,
  input  inst_kind_e       ret_kind,
  input  addr_t            ret_st_addr,
  input  data_t            ret_st_data,
  output logic             ret_ready,
  // load FIFO
  input  logic             lq_rd_valid,
  input  lq_entry_t        lq_rd_entry,
  input  logic [AGE_W-1:0] lq_rd_age,
  output logic             lq_take,
  output logic             lq_pop,
  // cache port (through the arbiter)
  output logic             st_req,
  output addr_t            st_addr,
  output data_t            st_wdata,
  input  logic             st_gnt,
  output logic             ld_req,
  output addr_t            ld_addr,
  input  logic             ld_gnt,
  input  logic             dc_resp_valid,
  input  data_t            dc_resp_data,
  // squash and predictor training
  output logic             squash_valid,
  output logic [AGE_W-1:0] squash_age,
  output pc_t              squash_pc,
  output logic             train_valid,
  // commit
  output logic             commit_valid,
  output inst_kind_e       commit_kind,
  output data_t            commit_data,
  output logic [AGE_W-1:0] commit_age,
  // observation
  output vbr_events_t      events,
  output logic [AGE_W-1:0] leave_age,
  output logic             r_load    // the replay stage holds a load
);

  // ---------------- stage registers ----------------
  logic             r_valid, c_valid, m_valid;
  inst_kind_e       r_kind, c_kind, m_kind;
  lq_entry_t        r_entry, c_entry;
  logic [AGE_W-1:0] r_age, c_age, m_age;
  addr_t            r_st_addr, c_st_addr, m_st_addr;
  data_t            r_st_data, c_st_data, m_st_data;
  logic             c_replayed, c_have;
  data_t            c_rdata_q;
  data_t            m_data;

  // ---------------- M: commit ----------------
  logic m_done, m_free;
  assign st_req   = m_valid && m_kind == IK_STORE;
  assign st_addr  = m_st_addr;
  assign st_wdata = m_st_data;
  assign m_done   = m_valid && (m_kind != IK_STORE || st_gnt);
  assign m_free   = !m_valid || m_done;

  // ---------------- C: compare ----------------
  logic  c_pending, c_data_ok, mismatch, c_adv, c_free;
  data_t c_rdata;
  assign c_pending = c_valid && c_replayed && !c_have;
  assign c_data_ok = !c_replayed || c_have || dc_resp_valid;
  assign c_rdata   = c_have ? c_rdata_q : dc_resp_data;
  assign mismatch  = c_valid && c_kind == IK_LOAD && c_replayed && c_data_ok
                     && (c_rdata != c_entry.data);
  assign c_adv     = c_valid && c_data_ok && !mismatch && m_free;
  assign c_free    = !c_valid || c_adv;

  // ---------------- R: replay ----------------
  logic r_is_load, r_replay, r_raw, r_rule3, older_store, r_need, r_adv, r_free;
  assign r_is_load = r_valid && r_kind == IK_LOAD;

  replay_decision u_decision (
    .mode       (mode),
    .nus        (r_entry.nus),
    .reordered  (r_entry.reordered),
    .no_replay  (r_entry.no_replay),
    .miss_force (miss_force),
    .snoop_force(snoop_force),
    .replay     (r_replay),
    .raw_replay (r_raw),
    .rule3_skip (r_rule3)
  );

  assign r_need      = r_is_load && r_replay;
  // rule 1: every older store has written the cache
  assign older_store = (c_valid && c_kind == IK_STORE) || (m_valid && m_kind == IK_STORE);
  assign ld_req      = r_need && !older_store && c_free && !mismatch;
  assign ld_addr     = r_entry.addr;
  assign r_adv       = r_valid && !mismatch && c_free && (!r_need || ld_gnt);
  assign r_free      = !r_valid || r_adv;

  assign ret_ready = r_free && !mismatch && (ret_kind != IK_LOAD || lq_rd_valid);
  assign lq_take   = ret_valid && ret_ready && ret_kind == IK_LOAD;

  // ---------------- outputs ----------------
  assign lq_pop       = m_done && m_kind == IK_LOAD;
  assign squash_valid = mismatch;
  assign squash_age   = c_age;
  assign squash_pc    = c_entry.pc;
  assign train_valid  = mismatch && c_entry.nus;
  assign commit_valid = m_done;
  assign commit_kind  = m_kind;
  assign commit_data  = m_data;
  assign commit_age   = m_age;
  assign leave_age    = r_age;
  assign r_load       = r_is_load;

  always_comb begin
    events                  = '0;
    events.replay_issued    = ld_gnt;
    events.replay_filtered  = r_adv && r_is_load && !r_need;
    events.raw_replay       = ld_gnt && r_raw;
    events.rule3_skip       = r_adv && r_is_load && r_rule3;
    events.store_wait       = r_need && older_store;
    events.replay_miss_wait = c_pending && !dc_resp_valid;
    events.squash           = mismatch;
    events.r_leave          = r_adv && r_is_load;
  end

  // ---------------- stage advance ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      c_valid <= 1'b0;
      m_valid <= 1'b0;
      c_have  <= 1'b0;
    end else begin
      if (m_free) m_valid <= c_adv;

      if (mismatch)    c_valid <= 1'b0;
      else if (c_free) c_valid <= r_adv;

      if (c_free || mismatch)          c_have <= 1'b0;
      else if (c_pending && dc_resp_valid) c_have <= 1'b1;

      if (mismatch)    r_valid <= 1'b0;
      else if (r_free) r_valid <= ret_valid && ret_ready;
    end
  end

  always_ff @(posedge clk) begin
    if (m_free && c_adv) begin
      m_kind    <= c_kind;
      m_age     <= c_age;
      m_st_addr <= c_st_addr;
      m_st_data <= c_st_data;
      m_data    <= c_replayed ? c_rdata : c_entry.data;
    end
    if (c_free && r_adv) begin
      c_kind     <= r_kind;
      c_entry    <= r_entry;
      c_age      <= r_age;
      c_st_addr  <= r_st_addr;
      c_st_data  <= r_st_data;
      c_replayed <= r_need;
    end
    if (c_pending && dc_resp_valid) c_rdata_q <= dc_resp_data;
    if (r_free && ret_valid && ret_ready) begin
      r_kind    <= ret_kind;
      r_entry   <= lq_rd_entry;
      r_age     <= lq_rd_age;
      r_st_addr <= ret_st_addr;
      r_st_data <= ret_st_data;
    end
  end

  // Replay reads are one at a time: a response only comes for a pending read.
  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    dc_resp_valid |-> c_pending);
  // A replay load never shares the port with a store (rule 1).
  a_no_port_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(ld_req && st_req));

endmodule
