// tb_vbr_scenarios: directed end-to-end cases for the value-based ordering
// back end at its full default size (128-entry load queue, 4k predictor).
//
// The testbench plays the core step by step: it dispatches loads, reports
// their premature issue and completion, writes memory as another processor,
// pulses the fill and snoop events, and presents the in-order retirement
// stream. A word memory sits behind the back-end port; a read returns the
// value the memory held when it was accepted, LAT cycles later.
//
// Cases, each from reset:
//   1. Five loads in order, no events, no-recent-snoop configuration: no
//      replay, no cache read, commits three cycles after retirement.
//   2. The classic two-processor case: p1 loads A, B, C, D, E and C runs
//      ahead of B, which misses; p2 writes C and then B before B's miss
//      returns. C's premature value is stale. With the snoop filter the
//      writes force replays, C's replay differs, C is squashed, re-executed
//      without a replay (rule 3), and D and E replay until the flagged load
//      has left.
//   3. A fill event with no write: the snoop configuration ignores it, the
//      miss configuration replays exactly the loads that were in the window.
//   4. Case 2 under the no-reorder filter: only C, issued while B was
//      incomplete, replays.
//   5. A load bypasses an older store with an unresolved address and reads a
//      stale value: its replay waits for the store to reach the cache,
//      squashes, and sets the predictor bit of its PC.
//   6. Persistent contention: the re-executed load is written again before it
//      retires; it still commits, with no second squash.
//   7. Replay bandwidth with replay-all: one replay per cycle with a one-cycle
//      cache, and one per LAT cycles with a slower one.
// Every case checks commit order, values and ages, and the exact number of
// replays, squashes and rule-3 skips the design's rules give (a rule-3 skip is
// counted only for a load that would otherwise have replayed). The three-cycle
// retire-to-commit latency and the replay spacing are this design's timing.
module tb_vbr_scenarios;
  import vbr_pkg::*;
  localparam int unsigned LQ_DEPTH = 128;
  localparam int unsigned AGE_W    = $clog2(LQ_DEPTH) + 1;
  typedef logic [AGE_W-1:0] age_t;

  logic clk = 0, rst_n = 0;
  filter_mode_e mode;
  logic alloc_valid, alloc_ready;
  pc_t  alloc_pc;
  age_t alloc_age, issue_age, exec_age, flush_age, squash_age, commit_age, leave_age;
  logic issue_valid, issue_nus, issue_older_st_incomplete, exec_valid;
  addr_t exec_addr;
  data_t exec_data;
  pc_t  dp_lookup_pc, squash_pc;
  logic dp_lookup_wait, flush_valid, fill_event, snoop_event;
  logic ret_valid, ret_ready;
  inst_kind_e ret_kind, commit_kind;
  addr_t ret_st_addr, dc_req_addr;
  data_t ret_st_data, dc_req_wdata, dc_resp_data, commit_data;
  logic dc_req_valid, dc_req_we, dc_req_ready, dc_resp_valid;
  logic squash_valid, commit_valid, miss_flag, snoop_flag;
  vbr_events_t events;
  age_t lq_count;

  vbr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s", $time, what);
    end
  endtask

  // ---------------- memory behind the back-end port ----------------
  localparam addr_t A = 64'h00, B = 64'h08, C = 64'h10, D = 64'h18, E = 64'h20, X = 64'h28;
  data_t mem [8];
  int    lat;
  logic  pend;
  int    pend_cnt;
  data_t pend_data;
  logic  ext_we;
  addr_t ext_addr;
  data_t ext_val;

  function automatic int widx(input addr_t a);
    return int'(a[5:3]);
  endfunction
  function automatic data_t init_val(input int w);
    return 64'h100 + data_t'(w) * 8;
  endfunction

  assign dc_req_ready  = 1'b1;
  assign dc_resp_valid = pend && pend_cnt == 1;
  assign dc_resp_data  = pend_data;

  always @(posedge clk) begin
    if (!rst_n) begin
      pend <= 1'b0;
      for (int w = 0; w < 8; w++) mem[w] <= init_val(w);
    end else begin
      if (pend && pend_cnt == 1) pend <= 1'b0;
      else if (pend)             pend_cnt <= pend_cnt - 1;
      if (ext_we) mem[widx(ext_addr)] <= ext_val;
      if (dc_req_valid && dc_req_ready) begin
        if (dc_req_we) mem[widx(dc_req_addr)] <= dc_req_wdata;
        else begin
          pend      <= 1'b1;
          pend_cnt  <= lat;
          pend_data <= mem[widx(dc_req_addr)];
        end
      end
    end
  end

  // ---------------- monitor ----------------
  typedef struct {
    inst_kind_e kind;
    data_t      data;
    age_t       age;
    int         cyc;
  } commit_t;
  commit_t clog[$];
  int   gnt_cyc[$];
  int   cyc = 0;
  int   n_commit, n_squash, n_replay, n_filt, n_raw, n_rule3, n_stwait, n_mwait, n_rd;
  age_t sq_age;
  pc_t  sq_pc;

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      clog.delete();
      gnt_cyc.delete();
      n_commit = 0; n_squash = 0; n_replay = 0; n_filt = 0; n_raw = 0;
      n_rule3 = 0; n_stwait = 0; n_mwait = 0; n_rd = 0;
    end else begin
      if (commit_valid) begin
        clog.push_back('{commit_kind, commit_data, commit_age, cyc});
        n_commit++;
      end
      if (squash_valid) begin
        n_squash++;
        sq_age = squash_age;
        sq_pc  = squash_pc;
      end
      if (events.replay_issued) begin
        n_replay++;
        gnt_cyc.push_back(cyc);
      end
      if (events.replay_filtered)  n_filt++;
      if (events.raw_replay)       n_raw++;
      if (events.rule3_skip)       n_rule3++;
      if (events.store_wait)       n_stwait++;
      if (events.replay_miss_wait) n_mwait++;
      if (dc_req_valid && !dc_req_we && dc_req_ready) n_rd++;
    end
  end

  // ---------------- core-side drivers ----------------
  function automatic pc_t pc_of(input int i);
    return 64'h4000 + pc_t'(i) * 4;
  endfunction

  task automatic reset_to(input filter_mode_e m, input int l);
    @(negedge clk);
    rst_n = 1'b0;
    mode = m;
    lat  = l;
    alloc_valid = 0; alloc_pc = '0;
    issue_valid = 0; issue_age = '0; issue_nus = 0; issue_older_st_incomplete = 0;
    exec_valid = 0; exec_age = '0; exec_addr = '0; exec_data = '0;
    dp_lookup_pc = '0; flush_valid = 0; flush_age = '0;
    fill_event = 0; snoop_event = 0;
    ret_valid = 0; ret_kind = IK_OTHER; ret_st_addr = '0; ret_st_data = '0;
    ext_we = 0; ext_addr = '0; ext_val = '0;
    ret_cyc.delete();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic dispatch(input pc_t pc, output age_t age);
    alloc_valid = 1'b1;
    alloc_pc    = pc;
    #1;
    while (!alloc_ready) begin
      @(negedge clk);
      #1;
    end
    age = alloc_age;
    @(negedge clk);
    alloc_valid = 1'b0;
  endtask

  task automatic issue(input age_t age, input logic nus, input logic ost);
    issue_valid = 1'b1;
    issue_age   = age;
    issue_nus   = nus;
    issue_older_st_incomplete = ost;
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  task automatic complete(input age_t age, input addr_t a, input data_t d);
    exec_valid = 1'b1;
    exec_age   = age;
    exec_addr  = a;
    exec_data  = d;
    @(negedge clk);
    exec_valid = 1'b0;
  endtask

  // another processor writes a word; snp says whether the core sees it
  task automatic remote_write(input addr_t a, input data_t v, input logic snp);
    ext_we      = 1'b1;
    ext_addr    = a;
    ext_val     = v;
    snoop_event = snp;
    @(negedge clk);
    ext_we      = 1'b0;
    snoop_event = 1'b0;
  endtask

  task automatic pulse_fill();
    fill_event = 1'b1;
    @(negedge clk);
    fill_event = 1'b0;
  endtask

  // dispatch, issue and complete one load in program order with value d
  task automatic load_in_order(input int i, input addr_t a, input data_t d, output age_t age);
    dispatch(pc_of(i), age);
    issue(age, 1'b0, 1'b0);
    complete(age, a, d);
  endtask

  // in-order retirement stream; stops at a squash
  typedef struct {
    inst_kind_e kind;
    addr_t      a;
    data_t      d;
  } ritem_t;
  ritem_t rq[$];
  int     ret_cyc[$];

  task automatic push_load();
    rq.push_back('{IK_LOAD, '0, '0});
  endtask
  task automatic push_store(input addr_t a, input data_t d);
    rq.push_back('{IK_STORE, a, d});
  endtask

  task automatic retire_run();
    int  sq0;
    bit  hs;
    sq0 = n_squash;
    while (rq.size() != 0 && n_squash == sq0) begin
      ret_valid   = 1'b1;
      ret_kind    = rq[0].kind;
      ret_st_addr = rq[0].a;
      ret_st_data = rq[0].d;
      #1;
      hs = ret_ready;
      @(negedge clk);
      if (hs) begin
        ret_cyc.push_back(cyc);
        void'(rq.pop_front());
      end
    end
    ret_valid = 1'b0;
    rq.delete();
  endtask

  task automatic wait_commits(input int n);
    int t = 0;
    while (n_commit < n && t < 200) begin
      @(negedge clk);
      t++;
    end
    check(n_commit == n, $sformatf("expected %0d commits, saw %0d", n, n_commit));
  endtask

  task automatic wait_squash(input int n);
    int t = 0;
    while (n_squash < n && t < 200) begin
      @(negedge clk);
      t++;
    end
    check(n_squash == n, $sformatf("expected %0d squashes, saw %0d", n, n_squash));
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_commit(input int k, input inst_kind_e kind, input data_t d, input age_t age);
    check(k < clog.size(), $sformatf("commit %0d missing", k));
    if (k < clog.size()) begin
      check(clog[k].kind == kind, $sformatf("commit %0d kind", k));
      check(clog[k].data == d,
            $sformatf("commit %0d data %h, expected %h", k, clog[k].data, d));
      check(clog[k].age == age, $sformatf("commit %0d age %0d, expected %0d", k, clog[k].age, age));
    end
  endtask

  task automatic expect_counts(input string tag, input int rep, input int sq, input int r3);
    check(n_replay == rep, $sformatf("%s: %0d replays, expected %0d", tag, n_replay, rep));
    check(n_squash == sq,  $sformatf("%s: %0d squashes, expected %0d", tag, n_squash, sq));
    check(n_rule3 == r3,   $sformatf("%s: %0d rule-3 skips, expected %0d", tag, n_rule3, r3));
    check(n_rd == n_replay, $sformatf("%s: %0d port reads for %0d replays", tag, n_rd, n_replay));
  endtask

  // predictor lookup; the answer comes one cycle later
  task automatic dp_expect(input pc_t pc, input logic want, input string tag);
    dp_lookup_pc = pc;
    @(negedge clk);
    check(dp_lookup_wait == want, $sformatf("%s: predictor bit %0b, expected %0b", tag, dp_lookup_wait, want));
  endtask

  // ---------------- cases ----------------
  age_t ag [8];
  age_t tmp;

  // p1: A, B, C, D, E with C ahead of B; p2 writes C then B before B returns.
  // snp: whether the writes are seen as snoops.
  task automatic two_processor_case(input logic snp);
    for (int i = 0; i < 5; i++) dispatch(pc_of(i), ag[i]);
    issue(ag[0], 1'b0, 1'b0);
    complete(ag[0], A, init_val(0));
    issue(ag[1], 1'b0, 1'b0);                 // B misses
    issue(ag[2], 1'b0, 1'b0);                 // C issues while B is incomplete
    complete(ag[2], C, init_val(2));          // stale C
    remote_write(C, 64'h210, snp);
    remote_write(B, 64'h208, snp);
    pulse_fill();                             // B's block arrives from p2
    complete(ag[1], B, 64'h208);
    issue(ag[3], 1'b0, 1'b0);
    complete(ag[3], D, init_val(3));
    issue(ag[4], 1'b0, 1'b0);
    complete(ag[4], E, init_val(4));
  endtask

  task automatic two_processor_recover();
    for (int i = 2; i < 5; i++) begin
      dispatch(pc_of(i), tmp);
      check(tmp == ag[i], $sformatf("re-dispatched load %0d got age %0d, expected %0d", i, tmp, ag[i]));
    end
    issue(ag[2], 1'b0, 1'b0);
    complete(ag[2], C, 64'h210);
    issue(ag[3], 1'b0, 1'b0);
    complete(ag[3], D, init_val(3));
    issue(ag[4], 1'b0, 1'b0);
    complete(ag[4], E, init_val(4));
    repeat (3) push_load();
    retire_run();
    wait_commits(5);
    expect_commit(0, IK_LOAD, init_val(0), ag[0]);
    expect_commit(1, IK_LOAD, 64'h208, ag[1]);
    expect_commit(2, IK_LOAD, 64'h210, ag[2]);
    expect_commit(3, IK_LOAD, init_val(3), ag[3]);
    expect_commit(4, IK_LOAD, init_val(4), ag[4]);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- 1: in order, nothing to replay ----
    reset_to(FM_NO_RECENT_SNOOP, 1);
    for (int i = 0; i < 5; i++) load_in_order(i, addr_t'(i * 8), init_val(i), ag[i]);
    check(ag[0] == '0 && ag[4] == age_t'(4), "case 1: ages count from zero");
    check(lq_count == age_t'(5), "case 1: five loads in the queue");
    repeat (5) push_load();
    retire_run();
    wait_commits(5);
    for (int i = 0; i < 5; i++) begin
      expect_commit(i, IK_LOAD, init_val(i), ag[i]);
      if (i < clog.size() && i < ret_cyc.size())
        check(clog[i].cyc == ret_cyc[i] + 3, $sformatf("case 1: commit %0d latency %0d", i, clog[i].cyc - ret_cyc[i]));
    end
    expect_counts("case 1", 0, 0, 0);
    check(n_filt == 5, "case 1: five filtered loads");
    check(lq_count == '0, "case 1: queue empty after commit");

    // ---- 2: two processors, snoop filter ----
    reset_to(FM_NO_RECENT_SNOOP, 1);
    two_processor_case(1'b1);
    check(snoop_flag, "case 2: snoop flag set by the remote writes");
    repeat (5) push_load();
    retire_run();
    wait_squash(1);
    check(sq_age == ag[2] && sq_pc == pc_of(2), "case 2: squash names load C");
    check(n_commit == 2, "case 2: A and B committed before the squash");
    two_processor_recover();
    // A, B, C replay before the squash; D and E replay after it, because the
    // flag still waits for E; C is re-executed without a replay
    expect_counts("case 2", 5, 1, 1);
    check(!snoop_flag, "case 2: snoop flag cleared once E left");
    dp_expect(pc_of(2), 1'b0, "case 2: no training for a consistency squash");

    // ---- 3: fill event only; snoop and miss configurations ----
    for (int m = 0; m < 2; m++) begin
      reset_to(m == 0 ? FM_NO_RECENT_SNOOP : FM_NO_RECENT_MISS, 1);
      for (int i = 0; i < 4; i++) load_in_order(i, addr_t'(i * 8), init_val(i), ag[i]);
      pulse_fill();
      check(miss_flag && !snoop_flag, "case 3: fill sets only the miss flag");
      repeat (4) push_load();
      retire_run();
      wait_commits(4);
      check(!miss_flag, "case 3: miss flag cleared after the youngest load left");
      // loads dispatched after the flag cleared are not replayed
      for (int i = 4; i < 6; i++) load_in_order(i, addr_t'(i * 8), init_val(i), ag[i]);
      repeat (2) push_load();
      retire_run();
      wait_commits(6);
      for (int i = 0; i < 6; i++) expect_commit(i, IK_LOAD, init_val(i), ag[i]);
      expect_counts(m == 0 ? "case 3 snoop" : "case 3 miss", m == 0 ? 0 : 4, 0, 0);
    end

    // ---- 4: two processors, no-reorder filter ----
    reset_to(FM_NO_REORDER, 1);
    two_processor_case(1'b1);
    repeat (5) push_load();
    retire_run();
    wait_squash(1);
    check(sq_age == ag[2], "case 4: squash names load C");
    two_processor_recover();
    // the re-executed C is now the oldest load, so it is in order and would
    // not replay anyway: no rule-3 skip is counted
    expect_counts("case 4", 1, 1, 0);

    // ---- 5: load bypasses an unresolved store ----
    reset_to(FM_NO_RECENT_SNOOP, 1);
    dp_expect(pc_of(7), 1'b0, "case 5: predictor clear after reset");
    dispatch(pc_of(7), ag[0]);                // load X, after store X
    dispatch(pc_of(8), ag[1]);                // load A
    issue(ag[0], 1'b1, 1'b1);
    complete(ag[0], X, init_val(5));          // stale: misses the store
    issue(ag[1], 1'b0, 1'b1);
    complete(ag[1], A, init_val(0));
    push_store(X, 64'h555);
    push_load();
    push_load();
    retire_run();
    wait_squash(1);
    check(sq_age == ag[0] && sq_pc == pc_of(7), "case 5: squash names load X");
    check(n_stwait >= 1, "case 5: replay waited for the older store");
    check(n_raw == 1, "case 5: one replay for the unresolved-store mark");
    check(mem[widx(X)] == 64'h555, "case 5: store reached memory before the replay");
    dp_expect(pc_of(7), 1'b1, "case 5: predictor trained on load X");
    dp_expect(pc_of(8), 1'b0, "case 5: predictor untouched for load A");
    dispatch(pc_of(7), tmp);
    check(tmp == ag[0], "case 5: re-dispatched load keeps its age");
    dispatch(pc_of(8), tmp);
    issue(ag[0], 1'b0, 1'b0);
    complete(ag[0], X, 64'h555);
    issue(ag[1], 1'b0, 1'b0);
    complete(ag[1], A, init_val(0));
    push_load();
    push_load();
    retire_run();
    wait_commits(3);
    check(clog.size() > 0 && clog[0].kind == IK_STORE, "case 5: store commits first");
    expect_commit(1, IK_LOAD, 64'h555, ag[0]);
    expect_commit(2, IK_LOAD, init_val(0), ag[1]);
    // re-executed after its store, load X no longer carries the mark
    expect_counts("case 5", 1, 1, 0);

    // ---- 6: contention continues after the squash ----
    reset_to(FM_NO_RECENT_SNOOP, 1);
    load_in_order(0, C, init_val(2), ag[0]);
    remote_write(C, 64'h310, 1'b1);
    push_load();
    retire_run();
    wait_squash(1);
    dispatch(pc_of(0), tmp);
    issue(ag[0], 1'b0, 1'b0);
    complete(ag[0], C, 64'h310);
    remote_write(C, 64'h410, 1'b1);           // written again before retirement
    check(snoop_flag, "case 6: flag set again");
    push_load();
    retire_run();
    wait_commits(1);
    repeat (4) @(negedge clk);
    expect_commit(0, IK_LOAD, 64'h310, ag[0]);
    expect_counts("case 6", 1, 1, 1);
    check(!snoop_flag, "case 6: flag cleared when the flagged load left");

    // ---- 7: replay bandwidth ----
    for (int l = 1; l <= 3; l += 2) begin
      reset_to(FM_REPLAY_ALL, l);
      for (int i = 0; i < 8; i++) load_in_order(i, addr_t'(i * 8), init_val(i), tmp);
      repeat (8) push_load();
      retire_run();
      wait_commits(8);
      expect_counts($sformatf("case 7 latency %0d", l), 8, 0, 0);
      for (int i = 1; i < gnt_cyc.size(); i++)
        check(gnt_cyc[i] - gnt_cyc[i-1] == l,
              $sformatf("case 7: replays %0d cycles apart with latency %0d", gnt_cyc[i] - gnt_cyc[i-1], l));
      check(n_mwait == 8 * (l - 1), $sformatf("case 7: %0d slow-replay wait cycles", n_mwait));
      for (int i = 0; i < 8; i++) expect_commit(i, IK_LOAD, init_val(i), age_t'(i));
      if (l == 1)
        for (int i = 0; i < 8 && i < clog.size() && i < ret_cyc.size(); i++)
          check(clog[i].cyc == ret_cyc[i] + 3, "case 7: replayed load commits three cycles after retirement");
      ret_cyc.delete();
    end

    $display("cases done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
