// tb_vbr_top: end-to-end test of the value-based ordering back end at its full
// default size (128-entry load queue, 4k-entry predictor).
//
// The testbench plays the rest of the machine: an out-of-order core, a word
// memory behind the back-end cache port, and another processor that writes
// that memory. The core dispatches a looping program of loads, stores and
// other instructions in order, issues loads out of order, and gives each load
// a premature value:
//   * a load that bypasses an older store with an unresolved address gets the
//     memory value without that store (it may be stale) and is marked so;
//   * any other load gets the value program order asks for.
// Another processor writes random words while the design runs in the
// replay-all and no-recent-snoop configurations, and raises the snoop event;
// cache misses raise the fill event. The core restarts after every replay
// squash and sometimes flushes its youngest instructions (a branch
// misprediction).
//
// Reference: every committed load must return the value that program order
// and the memory give at the moment it passes the replay stage (a load that is
// re-executed after a squash, which rule 3 exempts from replay, must return
// its premature value). Commits must follow program order and every program
// must finish. The four filter configurations run in turn, each on a drained
// machine. Each mechanism is counted and must occur at least once: replays,
// filtered loads, one replay per cycle back to back, replays for the
// no-unresolved-store mark, waits for older stores, slow replay accesses,
// squashes for both reasons, rule-3 skips, the miss and snoop flags, the
// predictor holding a load, a full load queue, core flushes and a busy port.
module tb_vbr_top;
  import vbr_pkg::*;
  localparam int unsigned LQ_DEPTH = 128;
  localparam int unsigned AGE_W    = $clog2(LQ_DEPTH) + 1;
  localparam int NPROG   = 1500;   // instructions per configuration
  localparam int WIN     = 256;    // reorder-buffer size
  localparam int NWORDS  = 8;

  logic clk = 0, rst_n = 0;
  filter_mode_e mode;
  logic alloc_valid, alloc_ready;
  pc_t  alloc_pc;
  logic [AGE_W-1:0] alloc_age, issue_age, exec_age, flush_age, squash_age, commit_age, leave_age;
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
  logic [AGE_W-1:0] lq_count;

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

  // ---------------- program ----------------
  inst_kind_e p_kind [NPROG];
  int         p_word [NPROG];
  data_t      p_sdata [NPROG];
  function automatic pc_t p_pc(input int i);
    return pc_t'(32'h4000 + 4 * (i % 64));
  endfunction
  function automatic addr_t w2a(input int w);
    return addr_t'(32'h1000 + 8 * w);
  endfunction

  // ---------------- per-instruction core state ----------------
  bit    s_issued [NPROG], s_done [NPROG], s_reexec [NPROG], s_nus [NPROG], s_expset [NPROG];
  int    s_age [NPROG];
  data_t s_val [NPROG], s_exp [NPROG];
  int    age_map [2*LQ_DEPTH];

  int disp_ptr, ret_ptr, commit_ptr;
  int reexec_idx;           // program index restarted by the last replay squash
  int exec_q;               // load completing this cycle (issued last cycle), -1 none
  int cand;                 // load looked up in the predictor this cycle, -1 none
  bit ext_writes;           // another processor writes memory in this phase
  bit retire_hold;          // the reorder buffer head is not ready (long-latency op)

  // ---------------- memory and cache-port model ----------------
  data_t mem [NWORDS];
  bit    resp_pending;
  int    resp_cnt;
  data_t resp_data;

  // ---------------- mechanism counters ----------------
  int c_replay, c_filtered, c_b2b, c_raw, c_store_wait, c_miss_wait, c_squash_raw, c_squash_cons;
  int c_rule3, c_miss_flag, c_snoop_flag, c_dp_hold, c_lq_full, c_flush, c_port_busy;
  int c_ext_write, c_fill, c_commit_ld;
  bit prev_replay;

  // value program order gives load i at this moment
  function automatic data_t overlay(input int i);
    data_t v = mem[p_word[i]];
    for (int j = commit_ptr; j < i; j++)
      if (p_kind[j] == IK_STORE && p_word[j] == p_word[i]) v = p_sdata[j];
    return v;
  endfunction
  function automatic bit older_store_inflight(input int i);
    for (int j = commit_ptr; j < i; j++) if (p_kind[j] == IK_STORE) return 1;
    return 0;
  endfunction

  task automatic make_program(input int seed_base, input int load_pct);
    for (int i = 0; i < NPROG; i++) begin
      int r = $urandom % 100;
      p_kind[i]  = (r < load_pct) ? IK_LOAD : (r < load_pct + 20) ? IK_STORE : IK_OTHER;
      p_word[i]  = $urandom % NWORDS;
      p_sdata[i] = data_t'({32'(seed_base), 32'(i)});
      s_issued[i] = 0; s_done[i] = 0; s_reexec[i] = 0; s_nus[i] = 0; s_expset[i] = 0;
    end
  endtask

  // drop every instruction from index f on (not yet in the back end)
  task automatic drop_from(input int f);
    for (int j = f; j < NPROG; j++) begin
      s_issued[j] = 0; s_done[j] = 0; s_nus[j] = 0; s_expset[j] = 0;
    end
    disp_ptr = f;
    if (exec_q >= f) exec_q = -1;
    if (cand >= f) cand = -1;
  endtask

  // one cycle: drive at the falling edge, sample, update at the rising edge
  task automatic cycle(input bit allow_dispatch);
    int  next_cand, fl_idx, fl_load, sq_idx;
    bit  do_flush, acc, ext_now, fill_now, hold;
    int  ext_w;
    data_t ext_v;
    @(negedge clk);
    // ---- core flush (no dispatch in the same cycle) ----
    do_flush = 0; fl_idx = -1; fl_load = -1;
    flush_valid = 0; flush_age = '0;
    if (disp_ptr - ret_ptr > 4 && $urandom % 150 == 0) begin
      fl_idx = ret_ptr + 2 + $urandom % (disp_ptr - ret_ptr - 2);
      do_flush = 1;
      for (int k = fl_idx; k < disp_ptr; k++) if (p_kind[k] == IK_LOAD) begin fl_load = k; break; end
      if (fl_load >= 0) begin
        flush_valid = 1;
        flush_age = AGE_W'(s_age[fl_load]);
      end
    end
    // ---- dispatch ----
    alloc_valid = 0;
    alloc_pc = '0;
    if (allow_dispatch && !do_flush && disp_ptr < NPROG && disp_ptr - ret_ptr < WIN &&
        p_kind[disp_ptr] == IK_LOAD) begin
      alloc_valid = 1;
      alloc_pc = p_pc(disp_ptr);
    end
    // ---- premature completion of the load issued last cycle ----
    exec_valid = 0; exec_age = '0; exec_addr = '0; exec_data = '0;
    fill_now = 0;
    if (exec_q >= 0) begin
      exec_valid = 1;
      exec_age = AGE_W'(s_age[exec_q]);
      exec_addr = w2a(p_word[exec_q]);
      exec_data = s_nus[exec_q] ? mem[p_word[exec_q]] : overlay(exec_q);
      s_val[exec_q] = exec_data;
      if ($urandom % 20 == 0) fill_now = 1;   // premature access missed
    end
    // ---- premature issue of the candidate looked up last cycle ----
    issue_valid = 0; issue_age = '0; issue_nus = 0; issue_older_st_incomplete = 0;
    hold = 0;
    if (cand >= 0 && cand < disp_ptr && !s_issued[cand]) begin
      issue_valid = 1;
      issue_age = AGE_W'(s_age[cand]);
      hold = dp_lookup_wait;
      issue_nus = !hold && older_store_inflight(cand) && ($urandom % 3 == 0);
      issue_older_st_incomplete = issue_nus || (older_store_inflight(cand) && $urandom % 2);
    end
    // ---- choose the next candidate and look it up ----
    next_cand = -1;
    begin
      int lo = ret_ptr, hi = disp_ptr;
      if (hi > lo && $urandom % 4 != 0) begin
        int start = ($urandom % 2) ? lo : lo + $urandom % (hi - lo);
        for (int k = start; k < hi; k++)
          if (p_kind[k] == IK_LOAD && !s_issued[k] && k != cand) begin next_cand = k; break; end
      end
    end
    dp_lookup_pc = (next_cand >= 0) ? p_pc(next_cand) : '0;
    // ---- retirement stream ----
    ret_valid = !retire_hold && ret_ptr < disp_ptr &&
                (p_kind[ret_ptr] != IK_LOAD || (s_done[ret_ptr] && ret_ptr != exec_q));
    ret_kind = ret_valid ? p_kind[ret_ptr] : IK_OTHER;
    ret_st_addr = w2a(p_word[ret_ptr < NPROG ? ret_ptr : 0]);
    ret_st_data = p_sdata[ret_ptr < NPROG ? ret_ptr : 0];
    // ---- external events ----
    ext_now = ext_writes && ($urandom % 25 == 0);
    ext_w = $urandom % NWORDS;
    ext_v = {$urandom, $urandom};
    snoop_event = ext_now;
    // ---- cache port ----
    dc_req_ready = ($urandom % 8) != 0;
    dc_resp_valid = resp_pending && resp_cnt == 0;
    dc_resp_data = resp_data;
    if (dc_resp_valid && $urandom % 2) fill_now = 1;
    fill_event = fill_now;
    #1;
    // ---- sample ----
    if (dc_req_valid && !dc_req_ready) c_port_busy++;
    if (alloc_valid && !alloc_ready && lq_count == AGE_W'(LQ_DEPTH)) c_lq_full++;
    if (events.replay_issued) begin c_replay++; if (prev_replay) c_b2b++; end
    prev_replay = events.replay_issued;
    if (events.replay_filtered) c_filtered++;
    if (events.raw_replay) c_raw++;
    if (events.store_wait) c_store_wait++;
    if (events.replay_miss_wait) c_miss_wait++;
    if (events.rule3_skip) c_rule3++;
    if (miss_flag) c_miss_flag++;
    if (snoop_flag) c_snoop_flag++;
    if (hold) c_dp_hold++;
    if (ext_now) c_ext_write++;
    if (fill_now) c_fill++;
    // expected value of a load passing the replay stage
    if (events.r_leave) begin
      int li = age_map[leave_age];
      s_exp[li] = s_reexec[li] ? s_val[li] : overlay(li);
      s_expset[li] = 1;
    end
    if (commit_valid) begin
      check(commit_ptr < NPROG && commit_kind == p_kind[commit_ptr], "commit in program order");
      if (commit_kind == IK_LOAD) begin
        c_commit_ld++;
        check(s_expset[commit_ptr] && commit_data == s_exp[commit_ptr], "committed load value");
        if (commit_data != s_exp[commit_ptr] && failures < 20)
          $display("  load %0d word %0d got %h exp %h", commit_ptr, p_word[commit_ptr], commit_data, s_exp[commit_ptr]);
      end
    end
    sq_idx = squash_valid ? age_map[squash_age] : -1;
    if (squash_valid) begin
      check(!s_reexec[sq_idx], "a re-executed load never squashes again");
      check(squash_pc == p_pc(sq_idx), "squash PC");
      if (s_nus[sq_idx]) c_squash_raw++; else c_squash_cons++;
    end
    acc = alloc_valid && alloc_ready;
    // ---- rising edge: update the models ----
    @(posedge clk);
    // cache port
    if (dc_resp_valid) resp_pending = 0;
    else if (resp_pending && resp_cnt > 0) resp_cnt--;
    if (dc_req_valid && dc_req_ready) begin
      if (dc_req_we) mem[(dc_req_addr - 64'h1000) >> 3] = dc_req_wdata;
      else begin
        resp_pending = 1;
        resp_data = mem[(dc_req_addr - 64'h1000) >> 3];
        resp_cnt = ($urandom % 10 == 0) ? 2 + $urandom % 5 : 0;
      end
    end
    if (commit_valid) commit_ptr++;
    if (ext_now) mem[ext_w] = ext_v;
    // core
    if (exec_q >= 0) begin s_done[exec_q] = 1; exec_q = -1; end
    if (issue_valid) begin
      s_issued[cand] = 1;
      s_nus[cand] = issue_nus;
      exec_q = cand;
    end
    cand = next_cand;
    if (ret_valid && ret_ready) ret_ptr++;
    if (acc) begin
      s_age[disp_ptr] = int'(alloc_age);
      age_map[alloc_age] = disp_ptr;
      s_reexec[disp_ptr] = (disp_ptr == reexec_idx);
      reexec_idx = -1;
    end
    if (allow_dispatch && !do_flush && disp_ptr < NPROG && disp_ptr - ret_ptr < WIN &&
        (p_kind[disp_ptr] != IK_LOAD || acc))
      disp_ptr++;
    if (squash_valid) begin
      // restart at the squashing load; everything from it on is re-fetched
      drop_from(sq_idx);
      ret_ptr = sq_idx;
      reexec_idx = sq_idx;
    end else if (do_flush) begin
      c_flush++;
      drop_from(fl_idx);
    end
  endtask

  task automatic run_phase(input filter_mode_e m, input bit ext, input int seed, input int load_pct,
                           input int hold_retire);
    int guard = 0;
    mode = m;
    ext_writes = ext;
    make_program(seed, load_pct);
    disp_ptr = 0; ret_ptr = 0; commit_ptr = 0; reexec_idx = -1; exec_q = -1; cand = -1;
    while (commit_ptr < NPROG && guard < 60 * NPROG) begin
      retire_hold = guard < hold_retire;
      cycle(1);
      guard++;
    end
    check(commit_ptr == NPROG, "program finished");
    if (commit_ptr != NPROG)
      $display("  stuck: disp=%0d ret=%0d commit=%0d kind=%0d done=%0b issued=%0b age=%0d ret_valid=%0b ret_ready=%0b lq_count=%0d cand=%0d exec_q=%0d",
        disp_ptr, ret_ptr, commit_ptr, p_kind[ret_ptr], s_done[ret_ptr], s_issued[ret_ptr], s_age[ret_ptr], ret_valid, ret_ready, lq_count, cand, exec_q);
    if (commit_ptr != NPROG)
      $display("  dut: head=%0d rp=%0d tail=%0d rd_valid=%0b r_valid=%0b c_valid=%0b m_valid=%0b", dut.u_lq.head_q, dut.u_lq.rp_q, dut.u_lq.tail_q, dut.u_lq.rd_valid, dut.u_pipe.r_valid, dut.u_pipe.c_valid, dut.u_pipe.m_valid);
    $display("mode %0d: %0d cycles", m, guard);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = FM_NO_RECENT_SNOOP;
    alloc_valid = 0; alloc_pc = '0; issue_valid = 0; issue_age = '0; issue_nus = 0;
    issue_older_st_incomplete = 0; exec_valid = 0; exec_age = '0; exec_addr = '0; exec_data = '0;
    dp_lookup_pc = '0; flush_valid = 0; flush_age = '0; fill_event = 0; snoop_event = 0;
    ret_valid = 0; ret_kind = IK_OTHER; ret_st_addr = '0; ret_st_data = '0;
    dc_req_ready = 1; dc_resp_valid = 0; dc_resp_data = '0;
    resp_pending = 0; resp_cnt = 0; resp_data = '0; prev_replay = 0; retire_hold = 0;
    for (int w = 0; w < NWORDS; w++) mem[w] = data_t'(64'hA000 + w);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_phase(FM_NO_RECENT_SNOOP, 1, 1, 50, 0);
    run_phase(FM_REPLAY_ALL,      1, 2, 50, 0);
    run_phase(FM_NO_REORDER,      0, 3, 50, 0);
    run_phase(FM_NO_RECENT_MISS,  0, 4, 65, 400);
    run_phase(FM_NO_RECENT_SNOOP, 1, 5, 50, 0);
    $display("replays=%0d back-to-back=%0d filtered=%0d raw=%0d store_wait=%0d miss_wait=%0d",
             c_replay, c_b2b, c_filtered, c_raw, c_store_wait, c_miss_wait);
    $display("squash_raw=%0d squash_consistency=%0d rule3=%0d miss_flag=%0d snoop_flag=%0d",
             c_squash_raw, c_squash_cons, c_rule3, c_miss_flag, c_snoop_flag);
    $display("dp_hold=%0d lq_full=%0d flush=%0d port_busy=%0d ext_writes=%0d fills=%0d loads=%0d",
             c_dp_hold, c_lq_full, c_flush, c_port_busy, c_ext_write, c_fill, c_commit_ld);
    check(c_replay > 0, "replays happened");
    check(c_b2b > 0, "back-to-back replays");
    check(c_filtered > 0, "filtered loads");
    check(c_raw > 0, "no-unresolved-store replays");
    check(c_store_wait > 0, "replay waited for an older store");
    check(c_miss_wait > 0, "slow replay access");
    check(c_squash_raw > 0, "RAW squash");
    check(c_squash_cons > 0, "consistency squash");
    check(c_rule3 > 0, "rule-3 skip");
    check(c_miss_flag > 0, "no-recent-miss flag");
    check(c_snoop_flag > 0, "no-recent-snoop flag");
    check(c_dp_hold > 0, "predictor held a load");
    check(c_lq_full > 0, "load queue full");
    check(c_flush > 0, "core flush");
    check(c_port_busy > 0, "busy cache port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
