// tb_replay_pipeline: directed scenarios for the replay / compare / commit
// stages, with a small load queue, a cache port and a word memory modelled in
// the testbench:
//   A  replay-all stream of matching loads: one replay per cycle, in order,
//      every load commits with its value, no squash;
//   B  no-recent-snoop mode with unmarked loads: no cache access at all;
//   C  store then a load of the same word with a stale premature value and
//      the no-unresolved-store mark: the replay waits for the store to reach
//      the cache, then the value differs, the load is squashed and the
//      predictor is trained;
//   D  stale value without the mark under replay-all: squash, no training;
//   E  a slow replay access holds back the next replay until it returns;
//   F  a load carrying the no-replay bit is not replayed (rule 3);
//   G  a store that cannot get the port stalls commit; order is kept.
module tb_replay_pipeline;
  import vbr_pkg::*;
  localparam int unsigned AGE_W = 4;

  logic clk = 0, rst_n = 0;
  filter_mode_e mode;
  logic miss_force, snoop_force;
  logic ret_valid, ret_ready;
  inst_kind_e ret_kind;
  addr_t ret_st_addr;
  data_t ret_st_data;
  logic lq_rd_valid, lq_take, lq_pop;
  lq_entry_t lq_rd_entry;
  logic [AGE_W-1:0] lq_rd_age;
  logic st_req, st_gnt, ld_req, ld_gnt;
  addr_t st_addr, ld_addr;
  data_t st_wdata;
  logic dc_resp_valid;
  data_t dc_resp_data;
  logic squash_valid, train_valid, commit_valid;
  logic [AGE_W-1:0] squash_age, commit_age, leave_age;
  pc_t squash_pc;
  inst_kind_e commit_kind;
  data_t commit_data;
  vbr_events_t events;
  logic r_load;

  replay_pipeline #(.AGE_W(AGE_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  // ---------------- program and models ----------------
  int         n_inst;
  inst_kind_e p_kind [16];
  int         p_word [16];   // word index
  data_t      p_val  [16];   // store data or premature load value
  bit         p_nus  [16], p_norep [16];
  int         p_lqi  [16];   // load-queue position of a load
  int         ret_ptr, lq_rp;
  int         load_prog [16]; // program index of the n-th load
  data_t      mem [16];
  bit         port_ready;
  int         miss_delay;     // extra latency for the next replay read
  // response pipeline
  int         resp_cnt;
  data_t      resp_data;
  bit         resp_pending;
  // records
  int         n_commit, n_gnt, n_squash, n_train, n_store_wait, n_miss_wait, n_rule3, n_filtered;
  int         gnt_cycle [16];
  int         st_gnt_cycle;
  int         cyc;
  int         commit_prog [16];
  data_t      commit_val [16];
  int         squash_at_age;

  assign ret_valid   = ret_ptr < n_inst;
  assign ret_kind    = ret_valid ? p_kind[ret_ptr] : IK_OTHER;
  assign ret_st_addr = addr_t'(p_word[ret_ptr] * 8);
  assign ret_st_data = p_val[ret_ptr];
  assign lq_rd_valid = lq_rp < n_loads();
  assign lq_rd_age   = AGE_W'(lq_rp);
  always_comb begin
    int pi;
    pi = load_prog[lq_rp];
    lq_rd_entry.pc        = pc_t'(32'h4000 + pi * 4);
    lq_rd_entry.addr      = addr_t'(p_word[pi] * 8);
    lq_rd_entry.data      = p_val[pi];
    lq_rd_entry.nus       = p_nus[pi];
    lq_rd_entry.reordered = 1'b1;
    lq_rd_entry.no_replay = p_norep[pi];
  end
  assign st_gnt = st_req && port_ready;
  assign ld_gnt = ld_req && !st_req && port_ready;
  assign dc_resp_valid = resp_pending && resp_cnt == 0;
  assign dc_resp_data  = resp_data;

  function automatic int n_loads();
    int n = 0;
    for (int i = 0; i < n_inst; i++) if (p_kind[i] == IK_LOAD) n++;
    return n;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ret_valid && ret_ready) ret_ptr <= ret_ptr + 1;
      if (lq_take) lq_rp <= lq_rp + 1;
      if (st_gnt) begin
        mem[st_addr[6:3]] <= st_wdata;
        st_gnt_cycle <= cyc;
      end
      if (dc_resp_valid) resp_pending <= 0;
      else if (resp_pending) resp_cnt <= resp_cnt - 1;
      if (ld_gnt) begin
        resp_pending <= 1;
        resp_cnt <= miss_delay;
        resp_data <= mem[ld_addr[6:3]];
        miss_delay <= 0;
        gnt_cycle[n_gnt] <= cyc;
        n_gnt <= n_gnt + 1;
      end
      if (commit_valid) begin
        commit_prog[n_commit] <= n_commit;
        commit_val[n_commit] <= commit_data;
        n_commit <= n_commit + 1;
      end
      if (squash_valid) begin
        n_squash <= n_squash + 1;
        squash_at_age <= int'(squash_age);
        check(squash_pc == pc_t'(32'h4000 + load_prog[squash_age] * 4), "squash PC");
        // the core restarts: nothing younger is presented any more
        ret_ptr <= n_inst;
        lq_rp <= 99;
      end
      if (train_valid) n_train <= n_train + 1;
      if (events.store_wait) n_store_wait <= n_store_wait + 1;
      if (events.replay_miss_wait) n_miss_wait <= n_miss_wait + 1;
      if (events.rule3_skip) n_rule3 <= n_rule3 + 1;
      if (events.replay_filtered) n_filtered <= n_filtered + 1;
    end
  end

  task automatic start(input filter_mode_e m);
    rst_n = 0;
    mode = m; miss_force = 0; snoop_force = 0; port_ready = 1; miss_delay = 0;
    ret_ptr = 0; lq_rp = 0; resp_pending = 0; resp_cnt = 0;
    n_commit = 0; n_gnt = 0; n_squash = 0; n_train = 0; n_store_wait = 0;
    n_miss_wait = 0; n_rule3 = 0; n_filtered = 0; st_gnt_cycle = -1; cyc = 0;
    for (int i = 0; i < 16; i++) begin
      mem[i] = data_t'(64'h1000 + i);
      p_nus[i] = 0; p_norep[i] = 0;
    end
    n_inst = 0;
  endtask

  task automatic add(input inst_kind_e k, input int w, input data_t v, input bit nus, input bit norep);
    p_kind[n_inst] = k; p_word[n_inst] = w; p_val[n_inst] = v;
    p_nus[n_inst] = nus; p_norep[n_inst] = norep;
    n_inst++;
  endtask

  task automatic go(input int cycles);
    int nl = 0;
    for (int i = 0; i < n_inst; i++) if (p_kind[i] == IK_LOAD) begin load_prog[nl] = i; nl++; end
    @(negedge clk);
    rst_n = 1;
    repeat (cycles) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------------- A ----------------
    start(FM_REPLAY_ALL);
    for (int i = 0; i < 8; i++) add(IK_LOAD, i, data_t'(64'h1000 + i), 0, 0);
    go(20);
    check(n_gnt == 8, "A: eight replays");
    check(gnt_cycle[7] - gnt_cycle[0] == 7, "A: one replay per cycle");
    check(n_commit == 8 && n_squash == 0, "A: all commit, no squash");
    for (int i = 0; i < 8; i++) check(commit_val[i] == data_t'(64'h1000 + i), "A: commit value");
    // ---------------- B ----------------
    start(FM_NO_RECENT_SNOOP);
    for (int i = 0; i < 6; i++) add(IK_LOAD, i, data_t'(64'h1000 + i), 0, 0);
    go(15);
    check(n_gnt == 0 && n_filtered == 6 && n_commit == 6, "B: all filtered");
    // ---------------- C ----------------
    start(FM_NO_RECENT_SNOOP);
    add(IK_STORE, 3, data_t'(64'hAAAA), 0, 0);
    add(IK_LOAD, 3, data_t'(64'h1003), 1, 0);   // stale: did not see the store
    add(IK_LOAD, 4, data_t'(64'h1004), 0, 0);
    go(15);
    check(n_store_wait > 0, "C: replay waited for the store");
    check(n_gnt == 1 && gnt_cycle[0] > st_gnt_cycle, "C: replay after store write");
    check(n_squash == 1 && squash_at_age == 0, "C: squash of the load");
    check(n_train == 1, "C: predictor trained");
    check(n_commit == 1, "C: only the store commits");
    // ---------------- D ----------------
    start(FM_REPLAY_ALL);
    add(IK_OTHER, 0, '0, 0, 0);
    add(IK_LOAD, 5, data_t'(64'h9999), 0, 0);
    go(10);
    check(n_squash == 1 && n_train == 0 && n_commit == 1, "D: squash without training");
    // ---------------- E ----------------
    start(FM_REPLAY_ALL);
    add(IK_LOAD, 1, data_t'(64'h1001), 0, 0);
    add(IK_LOAD, 2, data_t'(64'h1002), 0, 0);
    miss_delay = 5;
    go(20);
    check(n_gnt == 2 && gnt_cycle[1] - gnt_cycle[0] == 6, "E: next replay after the slow one");
    check(n_miss_wait == 5, "E: compare stage waited");
    check(n_commit == 2 && n_squash == 0, "E: both commit");
    // ---------------- F ----------------
    start(FM_REPLAY_ALL);
    add(IK_LOAD, 6, data_t'(64'h7777), 0, 1);
    go(10);
    check(n_gnt == 0 && n_rule3 == 1 && n_squash == 0, "F: no replay of a re-executed load");
    check(n_commit == 1 && commit_val[0] == data_t'(64'h7777), "F: commits premature value");
    // ---------------- G ----------------
    start(FM_REPLAY_ALL);
    add(IK_STORE, 2, data_t'(64'hBBBB), 0, 0);
    add(IK_OTHER, 0, '0, 0, 0);
    add(IK_LOAD, 2, data_t'(64'hBBBB), 1, 0);
    port_ready = 0;
    go(8);
    check(n_commit == 0, "G: store holds commit while the port is busy");
    port_ready = 1;
    repeat (10) @(posedge clk);
    @(negedge clk);
    check(n_commit == 3 && n_squash == 0 && commit_val[2] == data_t'(64'hBBBB), "G: all commit in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
