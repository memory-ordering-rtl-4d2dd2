// tb_load_fifo: random dispatch, issue, completion, replay-stage reads, commits
// and rewinds against a reference queue kept in the testbench. Checks the read
// port (entry contents, age, valid), occupancy, the age handed out at dispatch,
// the no-reorder mark taken at issue and the rewind of the replay pointer.
module tb_load_fifo;
  import vbr_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AGE_W = 4;

  logic clk = 0, rst_n = 0;
  logic alloc_valid, alloc_no_replay, alloc_ready;
  pc_t  alloc_pc;
  logic [AGE_W-1:0] alloc_age, issue_age, exec_age, rd_age, rewind_age, youngest_age;
  logic issue_valid, issue_nus, issue_older_st_incomplete;
  logic exec_valid, rd_valid, rd_take, pop, rewind_valid, empty, unreplayed;
  addr_t exec_addr;
  data_t exec_data;
  lq_entry_t rd_entry;
  logic [AGE_W-1:0] count;

  int checks = 0, failures = 0;

  load_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // reference state: positions are unbounded counters, index = pos % DEPTH
  int   r_head, r_rp, r_tail;
  pc_t  m_pc [DEPTH];
  addr_t m_addr [DEPTH];
  data_t m_data [DEPTH];
  bit   m_nus [DEPTH], m_reord [DEPTH], m_norep [DEPTH], m_issued [DEPTH], m_done [DEPTH];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %0t %s h=%0d rp=%0d t=%0d cnt=%0d ya=%0d rew=%0b", $time, what, r_head, r_rp, r_tail, count, youngest_age, rewind_valid);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_rewind_rp = 0, n_full = 0, n_reord = 0, n_inorder = 0;
    int issue_pos, exec_pos, rew_pos;
    bit exp_reord, acc;
    r_head = 0; r_rp = 0; r_tail = 0;
    alloc_valid = 0; alloc_no_replay = 0; alloc_pc = '0; issue_valid = 0; issue_age = '0;
    issue_nus = 0; issue_older_st_incomplete = 0; exec_valid = 0; exec_age = '0;
    exec_addr = '0; exec_data = '0; rd_take = 0; pop = 0; rewind_valid = 0; rewind_age = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // ---- choose this cycle's operations ----
      rewind_valid = (r_tail > r_head) && ($urandom % 40 == 0);
      rew_pos = r_head + ($urandom % ((r_tail > r_head) ? (r_tail - r_head) : 1));
      rewind_age = AGE_W'(rew_pos);
      alloc_valid = ($urandom % 3) != 0;
      alloc_pc = {$urandom, $urandom};
      alloc_no_replay = ($urandom % 5) == 0;
      // issue a random not-yet-issued entry
      issue_valid = 0;
      if (r_tail > r_head && $urandom % 2) begin
        issue_pos = r_head + ($urandom % (r_tail - r_head));
        if (!m_issued[issue_pos % DEPTH]) issue_valid = 1;
      end
      issue_age = AGE_W'(issue_pos);
      issue_nus = $urandom % 2;
      issue_older_st_incomplete = ($urandom % 4) == 0;
      // complete a random issued entry (issued in an earlier cycle)
      exec_valid = 0;
      if (r_tail > r_head && $urandom % 2) begin
        exec_pos = r_head + ($urandom % (r_tail - r_head));
        if (m_issued[exec_pos % DEPTH] && !m_done[exec_pos % DEPTH]) exec_valid = 1;
      end
      exec_age = AGE_W'(exec_pos);
      exec_addr = {$urandom, $urandom};
      exec_data = {$urandom, $urandom};
      rd_take = !rewind_valid && (r_rp < r_tail) && m_done[r_rp % DEPTH] && ($urandom % 2);
      pop = !rewind_valid && (r_head < r_rp) && ($urandom % 3 == 0);
      #1;
      // ---- compare outputs with the reference ----
      check(count == AGE_W'(r_tail - r_head), "count");
      check(empty == (r_tail == r_head), "empty");
      check(unreplayed == (r_tail != r_rp), "unreplayed");
      check(alloc_ready == ((r_tail - r_head) < DEPTH && !rewind_valid), "alloc_ready");
      check(alloc_age == AGE_W'(r_tail), "alloc_age");
      if (r_tail != r_head) check(youngest_age == AGE_W'(r_tail - 1), "youngest_age");
      check(rd_valid == ((r_rp < r_tail) && m_done[r_rp % DEPTH]), "rd_valid");
      check(rd_age == AGE_W'(r_rp), "rd_age");
      if (rd_valid) begin
        check(rd_entry.pc == m_pc[r_rp % DEPTH], "rd pc");
        check(rd_entry.addr == m_addr[r_rp % DEPTH], "rd addr");
        check(rd_entry.data == m_data[r_rp % DEPTH], "rd data");
        check(rd_entry.nus == m_nus[r_rp % DEPTH], "rd nus");
        check(rd_entry.reordered == m_reord[r_rp % DEPTH], "rd reordered");
        check(rd_entry.no_replay == m_norep[r_rp % DEPTH], "rd no_replay");
      end
      if ((r_tail - r_head) == DEPTH) n_full++;
      // ---- reference update at the clock edge ----
      exp_reord = issue_older_st_incomplete;
      if (issue_valid)
        for (int p = r_head; p < issue_pos; p++) if (!m_done[p % DEPTH]) exp_reord = 1;
      acc = alloc_valid && (r_tail - r_head) < DEPTH;
      @(posedge clk);
      if (issue_valid) begin
        m_issued[issue_pos % DEPTH] = 1;
        m_nus[issue_pos % DEPTH] = issue_nus;
        m_reord[issue_pos % DEPTH] = exp_reord;
        if (exp_reord) n_reord++; else n_inorder++;
      end
      if (exec_valid) begin
        m_done[exec_pos % DEPTH] = 1;
        m_addr[exec_pos % DEPTH] = exec_addr;
        m_data[exec_pos % DEPTH] = exec_data;
      end
      if (rd_take) r_rp++;
      if (pop) r_head++;
      if (rewind_valid) begin
        r_tail = rew_pos;
        if (rew_pos <= r_rp) begin r_rp = rew_pos; n_rewind_rp++; end
      end else if (acc) begin
        m_pc[r_tail % DEPTH] = alloc_pc;
        m_norep[r_tail % DEPTH] = alloc_no_replay;
        m_issued[r_tail % DEPTH] = 0;
        m_done[r_tail % DEPTH] = 0;
        m_nus[r_tail % DEPTH] = 0;
        m_reord[r_tail % DEPTH] = 0;
        r_tail++;
      end
    end
    $display("full=%0d rewinds_of_rp=%0d reordered=%0d in_order=%0d", n_full, n_rewind_rp, n_reord, n_inorder);
    checks++;
    if (n_full == 0 || n_rewind_rp == 0 || n_reord == 0 || n_inorder == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
