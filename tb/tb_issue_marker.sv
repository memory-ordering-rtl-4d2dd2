// tb_issue_marker: random check of the no-reorder mark against a reference
// that walks the queue from the head to the issuing load one entry at a time.
module tb_issue_marker;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0] valid_vec, done_vec;
  logic [IW-1:0]    head_idx, issue_idx;
  logic             older_st_incomplete, reordered;
  int checks = 0, failures = 0;

  issue_marker #(.DEPTH(DEPTH)) dut (.*);

  function automatic logic ref_mark();
    logic r = older_st_incomplete;
    int unsigned k = head_idx;
    while (k != issue_idx) begin
      if (valid_vec[k] && !done_vec[k]) r = 1'b1;
      k = (k + 1) % DEPTH;
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_set = 0, n_clr = 0;
    for (int t = 0; t < 4000; t++) begin
      valid_vec = DEPTH'($urandom) | DEPTH'($urandom);
      done_vec  = DEPTH'($urandom) | DEPTH'($urandom) | DEPTH'($urandom);
      head_idx  = IW'($urandom);
      issue_idx = IW'($urandom);
      older_st_incomplete = ($urandom % 4) == 0;
      #1;
      checks++;
      if (reordered !== ref_mark()) begin
        failures++;
        if (failures < 10) $display("FAIL head=%0d issue=%0d v=%h d=%h st=%0b got %0b",
          head_idx, issue_idx, valid_vec, done_vec, older_st_incomplete, reordered);
      end
      if (reordered) n_set++; else n_clr++;
    end
    // both outcomes must have been exercised
    checks++;
    if (n_set == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
