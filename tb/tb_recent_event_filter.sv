// tb_recent_event_filter: random events and replay-stage departures against a
// reference of the flag/age-register rule: set on an event while loads wait,
// remember the youngest age, clear when that age leaves the replay stage.
module tb_recent_event_filter;
  localparam int unsigned AGE_W = 5;
  logic clk = 0, rst_n = 0;
  logic event_i, window_loads, leave_valid, force_replay, flag;
  logic [AGE_W-1:0] youngest_age, leave_age;
  int checks = 0, failures = 0;
  bit ref_flag;
  logic [AGE_W-1:0] ref_age;

  recent_event_filter #(.AGE_W(AGE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_set = 0, n_clear = 0;
    bit prev;
    event_i = 0; window_loads = 0; leave_valid = 0; youngest_age = '0; leave_age = '0;
    ref_flag = 0; ref_age = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      event_i      = ($urandom % 12) == 0;
      window_loads = ($urandom % 4) != 0;
      youngest_age = AGE_W'($urandom % 8);
      leave_valid  = ($urandom % 2) == 0;
      leave_age    = AGE_W'($urandom % 8);
      #1;
      checks++;
      if (force_replay !== (ref_flag || event_i)) failures++;
      checks++;
      if (flag !== ref_flag) failures++;
      @(posedge clk);
      prev = ref_flag;
      if (event_i && window_loads) begin
        ref_flag = 1; ref_age = youngest_age;
      end else if (ref_flag && leave_valid && leave_age == ref_age) begin
        ref_flag = 0;
      end
      if (!prev && ref_flag) n_set++;
      if (prev && !ref_flag) n_clear++;
    end
    checks++;
    if (n_set == 0 || n_clear == 0) failures++;
    $display("sets=%0d clears=%0d", n_set, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
