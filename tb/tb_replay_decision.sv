// tb_replay_decision: exhaustive check of the replay decision for every filter
// configuration and every combination of marks and filter flags.
module tb_replay_decision;
  import vbr_pkg::*;
  filter_mode_e mode;
  logic nus, reordered, no_replay, miss_force, snoop_force;
  logic replay, raw_replay, rule3_skip;
  int checks = 0, failures = 0;

  replay_decision dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_want, exp_raw;
    for (int v = 0; v < 128; v++) begin
      mode        = filter_mode_e'(v[1:0]);
      nus         = v[2];
      reordered   = v[3];
      no_replay   = v[4];
      miss_force  = v[5];
      snoop_force = v[6];
      #1;
      case (v[1:0])
        2'd0: begin exp_want = 1'b1;                    exp_raw = 1'b0;                 end
        2'd1: begin exp_want = reordered;               exp_raw = 1'b0;                 end
        2'd2: begin exp_want = nus || miss_force;       exp_raw = nus && !miss_force;   end
        default: begin exp_want = nus || snoop_force;   exp_raw = nus && !snoop_force;  end
      endcase
      checks += 3;
      if (replay !== (exp_want && !no_replay)) failures++;
      if (rule3_skip !== (exp_want && no_replay)) failures++;
      if (raw_replay !== (exp_raw && !no_replay)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
