// recent_event_filter: the no-recent-miss / no-recent-snoop replay filter.
//
// If no cache block has entered the local hierarchy from another processor
// (no-recent-miss), or no external write has been seen (no-recent-snoop),
// while a load was in the instruction window, the load cannot be part of a
// consistency violation and need not replay. The hardware is one flag and one
// age register. When the monitored event is signalled, the flag is set and the
// age register takes the age of the youngest load then in the window. While the
// flag is set, every load in the replay stage is forced to replay. When the
// load with the recorded age leaves the replay stage, and the register still
// holds its age (no newer event moved it), the flag clears.
//
// Interface and timing:
//   event_i        : one-cycle pulse from the cache (fill from outside, or
//                    external invalidation); forces replay in the same cycle.
//   window_loads   : some load in the window has not yet left the replay stage.
//   youngest_age   : age of the newest load in the window.
//   leave_valid/age: a load leaves the replay stage this cycle.
//   force_replay   : loads in the replay stage must replay (flag or event now).
// The flag/age-register mechanism follows the design. Not setting the flag
// when no load is waiting before the replay stage is this design's choice.
module recent_event_filter #(
  parameter int unsigned AGE_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             event_i,
  input  logic             window_loads,
  input  logic [AGE_W-1:0] youngest_age,
  input  logic             leave_valid,
  input  logic [AGE_W-1:0] leave_age,
  output logic             force_replay,
  output logic             flag
);
  logic             flag_q;
  logic [AGE_W-1:0] age_q;

  assign flag         = flag_q;
  assign force_replay = flag_q | event_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q <= 1'b0;
      age_q  <= '0;
    end else if (event_i && window_loads) begin
      flag_q <= 1'b1;
      age_q  <= youngest_age;
    end else if (flag_q && leave_valid && leave_age == age_q) begin
      flag_q <= 1'b0;
    end
  end

endmodule
