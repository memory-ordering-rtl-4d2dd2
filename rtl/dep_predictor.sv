// dep_predictor: simple PC-indexed memory dependence predictor.
//
// Value-based replay cannot tell which store a mis-speculated load depended on,
// so a store-set style predictor cannot be trained. Instead a table of one bit
// per entry, indexed by the load's PC, remembers whether the load at that PC
// has been the victim of a dependence misprediction. When the bit is set, the
// scheduler holds that load until the addresses of all older stores are known.
//
// Interface and timing:
//   lookup_pc     : PC of a load being scheduled; lookup_wait gives its bit one
//                   cycle later (a synchronous table read).
//   train_valid   : set the bit of train_pc (a replay squash of a load that had
//                   issued past an unresolved store address).
// The index is PC bits [2 +: log2(ENTRIES)] (4-byte instructions). The table
// and its 4k size follow the design; the index bits, the read latency and that
// bits are only cleared by reset are this design's choices.
module dep_predictor
  import vbr_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  pc_t  lookup_pc,
  output logic lookup_wait,
  input  logic train_valid,
  input  pc_t  train_pc
);
  localparam int unsigned XW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] table_q;
  logic [XW-1:0]      lookup_idx, train_idx;

  assign lookup_idx = lookup_pc[2 +: XW];
  assign train_idx  = train_pc[2 +: XW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      table_q     <= '0;
      lookup_wait <= 1'b0;
    end else begin
      lookup_wait <= table_q[lookup_idx];
      if (train_valid) table_q[train_idx] <= 1'b1;
    end
  end

endmodule
