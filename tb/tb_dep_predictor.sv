// tb_dep_predictor: random training and lookups against a reference bit table;
// a lookup returns the bit one cycle later, and a trained PC aliases with every
// PC that shares index bits [13:2].
module tb_dep_predictor;
  import vbr_pkg::*;
  localparam int unsigned ENTRIES = 4096;
  logic clk = 0, rst_n = 0;
  pc_t  lookup_pc, train_pc;
  logic lookup_wait, train_valid;
  int checks = 0, failures = 0;
  bit ref_tbl [ENTRIES];

  dep_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    int n_wait = 0;
    train_valid = 0; lookup_pc = '0; train_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // mostly small PCs so that lookups often hit trained entries
      lookup_pc   = {32'h0000_1000, 18'd0, 12'($urandom % 64), 2'b00};
      if ($urandom % 8 == 0) lookup_pc[63:32] = $urandom;
      train_valid = ($urandom % 6) == 0;
      train_pc    = {32'h0000_1000, 18'd0, 12'($urandom % 64), 2'b00};
      exp = ref_tbl[lookup_pc[13:2]];
      @(posedge clk);
      if (train_valid) ref_tbl[train_pc[13:2]] = 1'b1;
      #1;
      checks++;
      if (lookup_wait !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%h exp=%0b got=%0b", lookup_pc, exp, lookup_wait);
      end
      if (lookup_wait) n_wait++;
    end
    checks++;
    if (n_wait == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
