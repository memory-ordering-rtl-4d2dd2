// tb_cache_port_arbiter: random requests; a store always wins the port, a
// replay load gets it only when no store asks, and nothing is granted while
// the cache is not ready.
module tb_cache_port_arbiter;
  import vbr_pkg::*;
  logic  st_req, ld_req, st_gnt, ld_gnt, port_req, port_we, port_ready;
  addr_t st_addr, ld_addr, port_addr;
  data_t st_wdata, port_wdata;
  int checks = 0, failures = 0;

  cache_port_arbiter dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s st=%0b ld=%0b rdy=%0b", what, st_req, ld_req, port_ready);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      st_req = $urandom % 2; ld_req = $urandom % 2; port_ready = ($urandom % 4) != 0;
      st_addr = {$urandom, $urandom}; ld_addr = {$urandom, $urandom};
      st_wdata = {$urandom, $urandom};
      #1;
      check(port_req == (st_req || ld_req), "port_req");
      check(st_gnt == (st_req && port_ready), "st_gnt");
      check(ld_gnt == (ld_req && !st_req && port_ready), "ld_gnt");
      if (st_req) begin
        check(port_we && port_addr == st_addr && port_wdata == st_wdata, "store drives port");
      end else if (ld_req) begin
        check(!port_we && port_addr == ld_addr, "load drives port");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
