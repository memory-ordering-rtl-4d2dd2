// cache_port_arbiter: the single back-end L1 data cache port.
//
// The tail of the pipeline already has a cache port for stores, which write the
// cache at commit. Replay loads use the same port from the replay stage; when
// both want it in the same cycle the store wins. Only one request goes to the
// cache per cycle, which also limits replay to one load per cycle.
//
// Interface and timing: requests are valid/ready. port_req_* is the merged
// request to the cache, accepted when port_ready; st_gnt / ld_gnt say whose
// request was accepted in this cycle. Replay reads return later on the cache's
// response channel, which this block does not touch. Sharing the port with
// priority to stores follows the design; the handshake is this design's choice.
module cache_port_arbiter
  import vbr_pkg::*;
(
  input  logic  st_req,
  input  addr_t st_addr,
  input  data_t st_wdata,
  input  logic  ld_req,
  input  addr_t ld_addr,
  output logic  st_gnt,
  output logic  ld_gnt,
  output logic  port_req,
  output logic  port_we,
  output addr_t port_addr,
  output data_t port_wdata,
  input  logic  port_ready
);
  always_comb begin
    port_req   = st_req | ld_req;
    port_we    = st_req;
    port_addr  = st_req ? st_addr : ld_addr;
    port_wdata = st_wdata;
    st_gnt     = st_req & port_ready;
    ld_gnt     = ld_req & ~st_req & port_ready;
  end

endmodule
