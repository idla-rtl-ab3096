// ddr_rd_if: word-granular DDR read port used by Ctrl, Load and Cfg.
//
// A request (req_addr) is accepted when req_valid and req_ready are both high.
// Responses come back in request order on rsp_data and are accepted when
// rsp_valid and rsp_ready are both high. Latency is free; the master limits how
// many requests it keeps outstanding. The protocol is this design's own
// simplification of a memory-mapped bus.
interface ddr_rd_if #(
  parameter int unsigned AW = 32,
  parameter int unsigned DW = 512
) (
  input logic clk,
  input logic rst_n
);
  logic          req_valid;
  logic          req_ready;
  logic [AW-1:0] req_addr;
  logic          rsp_valid;
  logic          rsp_ready;
  logic [DW-1:0] rsp_data;

  modport master (output req_valid, req_addr, rsp_ready,
                  input  req_ready, rsp_valid, rsp_data);
  modport slave  (input  req_valid, req_addr, rsp_ready,
                  output req_ready, rsp_valid, rsp_data);

  // A request and a response, once offered, stay stable until taken.
  property p_hold_req;
    @(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req_addr);
  endproperty
  property p_hold_rsp;
    @(posedge clk) disable iff (!rst_n)
      rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp_data);
  endproperty
  a_hold_req: assert property (p_hold_req);
  a_hold_rsp: assert property (p_hold_rsp);
endinterface
