// ddr_rd_model: behavioural model of a DDR read port for the testbenches.
//
// Serves word reads from the array mem (filled by the testbench through a
// hierarchical reference). When STALL is set it takes requests and returns
// responses only on random cycles, so the masters see back-pressure and
// gaps; responses come back in request order, at least one cycle after the
// request. stalls counts the cycles a request waited.
module ddr_rd_model #(
  parameter int unsigned DW    = 512,
  parameter int unsigned DEPTH = 4096,
  parameter bit          STALL = 1'b1
) (
  input logic       clk,
  input logic       rst_n,
  ddr_rd_if.slave   port
);
  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] pend [$];
  int unsigned   stalls;
  int unsigned   reads;

  initial begin
    stalls = 0;
    reads  = 0;
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      port.req_ready <= 1'b0;
      port.rsp_valid <= 1'b0;
      port.rsp_data  <= '0;
      pend.delete();
    end else begin
      if (port.req_valid && !port.req_ready) stalls++;
      if (port.rsp_valid && port.rsp_ready || !port.rsp_valid) begin
        if (pend.size() != 0 && (!STALL || $urandom_range(3) != 0)) begin
          port.rsp_data  <= pend.pop_front();
          port.rsp_valid <= 1'b1;
        end else begin
          port.rsp_valid <= 1'b0;
        end
      end
      if (port.req_valid && port.req_ready) begin
        pend.push_back(mem[port.req_addr % DEPTH]);
        reads++;
      end
      port.req_ready <= !STALL || ($urandom_range(3) != 0);
    end
  end
endmodule
