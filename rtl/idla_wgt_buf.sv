// idla_wgt_buf: weight buffer of the multiply-add array.
//
// A weight tile is the TP x TP matrix W[co][ci] for one kernel position. The
// buffer is split into TP banks, bank co holding row co of every tile, so that
// a load writes one DDR word (one row, TP weights) per cycle while the array
// reads a complete tile per cycle. Write address = tile * TP + row. A read
// issued with re returns the whole tile one cycle later; rdata[co][ci].
// The banked organisation and the depth (TILES) are this design's choice.
module idla_wgt_buf
  import idla_pkg::*;
#(
  parameter int unsigned TILES = WGT_TILES,
  localparam int unsigned TW   = $clog2(TILES),
  localparam int unsigned RW   = $clog2(TP)
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [TW+RW-1:0]               waddr,
  input  logic [TP-1:0][DATA_W-1:0]      wdata,
  input  logic                           re,
  input  logic [TW-1:0]                  raddr,
  output logic [TP-1:0][TP-1:0][DATA_W-1:0] rdata
);
  for (genvar b = 0; b < TP; b++) begin : g_bank
    logic [TP*DATA_W-1:0] mem [TILES];
    always_ff @(posedge clk) begin
      if (we && waddr[RW-1:0] == RW'(b)) mem[waddr[TW+RW-1:RW]] <= wdata;
      if (re) rdata[b] <= mem[raddr];
    end
  end
endmodule
