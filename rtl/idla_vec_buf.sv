// idla_vec_buf: simple dual-port on-chip buffer (one write port, one read port).
//
// Instantiated for inp_buf, res_buf and out_buf (vectors of TP 16-bit
// elements) and for the accumulation buffer (TP 32-bit accumulators). A write
// happens at the clock edge when we is high. A read issued with re returns
// rdata one cycle later and holds it until the next read; reading an address
// in the cycle it is written returns the old contents. Depths are this
// design's choice.
module idla_vec_buf #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
