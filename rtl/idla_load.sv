// idla_load: the Load module (Load_inp, Load_wgt and Load_res).
//
// Takes Load instructions from its queue one at a time. It first waits for
// the token DEPT_INFO asks for (pop_next: Comp has released the buffer), then
// copies a 2-D block from DDR into the buffer BUF_ID selects: y_size rows of
// x_size consecutive DDR words, the rows dram_stride words apart starting at
// dram_base, into consecutive buffer addresses from sram_base. One DDR word
// is one vector of TP 16-bit values: TP input channels of one pixel for
// inp_buf and res_buf, one row (TP input channels of one output channel) of a
// weight tile for wgt_buf. Finally it pushes the token for Comp (push_next)
// if asked. Requests are pipelined with up to MAX_OUT outstanding, so a
// transfer runs at one word per cycle when DDR keeps up.
// The three loaders share one address generator and DDR port here; the
// transfer shape and the token protocol are this design's choice.
module idla_load
  import idla_pkg::*;
#(
  parameter int unsigned MAX_OUT = 16,
  parameter int unsigned INP_AW  = 16,
  parameter int unsigned WGT_AW  = 16,
  parameter int unsigned RES_AW  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      insn_valid,
  output logic                      insn_ready,
  input  logic [INSN_W-1:0]         insn,
  output logic                      busy,
  // dependency tokens
  input  logic                      c2l_valid,
  output logic                      c2l_ready,
  output logic                      l2c_valid,
  input  logic                      l2c_ready,
  // DDR
  ddr_rd_if.master                  rd,
  // buffer writes
  output logic                      inp_we,
  output logic [INP_AW-1:0]         inp_waddr,
  output logic                      wgt_we,
  output logic [WGT_AW-1:0]         wgt_waddr,
  output logic                      res_we,
  output logic [RES_AW-1:0]         res_waddr,
  output logic [TP-1:0][DATA_W-1:0] wdata
);
  typedef enum logic [1:0] {S_IDLE, S_DEP, S_XFER, S_PUSH} state_e;
  state_e    st;
  mem_insn_t q;
  logic [15:0] rx, ry;
  logic [31:0] n_rsp, n_tot;
  logic [$clog2(MAX_OUT+1)-1:0] outst;
  logic req_done, req_fire, rsp_fire;

  assign busy       = (st != S_IDLE);
  assign insn_ready = (st == S_IDLE);
  assign n_tot      = 32'(q.x_size) * 32'(q.y_size);

  assign c2l_ready = (st == S_DEP) && q.dept.pop_next && c2l_valid;
  assign l2c_valid = (st == S_PUSH);

  assign req_done     = (ry == q.y_size);
  assign rd.req_valid = (st == S_XFER) && !req_done && (32'(outst) < MAX_OUT);
  assign rd.req_addr  = q.dram_base + 32'(ry) * 32'(q.dram_stride) + 32'(rx);
  assign rd.rsp_ready = (st == S_XFER);
  assign req_fire     = rd.req_valid && rd.req_ready;
  assign rsp_fire     = rd.rsp_valid && rd.rsp_ready;

  // buffer write: route by BUF_ID
  logic [31:0] waddr;
  assign waddr     = 32'(q.sram_base) + n_rsp;
  assign wdata     = rd.rsp_data;
  assign inp_we    = rsp_fire && q.buf_id == BUF_INP;
  assign wgt_we    = rsp_fire && q.buf_id == BUF_WGT;
  assign res_we    = rsp_fire && q.buf_id == BUF_RES;
  assign inp_waddr = INP_AW'(waddr);
  assign wgt_waddr = WGT_AW'(waddr);
  assign res_waddr = RES_AW'(waddr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      q     <= '0;
      rx    <= '0;
      ry    <= '0;
      n_rsp <= '0;
      outst <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (insn_valid) begin
          q     <= mem_insn_t'(insn);
          rx    <= '0;
          ry    <= '0;
          n_rsp <= '0;
          st    <= S_DEP;
        end
        S_DEP: if (!q.dept.pop_next || c2l_valid) begin
          // an empty transfer still passes its tokens on
          st <= (q.x_size == 0 || q.y_size == 0) ? (q.dept.push_next ? S_PUSH : S_IDLE) : S_XFER;
          if (q.x_size == 0) ry <= q.y_size;
        end
        S_XFER: begin
          if (req_fire) begin
            if (rx == q.x_size - 1) begin
              rx <= '0;
              ry <= ry + 1'b1;
            end else rx <= rx + 1'b1;
          end
          if (rsp_fire) n_rsp <= n_rsp + 1'b1;
          outst <= outst + $bits(outst)'(req_fire) - $bits(outst)'(rsp_fire);
          if (rsp_fire && n_rsp == n_tot - 1)
            st <= q.dept.push_next ? S_PUSH : S_IDLE;
        end
        S_PUSH: if (l2c_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
