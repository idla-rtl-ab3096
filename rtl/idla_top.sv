// idla_top: the IDLA hardware engine.
//
// Four modules work concurrently: Ctrl fetches the instruction stream from
// DDR and deals each instruction to the queue of Load, Comp or Save. Load
// fills inp_buf, wgt_buf and res_buf from DDR; Comp (Cfg, Dense with the
// TP x TP multiply-add array, Alu) turns them into results in out_buf; Save
// writes out_buf back to DDR. Who may touch a buffer when is settled by
// four handshake FIFOs carrying dependency tokens, pushed and popped as each
// instruction's DEPT_INFO says:
//   Load -> Comp  (l2c): loaded data is ready for Comp
//   Comp -> Load  (c2l): Comp is done with the loaded data
//   Comp -> Save  (c2s): results in out_buf are ready for Save
//   Save -> Comp  (s2c): out_buf is free again
// so loading the next block, computing the current one and saving the last
// one overlap. The host starts a stream with start, insn_base and insn_count
// and sees done pulse once all instructions are fetched and every queue and
// module has gone idle.
// DDR is reached through four ports brought out here (instruction read,
// Load read, bias read, Save write): a memory controller or interconnect
// would join them. Module partition and dependency scheme follow the
// published design; the ports, queue depths and buffer depths are this
// design's choice.
module idla_top
  import idla_pkg::*;
#(
  parameter int unsigned INP_D  = INP_DEPTH,
  parameter int unsigned RES_D  = RES_DEPTH,
  parameter int unsigned OUT_D  = OUT_DEPTH,
  parameter int unsigned ACC_D  = ACC_DEPTH,
  parameter int unsigned WGT_T  = WGT_TILES,
  parameter int unsigned Q_DEPTH   = 16,
  parameter int unsigned DEP_DEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host
  input  logic                      start,
  input  logic [ADDR_W-1:0]         insn_base,
  input  logic [31:0]               insn_count,
  output logic                      busy,
  output logic                      done,
  output logic [15:0]               bad_ops,     // undefined opcodes skipped by Ctrl
  // DDR: instruction read (128-bit words)
  output logic                      insn_rd_req_valid,
  input  logic                      insn_rd_req_ready,
  output logic [ADDR_W-1:0]         insn_rd_req_addr,
  input  logic                      insn_rd_rsp_valid,
  output logic                      insn_rd_rsp_ready,
  input  logic [INSN_W-1:0]         insn_rd_rsp_data,
  // DDR: Load read (TP x 16-bit words)
  output logic                      ld_rd_req_valid,
  input  logic                      ld_rd_req_ready,
  output logic [ADDR_W-1:0]         ld_rd_req_addr,
  input  logic                      ld_rd_rsp_valid,
  output logic                      ld_rd_rsp_ready,
  input  logic [TP*DATA_W-1:0]      ld_rd_rsp_data,
  // DDR: bias read of Comp_cfg
  output logic                      cfg_rd_req_valid,
  input  logic                      cfg_rd_req_ready,
  output logic [ADDR_W-1:0]         cfg_rd_req_addr,
  input  logic                      cfg_rd_rsp_valid,
  output logic                      cfg_rd_rsp_ready,
  input  logic [TP*DATA_W-1:0]      cfg_rd_rsp_data,
  // DDR: Save write
  output logic                      sv_wr_valid,
  input  logic                      sv_wr_ready,
  output logic [ADDR_W-1:0]         sv_wr_addr,
  output logic [TP*DATA_W-1:0]      sv_wr_data
);
  localparam int unsigned INP_AW = $clog2(INP_D);
  localparam int unsigned RES_AW = $clog2(RES_D);
  localparam int unsigned OUT_AW = $clog2(OUT_D);
  localparam int unsigned WT_AW  = $clog2(WGT_T);
  localparam int unsigned WR_AW  = WT_AW + $clog2(TP);

  // ---------------- DDR ports ----------------
  ddr_rd_if #(.AW(ADDR_W), .DW(INSN_W))    insn_rd (.clk, .rst_n);
  ddr_rd_if #(.AW(ADDR_W), .DW(TP*DATA_W)) ld_rd   (.clk, .rst_n);
  ddr_rd_if #(.AW(ADDR_W), .DW(TP*DATA_W)) cfg_rd  (.clk, .rst_n);

  assign insn_rd_req_valid = insn_rd.req_valid;
  assign insn_rd_req_addr  = insn_rd.req_addr;
  assign insn_rd_rsp_ready = insn_rd.rsp_ready;
  assign insn_rd.req_ready = insn_rd_req_ready;
  assign insn_rd.rsp_valid = insn_rd_rsp_valid;
  assign insn_rd.rsp_data  = insn_rd_rsp_data;

  assign ld_rd_req_valid = ld_rd.req_valid;
  assign ld_rd_req_addr  = ld_rd.req_addr;
  assign ld_rd_rsp_ready = ld_rd.rsp_ready;
  assign ld_rd.req_ready = ld_rd_req_ready;
  assign ld_rd.rsp_valid = ld_rd_rsp_valid;
  assign ld_rd.rsp_data  = ld_rd_rsp_data;

  assign cfg_rd_req_valid = cfg_rd.req_valid;
  assign cfg_rd_req_addr  = cfg_rd.req_addr;
  assign cfg_rd_rsp_ready = cfg_rd.rsp_ready;
  assign cfg_rd.req_ready = cfg_rd_req_ready;
  assign cfg_rd.rsp_valid = cfg_rd_rsp_valid;
  assign cfg_rd.rsp_data  = cfg_rd_rsp_data;

  // ---------------- Ctrl and instruction queues ----------------
  logic              ctrl_busy;
  logic [INSN_W-1:0] disp_insn;
  logic ld_pv, ld_pr, cp_pv, cp_pr, sv_pv, sv_pr;

  idla_ctrl u_ctrl (
    .clk, .rst_n, .start, .insn_base, .insn_count, .busy(ctrl_busy), .bad_ops,
    .rd(insn_rd),
    .ld_valid(ld_pv), .ld_ready(ld_pr), .cp_valid(cp_pv), .cp_ready(cp_pr),
    .sv_valid(sv_pv), .sv_ready(sv_pr), .insn(disp_insn));

  logic              ldq_v, ldq_r, cpq_v, cpq_r, svq_v, svq_r;
  logic [INSN_W-1:0] ldq_d, cpq_d, svq_d;
  logic [$clog2(Q_DEPTH+1)-1:0] ldq_n, cpq_n, svq_n;

  idla_fifo #(.WIDTH(INSN_W), .DEPTH(Q_DEPTH)) u_ld_q (.clk, .rst_n,
    .push_valid(ld_pv), .push_ready(ld_pr), .push_data(disp_insn),
    .pop_valid(ldq_v), .pop_ready(ldq_r), .pop_data(ldq_d), .count(ldq_n));
  idla_fifo #(.WIDTH(INSN_W), .DEPTH(Q_DEPTH)) u_cp_q (.clk, .rst_n,
    .push_valid(cp_pv), .push_ready(cp_pr), .push_data(disp_insn),
    .pop_valid(cpq_v), .pop_ready(cpq_r), .pop_data(cpq_d), .count(cpq_n));
  idla_fifo #(.WIDTH(INSN_W), .DEPTH(Q_DEPTH)) u_sv_q (.clk, .rst_n,
    .push_valid(sv_pv), .push_ready(sv_pr), .push_data(disp_insn),
    .pop_valid(svq_v), .pop_ready(svq_r), .pop_data(svq_d), .count(svq_n));

  // ---------------- dependency (handshake) FIFOs ----------------
  logic l2c_pv, l2c_pr, l2c_v, l2c_r;
  logic c2l_pv, c2l_pr, c2l_v, c2l_r;
  logic c2s_pv, c2s_pr, c2s_v, c2s_r;
  logic s2c_pv, s2c_pr, s2c_v, s2c_r;
  logic [$clog2(DEP_DEPTH+1)-1:0] l2c_n, c2l_n, c2s_n, s2c_n;
  logic l2c_d, c2l_d, c2s_d, s2c_d;

  idla_fifo #(.WIDTH(1), .DEPTH(DEP_DEPTH)) u_l2c (.clk, .rst_n,
    .push_valid(l2c_pv), .push_ready(l2c_pr), .push_data(1'b1),
    .pop_valid(l2c_v), .pop_ready(l2c_r), .pop_data(l2c_d), .count(l2c_n));
  idla_fifo #(.WIDTH(1), .DEPTH(DEP_DEPTH)) u_c2l (.clk, .rst_n,
    .push_valid(c2l_pv), .push_ready(c2l_pr), .push_data(1'b1),
    .pop_valid(c2l_v), .pop_ready(c2l_r), .pop_data(c2l_d), .count(c2l_n));
  idla_fifo #(.WIDTH(1), .DEPTH(DEP_DEPTH)) u_c2s (.clk, .rst_n,
    .push_valid(c2s_pv), .push_ready(c2s_pr), .push_data(1'b1),
    .pop_valid(c2s_v), .pop_ready(c2s_r), .pop_data(c2s_d), .count(c2s_n));
  idla_fifo #(.WIDTH(1), .DEPTH(DEP_DEPTH)) u_s2c (.clk, .rst_n,
    .push_valid(s2c_pv), .push_ready(s2c_pr), .push_data(1'b1),
    .pop_valid(s2c_v), .pop_ready(s2c_r), .pop_data(s2c_d), .count(s2c_n));

  // ---------------- on-chip buffers ----------------
  logic                              inp_we, inp_re, res_we, res_re, wgt_we, wgt_re, out_we, out_re;
  logic [INP_AW-1:0]                 inp_waddr, inp_raddr;
  logic [RES_AW-1:0]                 res_waddr, res_raddr;
  logic [OUT_AW-1:0]                 out_waddr, out_raddr;
  logic [WR_AW-1:0]                  wgt_waddr;
  logic [WT_AW-1:0]                  wgt_raddr;
  logic [TP-1:0][DATA_W-1:0]         ld_wdata, inp_rdata, res_rdata, out_wdata, out_rdata;
  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt_rdata;

  idla_vec_buf #(.WIDTH(TP*DATA_W), .DEPTH(INP_D)) u_inp_buf (.clk,
    .we(inp_we), .waddr(inp_waddr), .wdata(ld_wdata), .re(inp_re), .raddr(inp_raddr), .rdata(inp_rdata));
  idla_vec_buf #(.WIDTH(TP*DATA_W), .DEPTH(RES_D)) u_res_buf (.clk,
    .we(res_we), .waddr(res_waddr), .wdata(ld_wdata), .re(res_re), .raddr(res_raddr), .rdata(res_rdata));
  idla_vec_buf #(.WIDTH(TP*DATA_W), .DEPTH(OUT_D)) u_out_buf (.clk,
    .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .re(out_re), .raddr(out_raddr), .rdata(out_rdata));
  idla_wgt_buf #(.TILES(WGT_T)) u_wgt_buf (.clk,
    .we(wgt_we), .waddr(wgt_waddr), .wdata(ld_wdata), .re(wgt_re), .raddr(wgt_raddr), .rdata(wgt_rdata));

  // ---------------- Load, Comp, Save ----------------
  logic ld_busy, cp_busy, sv_busy;

  idla_load #(.INP_AW(INP_AW), .WGT_AW(WR_AW), .RES_AW(RES_AW)) u_load (
    .clk, .rst_n, .insn_valid(ldq_v), .insn_ready(ldq_r), .insn(ldq_d), .busy(ld_busy),
    .c2l_valid(c2l_v), .c2l_ready(c2l_r), .l2c_valid(l2c_pv), .l2c_ready(l2c_pr),
    .rd(ld_rd),
    .inp_we, .inp_waddr, .wgt_we, .wgt_waddr, .res_we, .res_waddr, .wdata(ld_wdata));

  idla_comp #(.ACC_D(ACC_D), .INP_AW(INP_AW), .WGT_AW(WT_AW), .RES_AW(RES_AW), .OUT_AW(OUT_AW)) u_comp (
    .clk, .rst_n, .insn_valid(cpq_v), .insn_ready(cpq_r), .insn(cpq_d), .busy(cp_busy),
    .l2c_valid(l2c_v), .l2c_ready(l2c_r), .c2l_valid(c2l_pv), .c2l_ready(c2l_pr),
    .s2c_valid(s2c_v), .s2c_ready(s2c_r), .c2s_valid(c2s_pv), .c2s_ready(c2s_pr),
    .inp_re, .inp_raddr, .inp_rdata, .wgt_re, .wgt_raddr, .wgt_rdata,
    .res_re, .res_raddr, .res_rdata, .out_we, .out_waddr, .out_wdata,
    .rd(cfg_rd));

  idla_save #(.OUT_AW(OUT_AW)) u_save (
    .clk, .rst_n, .insn_valid(svq_v), .insn_ready(svq_r), .insn(svq_d), .busy(sv_busy),
    .c2s_valid(c2s_v), .c2s_ready(c2s_r), .s2c_valid(s2c_pv), .s2c_ready(s2c_pr),
    .out_re, .out_raddr, .out_rdata,
    .wr_valid(sv_wr_valid), .wr_ready(sv_wr_ready), .wr_addr(sv_wr_addr), .wr_data(sv_wr_data));

  // ---------------- status ----------------
  logic busy_q;
  assign busy = ctrl_busy || ld_busy || cp_busy || sv_busy ||
                ldq_v || cpq_v || svq_v;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      busy_q <= busy || start;
      done   <= busy_q && !busy && !start;
    end
  end
endmodule
