// idla_comp: the Comp module - Cfg, Dense and Alu around the accumulation buffer.
//
// Takes instructions from its queue one at a time:
//   1. waits for the dependency tokens DEPT_INFO asks for (pop_prev from the
//      Load->Comp FIFO: input data is loaded; pop_next from the Save->Comp
//      FIFO: out_buf has been drained) and consumes them;
//   2. runs Comp_cfg on the Cfg unit, or Comp on the Dense unit; if the Comp
//      instruction has OUT_FLAG, it then streams the OH*OW accumulations
//      from acc_base through the Alu (bias, rescale, residual from res_base,
//      ReLU, as the registers say) into out_buf from out_base, one vector
//      per cycle;
//   3. pushes the tokens DEPT_INFO asks for (push_prev: inp/wgt/res buffers
//      may be overwritten by Load; push_next: out_buf holds results for Save).
// The accumulation buffer lives here; inp_buf, wgt_buf, res_buf and out_buf
// are outside and shared with Load and Save. Sub-units and their roles follow
// the published design; the sequencing, the OUT_FLAG bit and the token
// protocol are this design's.
module idla_comp
  import idla_pkg::*;
#(
  parameter int unsigned ACC_D  = ACC_DEPTH,
  parameter int unsigned INP_AW = 16,
  parameter int unsigned WGT_AW = 16,
  parameter int unsigned RES_AW = 16,
  parameter int unsigned OUT_AW = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // instruction queue
  input  logic                              insn_valid,
  output logic                              insn_ready,
  input  logic [INSN_W-1:0]                 insn,
  output logic                              busy,
  // dependency tokens
  input  logic                              l2c_valid,   // from Load
  output logic                              l2c_ready,
  output logic                              c2l_valid,   // to Load
  input  logic                              c2l_ready,
  input  logic                              s2c_valid,   // from Save
  output logic                              s2c_ready,
  output logic                              c2s_valid,   // to Save
  input  logic                              c2s_ready,
  // buffers
  output logic                              inp_re,
  output logic [INP_AW-1:0]                 inp_raddr,
  input  logic [TP-1:0][DATA_W-1:0]         inp_rdata,
  output logic                              wgt_re,
  output logic [WGT_AW-1:0]                 wgt_raddr,
  input  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt_rdata,
  output logic                              res_re,
  output logic [RES_AW-1:0]                 res_raddr,
  input  logic [TP-1:0][DATA_W-1:0]         res_rdata,
  output logic                              out_we,
  output logic [OUT_AW-1:0]                 out_waddr,
  output logic [TP-1:0][DATA_W-1:0]         out_wdata,
  // DDR read for bias data
  ddr_rd_if.master                          rd
);
  localparam int unsigned ACC_AW = $clog2(ACC_D);

  typedef enum logic [2:0] {S_IDLE, S_DEP, S_EXEC, S_ALU, S_PUSH} state_e;
  state_e     st;
  logic [INSN_W-1:0] cur;
  comp_insn_t ci;
  cfg_insn_t  cf;
  dept_t      dep;
  assign ci  = comp_insn_t'(cur);
  assign cf  = cfg_insn_t'(cur);
  assign dep = ci.dept;

  assign busy       = (st != S_IDLE);
  assign insn_ready = (st == S_IDLE);

  // ---------------- dependency handshakes ----------------
  logic dep_ok;
  assign dep_ok    = (!dep.pop_prev || l2c_valid) && (!dep.pop_next || s2c_valid);
  assign l2c_ready = (st == S_DEP) && dep_ok && dep.pop_prev;
  assign s2c_ready = (st == S_DEP) && dep_ok && dep.pop_next;

  logic pushed_prev, pushed_next;
  assign c2l_valid = (st == S_PUSH) && dep.push_prev && !pushed_prev;
  assign c2s_valid = (st == S_PUSH) && dep.push_next && !pushed_next;

  // ---------------- sub-units ----------------
  logic dense_start, dense_busy, dense_done, dense_bypass;
  logic cfg_start, cfg_busy, cfg_done;
  alu_cfg_t regs;
  logic [TP-1:0][DATA_W-1:0] bias;

  logic                     d_acc_re, acc_re, acc_we;
  logic [ACC_AW-1:0]        d_acc_raddr, acc_raddr, acc_waddr;
  logic [TP-1:0][ACC_W-1:0] acc_rdata, acc_wdata;

  idla_dense #(.INP_AW(INP_AW), .WGT_AW(WGT_AW), .ACC_AW(ACC_AW)) u_dense (
    .clk, .rst_n, .start(dense_start), .insn(ci), .busy(dense_busy), .done(dense_done),
    .bypass_hit(dense_bypass),
    .inp_re, .inp_raddr, .inp_rdata, .wgt_re, .wgt_raddr, .wgt_rdata,
    .acc_re(d_acc_re), .acc_raddr(d_acc_raddr), .acc_rdata,
    .acc_we, .acc_waddr, .acc_wdata);

  idla_cfg u_cfg (
    .clk, .rst_n, .start(cfg_start), .insn(cf), .busy(cfg_busy), .done(cfg_done),
    .rd, .regs, .bias);

  idla_vec_buf #(.WIDTH(TP*ACC_W), .DEPTH(ACC_D)) u_acc_buf (
    .clk, .we(acc_we), .waddr(acc_waddr), .wdata(acc_wdata),
    .re(acc_re), .raddr(acc_raddr), .rdata(acc_rdata));

  // ---------------- Alu pass ----------------
  logic [15:0] a_cnt, a_n, a1_idx;
  logic        a_run, a1_v;
  assign a_n   = 16'(ci.size.oh) * 16'(ci.size.ow);
  assign a_run = (st == S_ALU) && (a_cnt < a_n);

  assign acc_re    = (st == S_ALU) ? a_run : d_acc_re;
  assign acc_raddr = (st == S_ALU) ? ACC_AW'(ci.acc_base + a_cnt) : d_acc_raddr;
  assign res_re    = a_run;
  assign res_raddr = RES_AW'(ci.res_base + a_cnt);

  idla_alu u_alu (.cfg(regs), .acc(acc_rdata), .bias(bias), .res(res_rdata), .out(out_wdata));
  assign out_we    = a1_v;
  assign out_waddr = OUT_AW'(ci.out_base + a1_idx);

  // ---------------- sequencing ----------------
  logic started;
  assign dense_start = (st == S_EXEC) && !started && ci.op == OP_COMP;
  assign cfg_start   = (st == S_EXEC) && !started && ci.op == OP_COMP_CFG;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      cur         <= '0;
      started     <= 1'b0;
      pushed_prev <= 1'b0;
      pushed_next <= 1'b0;
      a_cnt       <= '0;
      a1_v        <= 1'b0;
      a1_idx      <= '0;
    end else begin
      a1_v   <= a_run;
      a1_idx <= a_cnt;
      unique case (st)
        S_IDLE: if (insn_valid) begin
          cur <= insn;
          st  <= S_DEP;
        end
        S_DEP: if (dep_ok) begin
          st      <= S_EXEC;
          started <= 1'b0;
        end
        S_EXEC: begin
          started <= 1'b1;
          if ((ci.op == OP_COMP && dense_done) || (ci.op == OP_COMP_CFG && cfg_done) ||
              (ci.op != OP_COMP && ci.op != OP_COMP_CFG)) begin
            a_cnt <= '0;
            st    <= (ci.op == OP_COMP && ci.out_flag) ? S_ALU : S_PUSH;
            pushed_prev <= 1'b0;
            pushed_next <= 1'b0;
          end
        end
        S_ALU: begin
          if (a_run) a_cnt <= a_cnt + 1'b1;
          else if (!a1_v) st <= S_PUSH;
        end
        S_PUSH: begin
          if (c2l_valid && c2l_ready) pushed_prev <= 1'b1;
          if (c2s_valid && c2s_ready) pushed_next <= 1'b1;
          if ((!dep.push_prev || pushed_prev || c2l_ready) &&
              (!dep.push_next || pushed_next || c2s_ready))
            st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n) !(dense_busy && cfg_busy));
endmodule
