// idla_cfg: the Cfg unit of Comp - control registers and bias buffer.
//
// Executes one Comp_cfg instruction per start pulse:
//   CFG_OP = CFG_REG : register CFG_ADDR takes CFG_DATA (done next cycle)
//   CFG_OP = CFG_BIAS: ceil(CFG_CH_SIZE / TP) DDR words from DRAM_BASE, each
//                      TP 16-bit bias values, are written to the bias buffer
//                      from entry CFG_ADDR on (done after the last word).
// Registers (this design's map): 0 ALU_CTRL {relu_en,res_en,bias_en},
// 1 BIAS_IDX, 2 BIAS_SHIFT, 3 OUT_SHIFT, 4 SCALE; all reset to 0 except
// SCALE = 1. The registers drive the Alu; bias is the bias-buffer entry
// selected by BIAS_IDX, registered (valid one cycle after BIAS_IDX changes).
// Up to MAX_OUT bias reads are kept outstanding.
module idla_cfg
  import idla_pkg::*;
#(
  parameter int unsigned DEPTH   = BIAS_DEPTH,
  parameter int unsigned MAX_OUT = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  cfg_insn_t                 insn,
  output logic                      busy,
  output logic                      done,
  ddr_rd_if.master                  rd,
  output alu_cfg_t                  regs,
  output logic [TP-1:0][DATA_W-1:0] bias
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [TP*DATA_W-1:0] mem [DEPTH];
  cfg_insn_t   q;
  logic        loading;
  logic [15:0] n_words, n_req, n_rsp;
  logic [$clog2(MAX_OUT+1)-1:0] outst;

  assign busy = loading;

  // request / response bookkeeping
  logic req_fire, rsp_fire;
  assign rd.req_valid = loading && (n_req < n_words) && (32'(outst) < MAX_OUT);
  assign rd.req_addr  = q.dram_base + 32'(n_req);
  assign rd.rsp_ready = loading;
  assign req_fire = rd.req_valid && rd.req_ready;
  assign rsp_fire = rd.rsp_valid && rd.rsp_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loading <= 1'b0;
      done    <= 1'b0;
      n_req   <= '0;
      n_rsp   <= '0;
      n_words <= '0;
      outst   <= '0;
      q       <= '0;
      regs    <= '{scale: 16'd1, default: '0};
    end else begin
      done <= 1'b0;
      if (!loading && start) begin
        q <= insn;
        if (insn.cfg_op == CFG_BIAS && insn.ch_size != 0) begin
          loading <= 1'b1;
          n_words <= 16'((32'(insn.ch_size) + TP - 1) / TP);
          n_req   <= '0;
          n_rsp   <= '0;
        end else begin
          done <= 1'b1;
          if (insn.cfg_op == CFG_REG) begin
            unique case (insn.cfg_addr)
              REG_ALU_CTRL:   {regs.relu_en, regs.res_en, regs.bias_en} <= insn.cfg_data[2:0];
              REG_BIAS_IDX:   regs.bias_idx   <= insn.cfg_data[15:0];
              REG_BIAS_SHIFT: regs.bias_shift <= insn.cfg_data[5:0];
              REG_OUT_SHIFT:  regs.out_shift  <= insn.cfg_data[5:0];
              REG_SCALE:      regs.scale      <= insn.cfg_data[15:0];
              default: ;
            endcase
          end
        end
      end
      if (loading) begin
        if (req_fire) n_req <= n_req + 1'b1;
        if (rsp_fire) n_rsp <= n_rsp + 1'b1;
        outst <= outst + $bits(outst)'(req_fire) - $bits(outst)'(rsp_fire);
        if (rsp_fire && n_rsp == n_words - 1) begin
          loading <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rsp_fire) mem[AW'(32'(q.cfg_addr) + 32'(n_rsp))] <= rd.rsp_data;
    bias <= mem[AW'(regs.bias_idx)];
  end
endmodule
