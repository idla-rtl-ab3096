// idla_dense: the Dense unit of Comp - convolution and pooling.
//
// Runs one Comp instruction. The loop nest is kh, kw (kernel position), then
// oh, ow (output pixel); the loops over output channel co and input channel
// ci have the fixed bound TP and are unrolled into the multiply-add array, so
// one weight tile is read per kernel position and reused over the whole
// output block. Per cycle one output pixel is updated:
//   inp address = inp_base + (oh*S + kh)*IW + ow*S + kw   (TP input channels)
//   wgt tile    = wgt_base + kh*K + kw
//   acc address = acc_base + oh*OW + ow                  (TP accumulators)
//   conv: acc += W * x     avg pool: acc += x     max pool: acc = max(acc, x)
// With ACC_FLAG the first kernel position starts from 0 (from the smallest
// 16-bit value for max pooling) instead of the stored accumulation, which is
// how a new output block is begun; further Comp instructions without
// ACC_FLAG add more input-channel blocks.
//
// wgt_buf is read only at the first pixel of each kernel position; its read
// data is held for the rest of the sweep.
//
// Pipeline: addresses are issued in stage 0, the buffers answer one cycle
// later and stage 1 computes and writes the accumulation back. When a read
// hits the address written in the previous cycle (only possible when
// OH*OW = 1) the written value is forwarded (bypass). A start accepted in
// cycle c gives done in cycle c + K*K*OH*OW + 2.
// The loop order and the unrolled (co, ci) array follow the published data
// flow; the pipeline, the bypass and the pooling arithmetic are this design's.
module idla_dense
  import idla_pkg::*;
#(
  parameter int unsigned INP_AW = 16,
  parameter int unsigned WGT_AW = 16,
  parameter int unsigned ACC_AW = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  comp_insn_t                        insn,
  output logic                              busy,
  output logic                              done,
  output logic                              bypass_hit,
  // inp_buf read
  output logic                              inp_re,
  output logic [INP_AW-1:0]                 inp_raddr,
  input  logic [TP-1:0][DATA_W-1:0]         inp_rdata,
  // wgt_buf read
  output logic                              wgt_re,
  output logic [WGT_AW-1:0]                 wgt_raddr,
  input  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt_rdata,
  // accumulation buffer
  output logic                              acc_re,
  output logic [ACC_AW-1:0]                 acc_raddr,
  input  logic [TP-1:0][ACC_W-1:0]          acc_rdata,
  output logic                              acc_we,
  output logic [ACC_AW-1:0]                 acc_waddr,
  output logic [TP-1:0][ACC_W-1:0]          acc_wdata
);
  comp_insn_t       q;
  logic             run;
  logic [3:0]       kh, kw;
  logic [7:0]       oh, ow;
  logic             last;

  // stage 1 state
  logic             s1_v, s1_first;
  logic [ACC_AW-1:0] s1_addr;
  // last write, for the bypass
  logic             wq_v;
  logic [ACC_AW-1:0] wq_addr;
  logic [TP-1:0][ACC_W-1:0] wq_data;

  assign last = (kh == q.size.k - 1) && (kw == q.size.k - 1) &&
                (oh == q.size.oh - 1) && (ow == q.size.ow - 1);
  assign busy = run || s1_v;

  // ---------------- stage 0: loop counters and addresses ----------------
  always_comb begin
    logic [31:0] row, col;
    row = 32'(oh) * 32'(q.size.stride) + 32'(kh);
    col = 32'(ow) * 32'(q.size.stride) + 32'(kw);
    inp_raddr = INP_AW'(32'(q.inp_base) + row * 32'(q.size.iw) + col);
    wgt_raddr = WGT_AW'(32'(q.wgt_base) + 32'(kh) * 32'(q.size.k) + 32'(kw));
    acc_raddr = ACC_AW'(32'(q.acc_base) + 32'(oh) * 32'(q.size.ow) + 32'(ow));
    inp_re = run;
    wgt_re = run && oh == 0 && ow == 0;   // new tile only when (kh, kw) moves on
    acc_re = run;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0;
      kh <= '0; kw <= '0; oh <= '0; ow <= '0;
      q <= '0;
    end else if (!run) begin
      if (start && !s1_v) begin
        q   <= insn;
        run <= 1'b1;
        kh <= '0; kw <= '0; oh <= '0; ow <= '0;
      end
    end else begin
      if (last) run <= 1'b0;
      if (ow == q.size.ow - 1) begin
        ow <= '0;
        if (oh == q.size.oh - 1) begin
          oh <= '0;
          if (kw == q.size.k - 1) begin
            kw <= '0;
            kh <= kh + 1'b1;
          end else kw <= kw + 1'b1;
        end else oh <= oh + 1'b1;
      end else ow <= ow + 1'b1;
    end
  end

  // ---------------- stage 1: multiply-add / pool, write back --------------
  logic [TP-1:0][ACC_W-1:0] psum, acc_old, acc_new;

  idla_mac_array u_mac (.wgt(wgt_rdata), .inp(inp_rdata), .psum(psum));

  assign bypass_hit = s1_v && wq_v && (wq_addr == s1_addr);

  always_comb begin
    acc_old = bypass_hit ? wq_data : acc_rdata;
    for (int c = 0; c < TP; c++) begin
      logic signed [ACC_W-1:0] base, x;
      x = ACC_W'($signed(inp_rdata[c]));
      if (s1_first) base = (q.cmp_op == CMP_MAXP) ? ACC_W'(signed'(DATA_MIN)) : '0;
      else          base = acc_old[c];
      unique case (q.cmp_op)
        CMP_AVGP: acc_new[c] = base + x;
        CMP_MAXP: acc_new[c] = (x > base) ? x : base;
        default:  acc_new[c] = base + psum[c];
      endcase
    end
  end

  assign acc_we    = s1_v;
  assign acc_waddr = s1_addr;
  assign acc_wdata = acc_new;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v  <= 1'b0;
      wq_v  <= 1'b0;
      done  <= 1'b0;
    end else begin
      s1_v     <= run;
      s1_first <= q.acc_flag && kh == 0 && kw == 0;
      s1_addr  <= acc_raddr;
      wq_v     <= s1_v;
      wq_addr  <= s1_addr;
      wq_data  <= acc_new;
      done     <= s1_v && !run;
    end
  end

  a_shape: assert property (@(posedge clk) disable iff (!rst_n)
    start && !busy |-> insn.size.k != 0 && insn.size.oh != 0 && insn.size.ow != 0 && insn.size.stride != 0);
endmodule
