// idla_save: the Save module - writes results from out_buf back to DDR.
//
// Takes Save instructions from its queue one at a time. It waits for the
// token DEPT_INFO asks for (pop_prev: Comp has finished filling out_buf),
// then reads x_size * y_size consecutive vectors of out_buf from sram_base
// and writes them to DDR as y_size rows of x_size words, the rows
// dram_stride words apart from dram_base (so results can be placed inside a
// larger, e.g. zero-padded, feature map). It then pushes the token that
// gives out_buf back to Comp (push_prev) if asked. out_buf reads are
// one-cycle RAM reads whose data the RAM holds while DDR stalls; a new read
// is issued in the cycle the previous word is written, so a stream runs at
// one word per cycle when DDR accepts it.
// The transfer shape and the token protocol are this design's choice.
module idla_save
  import idla_pkg::*;
#(
  parameter int unsigned OUT_AW = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      insn_valid,
  output logic                      insn_ready,
  input  logic [INSN_W-1:0]         insn,
  output logic                      busy,
  // dependency tokens
  input  logic                      c2s_valid,
  output logic                      c2s_ready,
  output logic                      s2c_valid,
  input  logic                      s2c_ready,
  // out_buf read
  output logic                      out_re,
  output logic [OUT_AW-1:0]         out_raddr,
  input  logic [TP-1:0][DATA_W-1:0] out_rdata,
  // DDR write
  output logic                      wr_valid,
  input  logic                      wr_ready,
  output logic [ADDR_W-1:0]         wr_addr,
  output logic [TP-1:0][DATA_W-1:0] wr_data
);
  typedef enum logic [1:0] {S_IDLE, S_DEP, S_XFER, S_PUSH} state_e;
  state_e    st;
  mem_insn_t q;
  logic [31:0] n_rd, n_tot;
  logic [15:0] wx, wy;
  // r_v: out_buf's read data holds a word not yet written to DDR. The RAM
  // keeps its read data until the next read, so it serves as the DDR data.
  logic        r_v;
  logic        fire;

  assign busy       = (st != S_IDLE);
  assign insn_ready = (st == S_IDLE);
  assign n_tot      = 32'(q.x_size) * 32'(q.y_size);
  assign c2s_ready  = (st == S_DEP) && q.dept.pop_prev && c2s_valid;
  assign s2c_valid  = (st == S_PUSH);

  assign wr_valid  = r_v;
  assign wr_data   = out_rdata;
  assign fire      = wr_valid && wr_ready;
  assign out_re    = (st == S_XFER) && (n_rd < n_tot) && (!r_v || fire);
  assign out_raddr = OUT_AW'(32'(q.sram_base) + n_rd);
  assign wr_addr   = q.dram_base + 32'(wy) * 32'(q.dram_stride) + 32'(wx);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      q    <= '0;
      n_rd <= '0;
      wx   <= '0;
      wy   <= '0;
      r_v  <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (insn_valid) begin
          q    <= mem_insn_t'(insn);
          n_rd <= '0;
          wx   <= '0;
          wy   <= '0;
          st   <= S_DEP;
        end
        S_DEP: if (!q.dept.pop_prev || c2s_valid)
          st <= (q.x_size == 0 || q.y_size == 0) ? (q.dept.push_prev ? S_PUSH : S_IDLE) : S_XFER;
        S_XFER: begin
          if (out_re) n_rd <= n_rd + 1'b1;
          r_v <= out_re || (r_v && !fire);
          if (fire) begin
            if (wx == q.x_size - 1) begin
              wx <= '0;
              wy <= wy + 1'b1;
              if (wy == q.y_size - 1) st <= q.dept.push_prev ? S_PUSH : S_IDLE;
            end else wx <= wx + 1'b1;
          end
        end
        S_PUSH: if (s2c_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  a_hold_wr: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data));
endmodule
