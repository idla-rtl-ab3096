// idla_ctrl: the Ctrl module - instruction fetch, decode and dispatch.
//
// After start it reads insn_count 128-bit instructions from DDR, one per
// word from word address insn_base, looks at OP_CODE and pushes each into
// the queue of the module that runs it: Load, Comp (Comp and Comp_cfg) or
// Save. The three modules then run concurrently and order themselves through
// the dependency tokens, so Ctrl never waits for them, only for space in a
// queue. One read is outstanding at a time: fetch, response, dispatch take
// three cycles per instruction when DDR answers at once and the queue has
// room. An undefined OP_CODE is dropped and counted in bad_ops.
// Fetch, decode and dispatch follow the published design; the queue
// handshake, the one-at-a-time fetch and the bad-opcode rule are this
// design's choice.
module idla_ctrl
  import idla_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] insn_base,
  input  logic [31:0]       insn_count,
  output logic              busy,
  output logic [15:0]       bad_ops,
  ddr_rd_if.master          rd,
  // instruction queues
  output logic              ld_valid,
  input  logic              ld_ready,
  output logic              cp_valid,
  input  logic              cp_ready,
  output logic              sv_valid,
  input  logic              sv_ready,
  output logic [INSN_W-1:0] insn
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RSP, S_DISP} state_e;
  state_e      st;
  logic [31:0] pc, count;
  logic [ADDR_W-1:0] base;
  opcode_e     op;
  logic        taken;

  assign busy         = (st != S_IDLE);
  assign rd.req_valid = (st == S_REQ);
  assign rd.req_addr  = base + pc;
  assign rd.rsp_ready = (st == S_RSP);

  assign op       = opcode_e'(insn[2:0]);
  assign ld_valid = (st == S_DISP) && op == OP_LOAD;
  assign cp_valid = (st == S_DISP) && (op == OP_COMP || op == OP_COMP_CFG);
  assign sv_valid = (st == S_DISP) && op == OP_SAVE;
  assign taken    = (ld_valid && ld_ready) || (cp_valid && cp_ready) || (sv_valid && sv_ready) ||
                    (st == S_DISP && !(op inside {OP_LOAD, OP_COMP, OP_COMP_CFG, OP_SAVE}));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      pc      <= '0;
      count   <= '0;
      base    <= '0;
      insn    <= '0;
      bad_ops <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          pc    <= '0;
          count <= insn_count;
          base  <= insn_base;
          st    <= (insn_count != 0) ? S_REQ : S_IDLE;
        end
        S_REQ: if (rd.req_ready) st <= S_RSP;
        S_RSP: if (rd.rsp_valid) begin
          insn <= rd.rsp_data;
          st   <= S_DISP;
        end
        S_DISP: if (taken) begin
          if (!(op inside {OP_LOAD, OP_COMP, OP_COMP_CFG, OP_SAVE})) bad_ops <= bad_ops + 1'b1;
          pc <= pc + 1'b1;
          st <= (pc + 1 == count) ? S_IDLE : S_REQ;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
