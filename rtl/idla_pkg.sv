// idla_pkg: shared constants and types of the IDLA CNN accelerator.
//
// The array size TP = 32 (a TP x TP multiply-add array) and 16-bit fixed-point
// data follow the published configuration. The 32-bit accumulator width,
// the buffer depths and the exact bit layout of the four 128-bit instructions
// (Load, Comp, Save, Comp_cfg) are choices of this implementation: the field
// names (OP_CODE, DEPT_INFO, BUF_ID, CMP_OP, CMP_SIZE, ACC_FLAG, CFG_OP,
// CFG_ADDR, CFG_DATA, DRAM_BASE, CFG_CH_SIZE) are those of the instruction set,
// the widths and positions are not. Every instruction keeps OP_CODE in bits
// [2:0] and DEPT_INFO in bits [6:3]; the remaining fields depend on OP_CODE.
package idla_pkg;

  parameter int unsigned TP     = 32;   // multiply-add array is TP x TP
  parameter int unsigned DATA_W = 16;   // feature map / weight / bias width
  parameter int unsigned ACC_W  = 32;   // accumulator width
  parameter int unsigned INSN_W = 128;  // instruction width
  parameter int unsigned ADDR_W = 32;   // DDR word address width

  // Default on-chip buffer depths (in vectors of TP elements, weight tiles)
  parameter int unsigned INP_DEPTH  = 4096;
  parameter int unsigned RES_DEPTH  = 2048;
  parameter int unsigned OUT_DEPTH  = 2048;
  parameter int unsigned ACC_DEPTH  = 2048;
  parameter int unsigned WGT_TILES  = 256;
  parameter int unsigned BIAS_DEPTH = 64;

  typedef enum logic [2:0] {
    OP_LOAD     = 3'd0,
    OP_COMP     = 3'd1,
    OP_SAVE     = 3'd2,
    OP_COMP_CFG = 3'd3
  } opcode_e;

  // DEPT_INFO: which dependency tokens an instruction waits for (pop) before
  // it runs and which it signals (push) when it is done. "prev" is the module
  // upstream in Load -> Comp -> Save, "next" the one downstream.
  typedef struct packed {
    logic push_next;
    logic push_prev;
    logic pop_next;
    logic pop_prev;
  } dept_t;

  typedef enum logic [1:0] {
    BUF_INP = 2'd0,
    BUF_WGT = 2'd1,
    BUF_RES = 2'd2,
    BUF_OUT = 2'd3
  } buf_id_e;

  typedef enum logic [1:0] {
    CMP_CONV = 2'd0,
    CMP_AVGP = 2'd1,
    CMP_MAXP = 2'd2
  } cmp_op_e;

  typedef enum logic [1:0] {
    CFG_REG  = 2'd0,
    CFG_BIAS = 2'd1
  } cfg_op_e;

  // Load and Save: 2-D block transfer between DDR and a buffer.
  typedef struct packed {
    logic [22:0] rsvd;
    logic [15:0] dram_stride;  // DDR words between rows
    logic [15:0] y_size;       // rows
    logic [15:0] x_size;       // words per row
    logic [31:0] dram_base;    // DDR word address of the first word
    logic [15:0] sram_base;    // first buffer address (weight rows for BUF_WGT)
    buf_id_e     buf_id;
    dept_t       dept;
    opcode_e     op;
  } mem_insn_t;

  // CMP_SIZE: input row width, kernel size, stride and output size.
  typedef struct packed {
    logic [7:0] ow;
    logic [7:0] oh;
    logic [3:0] stride;
    logic [3:0] k;
    logic [7:0] iw;
  } cmp_size_t;

  typedef struct packed {
    logic [4:0]  rsvd;
    cmp_size_t   size;
    logic [15:0] out_base;   // out_buf address of the first result (OUT_FLAG)
    logic [15:0] res_base;   // res_buf address of the first residual vector
    logic [15:0] acc_base;   // accumulation buffer address
    logic [15:0] wgt_base;   // first weight tile
    logic [15:0] inp_base;   // inp_buf address of pixel (0,0)
    logic        out_flag;   // run the Alu over the accumulations afterwards
    logic        acc_flag;   // start from a cleared accumulation
    cmp_op_e     cmp_op;
    dept_t       dept;
    opcode_e     op;
  } comp_insn_t;

  typedef struct packed {
    logic [30:0] rsvd;
    logic [15:0] ch_size;    // CFG_CH_SIZE: bias values to load
    logic [31:0] dram_base;  // DRAM_BASE: DDR word address of the bias data
    logic [31:0] cfg_data;   // CFG_DATA: register value
    logic [7:0]  cfg_addr;   // CFG_ADDR: register number / first bias entry
    cfg_op_e     cfg_op;
    dept_t       dept;
    opcode_e     op;
  } cfg_insn_t;

  // Comp control registers (written by Comp_cfg with CFG_OP = CFG_REG)
  localparam logic [7:0] REG_ALU_CTRL   = 8'd0;  // {relu_en, res_en, bias_en}
  localparam logic [7:0] REG_BIAS_IDX   = 8'd1;  // bias buffer entry used by the Alu
  localparam logic [7:0] REG_BIAS_SHIFT = 8'd2;  // bias is added as bias << BIAS_SHIFT
  localparam logic [7:0] REG_OUT_SHIFT  = 8'd3;  // result >>> OUT_SHIFT
  localparam logic [7:0] REG_SCALE      = 8'd4;  // result * SCALE (before the shift)

  typedef struct packed {
    logic        relu_en;
    logic        res_en;
    logic        bias_en;
    logic [5:0]  bias_shift;
    logic [5:0]  out_shift;
    logic [15:0] scale;
    logic [15:0] bias_idx;
  } alu_cfg_t;

  localparam logic signed [DATA_W-1:0] DATA_MIN = {1'b1, {(DATA_W-1){1'b0}}};
  localparam logic signed [DATA_W-1:0] DATA_MAX = {1'b0, {(DATA_W-1){1'b1}}};

endpackage
