// tb_idla_comp: runs a small layer on the Comp module with behavioural
// inp/wgt/res/out buffers, a stalling DDR model for the bias and a token
// source/sink played by this testbench. Program: configure the Alu
// registers, load 64 biases, a 3x3 convolution over one input-channel block
// that must wait for a Load token, a 1x1 convolution that adds a second block
// and writes out_buf through bias + rescale + residual + ReLU (waiting for
// Save's token and pushing tokens to Load and Save), then a max pooling with
// plain output. out_buf is compared with a reference computed here.
module tb_idla_comp;
  import idla_pkg::*;
  localparam int ID = 512, WT = 64, RD = 64, OD = 64;
  logic clk = 0, rst_n = 0;
  logic insn_valid, insn_ready, busy;
  logic [INSN_W-1:0] insn;
  logic l2c_valid, l2c_ready, c2l_valid, c2l_ready, s2c_valid, s2c_ready, c2s_valid, c2s_ready;
  logic inp_re, wgt_re, res_re, out_we;
  logic [15:0] inp_raddr, wgt_raddr, res_raddr, out_waddr;
  logic [TP-1:0][DATA_W-1:0] inp_rdata, res_rdata, out_wdata;
  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt_rdata;

  logic [TP-1:0][DATA_W-1:0]         inp_m [ID];
  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt_m [WT];
  logic [TP-1:0][DATA_W-1:0]         res_m [RD];
  logic [TP-1:0][DATA_W-1:0]         out_m [OD];
  logic [TP-1:0][DATA_W-1:0]         bias_m [2];
  longint acc_ref [16][TP];
  logic [TP-1:0][DATA_W-1:0]         out_ref [OD];
  bit     out_set [OD];
  int checks = 0, failures = 0, c2l_n = 0, c2s_n = 0, l2c_n = 0, s2c_n = 0;

  ddr_rd_if #(.AW(ADDR_W), .DW(TP*DATA_W)) rd (.clk, .rst_n);
  ddr_rd_model #(.DW(TP*DATA_W), .DEPTH(64)) u_ddr (.clk, .rst_n, .port(rd));
  idla_comp #(.ACC_D(256)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (inp_re) inp_rdata <= inp_m[inp_raddr % ID];
    if (wgt_re) wgt_rdata <= wgt_m[wgt_raddr % WT];
    if (res_re) res_rdata <= res_m[res_raddr % RD];
    if (out_we) out_m[out_waddr % OD] <= out_wdata;
    if (c2l_valid && c2l_ready) c2l_n++;
    if (c2s_valid && c2s_ready) c2s_n++;
    if (l2c_valid && l2c_ready) l2c_n++;
    if (s2c_valid && s2c_ready) s2c_n++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic send(input logic [INSN_W-1:0] w);
    @(negedge clk);
    insn = w; insn_valid = 1;
    @(posedge clk);
    while (!insn_ready) @(posedge clk);
    @(negedge clk);
    insn_valid = 0;
  endtask

  function automatic logic [INSN_W-1:0] cfg_reg(input logic [7:0] a, input int d);
    cfg_insn_t c;
    c = '0; c.op = OP_COMP_CFG; c.cfg_op = CFG_REG; c.cfg_addr = a; c.cfg_data = 32'(d);
    return c;
  endfunction

  function automatic longint sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    comp_insn_t c;
    cfg_insn_t  f;
    insn_valid = 0; insn = '0;
    l2c_valid = 0; s2c_valid = 0; c2l_ready = 1; c2s_ready = 1;
    for (int i = 0; i < ID; i++) for (int k = 0; k < TP; k++) inp_m[i][k] = DATA_W'($urandom_range(200)) - 16'd100;
    for (int i = 0; i < WT; i++) for (int r = 0; r < TP; r++) for (int k = 0; k < TP; k++)
      wgt_m[i][r][k] = DATA_W'($urandom_range(100)) - 16'd50;
    for (int i = 0; i < RD; i++) for (int k = 0; k < TP; k++) res_m[i][k] = DATA_W'($urandom_range(2000)) - 16'd1000;
    for (int e = 0; e < 2; e++) for (int k = 0; k < TP; k++) begin
      bias_m[e][k] = DATA_W'($urandom_range(4000)) - 16'd2000;
      u_ddr.mem[10 + e][k*DATA_W +: DATA_W] = bias_m[e][k];
    end
    for (int i = 0; i < OD; i++) begin out_m[i] = '0; out_set[i] = 0; end

    // ---- reference ----
    // conv 3x3 s1, iw 6, 4x4 outputs, inp_base 0, wgt 0..8; then 1x1 from inp 100, wgt 20
    for (int oh = 0; oh < 4; oh++) for (int ow = 0; ow < 4; ow++) for (int co = 0; co < TP; co++) begin
      longint v;
      v = 0;
      for (int kh = 0; kh < 3; kh++) for (int kw = 0; kw < 3; kw++) for (int ci = 0; ci < TP; ci++)
        v += longint'($signed(wgt_m[kh*3+kw][co][ci])) * longint'($signed(inp_m[(oh+kh)*6 + ow+kw][ci]));
      for (int ci = 0; ci < TP; ci++)
        v += longint'($signed(wgt_m[20][co][ci])) * longint'($signed(inp_m[100 + oh*4 + ow][ci]));
      acc_ref[oh*4+ow][co] = v;
    end
    // Alu: bias entry 1 << 2, * 3 >>> 4, + res[8 + p], ReLU; out_base 16
    for (int p = 0; p < 16; p++) begin
      for (int co = 0; co < TP; co++) begin
        longint x;
        x = acc_ref[p][co] + longint'($signed(bias_m[1][co])) * 4;
        x = (x * 3) >>> 4;
        x = sat16(sat16(x) + longint'($signed(res_m[8 + p][co])));
        if (x < 0) x = 0;
        out_ref[16 + p][co] = DATA_W'(x);
      end
      out_set[16 + p] = 1;
    end
    // max pool 2x2 s2 on inp 200.., iw 8, 2x2 outputs, plain output (ALU_CTRL 0, shift 0, scale 1) at out 40
    for (int oh = 0; oh < 2; oh++) for (int ow = 0; ow < 2; ow++) begin
      for (int co = 0; co < TP; co++) begin
        longint m;
        m = -32768;
        for (int kh = 0; kh < 2; kh++) for (int kw = 0; kw < 2; kw++)
          if (longint'($signed(inp_m[200 + (2*oh+kh)*8 + 2*ow+kw][co])) > m)
            m = longint'($signed(inp_m[200 + (2*oh+kh)*8 + 2*ow+kw][co]));
        out_ref[40 + oh*2 + ow][co] = DATA_W'(m);
      end
      out_set[40 + oh*2 + ow] = 1;
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    send(cfg_reg(REG_ALU_CTRL, 7));
    send(cfg_reg(REG_BIAS_SHIFT, 2));
    send(cfg_reg(REG_OUT_SHIFT, 4));
    send(cfg_reg(REG_SCALE, 3));
    send(cfg_reg(REG_BIAS_IDX, 1));
    f = '0; f.op = OP_COMP_CFG; f.cfg_op = CFG_BIAS; f.cfg_addr = 0; f.dram_base = 10; f.ch_size = 64;
    send(f);
    c = '0; c.op = OP_COMP; c.cmp_op = CMP_CONV; c.acc_flag = 1;
    c.size.k = 3; c.size.stride = 1; c.size.iw = 6; c.size.oh = 4; c.size.ow = 4;
    c.inp_base = 0; c.wgt_base = 0; c.acc_base = 32; c.dept.pop_prev = 1;
    send(c);
    repeat (30) @(negedge clk);
    check(busy && l2c_n == 0, "Comp waits for the Load token");
    l2c_valid = 1;
    @(posedge clk);
    while (!l2c_ready) @(posedge clk);
    @(negedge clk);
    l2c_valid = 0;
    c = '0; c.op = OP_COMP; c.cmp_op = CMP_CONV; c.acc_flag = 0; c.out_flag = 1;
    c.size.k = 1; c.size.stride = 1; c.size.iw = 4; c.size.oh = 4; c.size.ow = 4;
    c.inp_base = 100; c.wgt_base = 20; c.acc_base = 32; c.res_base = 8; c.out_base = 16;
    c.dept.pop_next = 1; c.dept.push_prev = 1; c.dept.push_next = 1;
    send(c);
    repeat (40) @(negedge clk);
    check(busy && s2c_n == 0 && !out_set[0] && c2s_n == 0, "Comp waits for the Save token");
    s2c_valid = 1;
    @(posedge clk);
    while (!s2c_ready) @(posedge clk);
    @(negedge clk);
    s2c_valid = 0;
    send(cfg_reg(REG_ALU_CTRL, 0));
    send(cfg_reg(REG_OUT_SHIFT, 0));
    send(cfg_reg(REG_SCALE, 1));
    c = '0; c.op = OP_COMP; c.cmp_op = CMP_MAXP; c.acc_flag = 1; c.out_flag = 1;
    c.size.k = 2; c.size.stride = 2; c.size.iw = 8; c.size.oh = 2; c.size.ow = 2;
    c.inp_base = 200; c.acc_base = 100; c.out_base = 40;
    send(c);
    @(negedge clk);
    while (busy) @(negedge clk);
    for (int i = 0; i < OD; i++)
      for (int k = 0; k < TP; k++)
        check(out_m[i][k] == (out_set[i] ? out_ref[i][k] : 16'd0),
              $sformatf("out[%0d][%0d] = %0d expected %0d", i, k, $signed(out_m[i][k]), $signed(out_ref[i][k])));
    check(c2l_n == 1 && c2s_n == 1 && l2c_n == 1 && s2c_n == 1, "token counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
