// tb_idla_top: end-to-end run of the engine at its default sizes.
//
// Builds an instruction program for four small layers, puts it with the
// feature maps, weights, residuals and biases into behavioural DDR models
// (random back-pressure on every port), starts the engine and compares every
// word Save writes to DDR with results computed here. Layers:
//   L1  3x3 convolution, 64 -> 64 channels, 6x6 outputs on a zero-padded 8x8
//       input, bias + rescale + residual + ReLU (two output-channel groups)
//   L2  3x3 / stride 2 max pooling, 64 channels, 9x9 -> 4x4 (two groups)
//   L3  2x2 / stride 2 average pooling, 32 channels, 8x8 -> 4x4
//   L4  3x3 convolution on a 3x3 input (one output pixel, a fully connected
//       layer), 64 -> 32 channels, bias + scale that saturates + ReLU
// Groups alternate between two halves of every buffer, with the dependency
// tokens ordering Load, Comp and Save, so loading, computing and saving
// overlap. Every mechanism is counted and must occur at least once: each
// kind of dependency wait, queue-full stalls in Ctrl, DDR back-pressure,
// the accumulation bypass, all three CMP_OP modes, residual, ReLU,
// saturation, bias loading and Load/Comp and Comp/Save overlap.
module tb_idla_top;
  import idla_pkg::*;

  localparam int LD_WORDS = 8192;
  localparam int IN_WORDS = 1024;
  localparam int INP_HALF = INP_DEPTH / 2, WGT_HALF = WGT_TILES / 2;
  localparam int RES_HALF = RES_DEPTH / 2, OUT_HALF = OUT_DEPTH / 2, ACC_HALF = ACC_DEPTH / 2;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [15:0] bad_ops;
  logic [ADDR_W-1:0] insn_base;
  logic [31:0] insn_count;
  logic sv_wr_valid, sv_wr_ready;
  logic [ADDR_W-1:0] sv_wr_addr;
  logic [TP*DATA_W-1:0] sv_wr_data;

  ddr_rd_if #(.AW(ADDR_W), .DW(INSN_W))    insn_rd (.clk, .rst_n);
  ddr_rd_if #(.AW(ADDR_W), .DW(TP*DATA_W)) ld_rd   (.clk, .rst_n);
  ddr_rd_if #(.AW(ADDR_W), .DW(TP*DATA_W)) cfg_rd  (.clk, .rst_n);
  ddr_rd_model #(.DW(INSN_W),    .DEPTH(IN_WORDS)) u_insn_ddr (.clk, .rst_n, .port(insn_rd));
  ddr_rd_model #(.DW(TP*DATA_W), .DEPTH(LD_WORDS)) u_ld_ddr   (.clk, .rst_n, .port(ld_rd));
  ddr_rd_model #(.DW(TP*DATA_W), .DEPTH(16))       u_cfg_ddr  (.clk, .rst_n, .port(cfg_rd));

  idla_top dut (
    .clk, .rst_n, .start, .insn_base, .insn_count, .busy, .done, .bad_ops,
    .insn_rd_req_valid(insn_rd.req_valid), .insn_rd_req_ready(insn_rd.req_ready),
    .insn_rd_req_addr(insn_rd.req_addr), .insn_rd_rsp_valid(insn_rd.rsp_valid),
    .insn_rd_rsp_ready(insn_rd.rsp_ready), .insn_rd_rsp_data(insn_rd.rsp_data),
    .ld_rd_req_valid(ld_rd.req_valid), .ld_rd_req_ready(ld_rd.req_ready),
    .ld_rd_req_addr(ld_rd.req_addr), .ld_rd_rsp_valid(ld_rd.rsp_valid),
    .ld_rd_rsp_ready(ld_rd.rsp_ready), .ld_rd_rsp_data(ld_rd.rsp_data),
    .cfg_rd_req_valid(cfg_rd.req_valid), .cfg_rd_req_ready(cfg_rd.req_ready),
    .cfg_rd_req_addr(cfg_rd.req_addr), .cfg_rd_rsp_valid(cfg_rd.rsp_valid),
    .cfg_rd_rsp_ready(cfg_rd.rsp_ready), .cfg_rd_rsp_data(cfg_rd.rsp_data),
    .sv_wr_valid, .sv_wr_ready, .sv_wr_addr, .sv_wr_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DDR write side ----------------
  logic [TP*DATA_W-1:0] ddr_out [int];
  logic [TP*DATA_W-1:0] expect_out [int];
  int wr_stalls = 0;
  always @(posedge clk) begin
    if (rst_n && sv_wr_valid && !sv_wr_ready) wr_stalls++;
    if (rst_n && sv_wr_valid && sv_wr_ready) begin
      if (ddr_out.exists(int'(sv_wr_addr))) check(0, $sformatf("DDR word %0d written twice", sv_wr_addr));
      ddr_out[int'(sv_wr_addr)] = sv_wr_data;
    end
    sv_wr_ready <= $urandom_range(7) == 0;   // a slow DDR write port makes Save lag
  end

  // ---------------- mechanism counters ----------------
  int n_comp_wait_load = 0, n_load_wait_comp = 0, n_save_wait_comp = 0, n_comp_wait_save = 0;
  int n_queue_full = 0, n_bypass = 0, n_conv = 0, n_avg = 0, n_max = 0, n_res = 0, n_relu = 0;
  int n_ld_cp_overlap = 0, n_cp_sv_overlap = 0, n_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) n_cycles++;
    if (dut.u_comp.st == 3'd1 && dut.u_comp.dep.pop_prev && !dut.l2c_v) n_comp_wait_load++;
    if (dut.u_comp.st == 3'd1 && dut.u_comp.dep.pop_next && !dut.s2c_v) n_comp_wait_save++;
    if (dut.u_load.st == 2'd1 && dut.u_load.q.dept.pop_next && !dut.c2l_v) n_load_wait_comp++;
    if (dut.u_save.st == 2'd1 && dut.u_save.q.dept.pop_prev && !dut.c2s_v) n_save_wait_comp++;
    if ((dut.ld_pv && !dut.ld_pr) || (dut.cp_pv && !dut.cp_pr) || (dut.sv_pv && !dut.sv_pr)) n_queue_full++;
    if (dut.u_comp.dense_bypass) n_bypass++;
    if (dut.u_comp.dense_start) begin
      case (dut.u_comp.ci.cmp_op)
        CMP_CONV: n_conv++;
        CMP_AVGP: n_avg++;
        default:  n_max++;
      endcase
    end
    if (dut.u_comp.a1_v && dut.u_comp.regs.res_en) n_res++;
    if (dut.u_comp.a1_v && dut.u_comp.regs.relu_en) n_relu++;
    if (dut.u_load.st == 2'd2 && dut.cp_busy && dut.u_comp.dense_busy) n_ld_cp_overlap++;
    if (dut.u_save.st == 2'd2 && dut.u_comp.dense_busy) n_cp_sv_overlap++;
  end

  // ---------------- program builder ----------------
  int n_insn = 0;
  task automatic emit(input logic [INSN_W-1:0] w);
    u_insn_ddr.mem[n_insn] = w;
    n_insn++;
  endtask

  function automatic logic [INSN_W-1:0] mk_mem(input opcode_e op, input buf_id_e b, input int sram,
      input int dram, input int xs, input int ys, input int stride, input dept_t d);
    mem_insn_t m;
    m = '0;
    m.op = op; m.dept = d; m.buf_id = b; m.sram_base = 16'(sram); m.dram_base = 32'(dram);
    m.x_size = 16'(xs); m.y_size = 16'(ys); m.dram_stride = 16'(stride);
    return m;
  endfunction

  function automatic logic [INSN_W-1:0] mk_reg(input logic [7:0] a, input int v);
    cfg_insn_t c;
    c = '0; c.op = OP_COMP_CFG; c.cfg_op = CFG_REG; c.cfg_addr = a; c.cfg_data = 32'(v);
    return c;
  endfunction

  function automatic longint lane(input logic [TP*DATA_W-1:0] w, input int c);
    return longint'($signed(w[c*DATA_W +: DATA_W]));
  endfunction

  function automatic longint sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  int n_sat = 0;
  logic [TP*DATA_W-1:0] bias_words [3];

  // One group: one output-channel block of a layer, all its input-channel
  // blocks. Loads, computes and saves it in buffer half g % 2, and works out
  // the expected DDR words.
  task automatic group(input int g, input cmp_op_e op, input int k, input int s, input int ih,
      input int iw, input int oh, input int ow, input int n_ci, input int in_ddr, input int wgt_ddr,
      input int res_ddr, input int alu_ctrl, input int bias_idx, input int bias_shift,
      input int out_shift, input int scale, input int out_ddr);
    int h;
    dept_t d;
    h = g % 2;
    // ---- Load ----
    for (int i = 0; i < n_ci; i++) begin
      d = '0;
      d.pop_next  = (i == 0) && (g >= 2);
      d.push_next = (op != CMP_CONV || wgt_ddr < 0) && res_ddr < 0 && (i == n_ci - 1);
      emit(mk_mem(OP_LOAD, BUF_INP, h * INP_HALF + i * ih * iw, in_ddr + i * ih * iw, iw, ih, iw, d));
    end
    if (op == CMP_CONV) begin
      d = '0;
      d.push_next = (res_ddr < 0);
      emit(mk_mem(OP_LOAD, BUF_WGT, h * WGT_HALF * TP, wgt_ddr, n_ci * k * k * TP, 1, 0, d));
    end
    if (res_ddr >= 0) begin
      d = '0;
      d.push_next = 1;
      emit(mk_mem(OP_LOAD, BUF_RES, h * RES_HALF, res_ddr, oh * ow, 1, 0, d));
    end
    // ---- Comp ----
    emit(mk_reg(REG_ALU_CTRL, alu_ctrl));
    emit(mk_reg(REG_BIAS_IDX, bias_idx));
    emit(mk_reg(REG_BIAS_SHIFT, bias_shift));
    emit(mk_reg(REG_OUT_SHIFT, out_shift));
    emit(mk_reg(REG_SCALE, scale));
    for (int i = 0; i < n_ci; i++) begin
      comp_insn_t c;
      c = '0;
      c.op = OP_COMP; c.cmp_op = op;
      c.acc_flag = (i == 0); c.out_flag = (i == n_ci - 1);
      c.size.k = 4'(k); c.size.stride = 4'(s); c.size.iw = 8'(iw);
      c.size.oh = 8'(oh); c.size.ow = 8'(ow);
      c.inp_base = 16'(h * INP_HALF + i * ih * iw);
      c.wgt_base = 16'(h * WGT_HALF + i * k * k);
      c.acc_base = 16'(h * ACC_HALF);
      c.res_base = 16'(h * RES_HALF);
      c.out_base = 16'(h * OUT_HALF);
      c.dept.pop_prev  = (i == 0);
      c.dept.pop_next  = (i == n_ci - 1) && (g >= 2);
      c.dept.push_prev = (i == n_ci - 1);
      c.dept.push_next = (i == n_ci - 1);
      emit(c);
    end
    // ---- Save ----
    d = '0;
    d.pop_prev = 1; d.push_prev = 1;
    emit(mk_mem(OP_SAVE, BUF_OUT, h * OUT_HALF, out_ddr, ow, oh, ow, d));
    // ---- expected results ----
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++) begin
        logic [TP*DATA_W-1:0] r;
        for (int co = 0; co < TP; co++) begin
          longint v, xo;
          v = (op == CMP_MAXP) ? -32768 : 0;
          for (int i = 0; i < n_ci; i++)
            for (int kh = 0; kh < k; kh++)
              for (int kw = 0; kw < k; kw++) begin
                logic [TP*DATA_W-1:0] xin;
                xin = u_ld_ddr.mem[in_ddr + i * ih * iw + (y * s + kh) * iw + x * s + kw];
                if (op == CMP_MAXP) begin
                  if (lane(xin, co) > v) v = lane(xin, co);
                end else if (op == CMP_AVGP) v += lane(xin, co);
                else
                  for (int ci = 0; ci < TP; ci++)
                    v += lane(u_ld_ddr.mem[wgt_ddr + ((i * k + kh) * k + kw) * TP + co], ci) * lane(xin, ci);
              end
          if (alu_ctrl[0]) v += lane(bias_words[bias_idx], co) * (longint'(1) << bias_shift);
          v = (v * scale) >>> out_shift;
          if (v > 32767 || v < -32768) n_sat++;
          xo = sat16(v);
          if (alu_ctrl[1]) xo = sat16(xo + lane(u_ld_ddr.mem[res_ddr + y * ow + x], co));
          if (alu_ctrl[2] && xo < 0) xo = 0;
          r[co*DATA_W +: DATA_W] = DATA_W'(xo);
        end
        expect_out[out_ddr + y * ow + x] = r;
      end
  endtask

  function automatic logic [TP*DATA_W-1:0] rnd_word(input int lo, input int hi);
    logic [TP*DATA_W-1:0] w;
    for (int c = 0; c < TP; c++) w[c*DATA_W +: DATA_W] = DATA_W'(lo + int'($urandom_range(hi - lo)));
    return w;
  endfunction

  initial begin
    int g;
    start = 0; insn_base = 0; insn_count = 0;
    // ---- DDR contents ----
    // L1 input: 2 channel blocks of 8x8, zero border (padding 1)
    for (int b = 0; b < 2; b++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          u_ld_ddr.mem[b * 64 + y * 8 + x] = (y == 0 || y == 7 || x == 0 || x == 7) ? '0 : rnd_word(-100, 100);
    for (int i = 1000; i < 1000 + 2 * 576; i++) u_ld_ddr.mem[i] = rnd_word(-50, 50);   // L1 weights
    for (int i = 3000; i < 3072; i++) u_ld_ddr.mem[i] = rnd_word(-3000, 3000);         // L1 residual
    for (int i = 4000; i < 4162; i++) u_ld_ddr.mem[i] = rnd_word(-32768, 32767);       // L2 input
    for (int i = 5000; i < 5064; i++) u_ld_ddr.mem[i] = rnd_word(-32768, 32767);       // L3 input
    for (int i = 5200; i < 5218; i++) u_ld_ddr.mem[i] = rnd_word(-200, 200);           // L4 input
    for (int i = 6000; i < 6576; i++) u_ld_ddr.mem[i] = rnd_word(-100, 100);           // L4 weights
    for (int e = 0; e < 3; e++) begin
      bias_words[e] = rnd_word(-500, 500);
      u_cfg_ddr.mem[e] = bias_words[e];
    end

    // ---- program ----
    begin
      cfg_insn_t bl;
      bl = '0; bl.op = OP_COMP_CFG; bl.cfg_op = CFG_BIAS; bl.cfg_addr = 0; bl.dram_base = 0; bl.ch_size = 96;
      emit(bl);
    end
    g = 0;
    // L1: two output-channel groups
    for (int o = 0; o < 2; o++) begin
      group(g, CMP_CONV, 3, 1, 8, 8, 6, 6, 2, 0, 1000 + o * 576, 3000 + o * 36,
            7, o, 4, 8, 1, 'h10000 + o * 36);
      g++;
    end
    // L2: max pooling, one group per channel block
    for (int b = 0; b < 2; b++) begin
      group(g, CMP_MAXP, 3, 2, 9, 9, 4, 4, 1, 4000 + b * 81, -1, -1, 0, 0, 0, 0, 1, 'h11000 + b * 16);
      g++;
    end
    // L3: average pooling, divide by 4 with the shift
    group(g, CMP_AVGP, 2, 2, 8, 8, 4, 4, 1, 5000, -1, -1, 0, 0, 0, 2, 1, 'h12000);
    g++;
    // L4: fully connected as a 3x3 kernel on a 3x3 input
    group(g, CMP_CONV, 3, 1, 3, 3, 1, 1, 2, 5200, 6000, -1, 5, 2, 0, 3, 5, 'h13000);
    g++;

    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    insn_base = 0; insn_count = n_insn; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);

    // ---- results ----
    check(ddr_out.size() == expect_out.size(),
          $sformatf("%0d DDR words written, %0d expected", ddr_out.size(), expect_out.size()));
    foreach (expect_out[a]) begin
      if (!ddr_out.exists(a)) check(0, $sformatf("DDR word %h never written", a));
      else
        for (int c = 0; c < TP; c++)
          check(ddr_out[a][c*DATA_W +: DATA_W] == expect_out[a][c*DATA_W +: DATA_W],
                $sformatf("DDR word %h lane %0d = %0d expected %0d", a, c,
                          $signed(ddr_out[a][c*DATA_W +: DATA_W]), $signed(expect_out[a][c*DATA_W +: DATA_W])));
    end
    check(bad_ops == 0, "no undefined opcodes");
    check(!busy, "idle at the end");
    $display("instructions=%0d busy cycles=%0d", n_insn, n_cycles);
    $display("waits: comp-on-load=%0d comp-on-save=%0d load-on-comp=%0d save-on-comp=%0d",
             n_comp_wait_load, n_comp_wait_save, n_load_wait_comp, n_save_wait_comp);
    $display("queue-full=%0d bypass=%0d conv=%0d avg=%0d max=%0d residual=%0d relu=%0d saturated=%0d",
             n_queue_full, n_bypass, n_conv, n_avg, n_max, n_res, n_relu, n_sat);
    $display("overlap load/comp=%0d comp/save=%0d ddr stalls insn=%0d load=%0d bias=%0d write=%0d bias reads=%0d",
             n_ld_cp_overlap, n_cp_sv_overlap, u_insn_ddr.stalls, u_ld_ddr.stalls, u_cfg_ddr.stalls,
             wr_stalls, u_cfg_ddr.reads);
    check(n_comp_wait_load > 0, "Comp waited for Load");
    check(n_comp_wait_save > 0, "Comp waited for Save");
    check(n_load_wait_comp > 0, "Load waited for Comp");
    check(n_save_wait_comp > 0, "Save waited for Comp");
    check(n_queue_full > 0, "an instruction queue filled");
    check(n_bypass > 0, "accumulation bypass");
    check(n_conv > 0 && n_avg > 0 && n_max > 0, "all CMP_OP modes");
    check(n_res > 0 && n_relu > 0, "residual and ReLU");
    check(n_sat > 0, "saturation");
    check(u_cfg_ddr.reads == 3, "bias loaded");
    check(n_ld_cp_overlap > 0 && n_cp_sv_overlap > 0, "modules overlapped");
    check(u_insn_ddr.stalls > 0 && u_ld_ddr.stalls > 0 && wr_stalls > 0, "DDR back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
