// tb_idla_cfg: writes every control register and checks the Alu
// configuration, including the reset value of SCALE; loads bias data of
// 70 channels (three DDR words, the last one partly used) from a stalling
// DDR model into entries 5..7 and reads each entry back through BIAS_IDX.
module tb_idla_cfg;
  import idla_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  cfg_insn_t insn;
  alu_cfg_t regs;
  logic [TP-1:0][DATA_W-1:0] bias;
  int checks = 0, failures = 0;

  ddr_rd_if #(.AW(ADDR_W), .DW(TP*DATA_W)) rd (.clk, .rst_n);
  ddr_rd_model #(.DW(TP*DATA_W), .DEPTH(256)) u_ddr (.clk, .rst_n, .port(rd));
  idla_cfg dut (.clk, .rst_n, .start, .insn, .busy, .done, .rd, .regs, .bias);

  always #5 clk = ~clk;

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
      $display("FAIL %s", what);
    end
  endtask

  task automatic issue(input cfg_op_e op, input int addr, input int data, input int base, input int ch);
    cfg_insn_t c;
    c = '0;
    c.op = OP_COMP_CFG; c.cfg_op = op; c.cfg_addr = 8'(addr); c.cfg_data = 32'(data);
    c.dram_base = 32'(base); c.ch_size = 16'(ch);
    @(negedge clk);
    insn = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    start = 0; insn = '0;
    for (int i = 0; i < 256; i++)
      for (int c = 0; c < TP; c++) u_ddr.mem[i][c*DATA_W +: DATA_W] = DATA_W'(i * 100 + c);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(regs.scale == 1 && regs.bias_en == 0 && regs.out_shift == 0, "reset values");
    issue(CFG_REG, REG_ALU_CTRL, 5, 0, 0);
    check({regs.relu_en, regs.res_en, regs.bias_en} == 3'b101, "ALU_CTRL");
    issue(CFG_REG, REG_BIAS_SHIFT, 7, 0, 0);
    check(regs.bias_shift == 7, "BIAS_SHIFT");
    issue(CFG_REG, REG_OUT_SHIFT, 9, 0, 0);
    check(regs.out_shift == 9, "OUT_SHIFT");
    issue(CFG_REG, REG_SCALE, 1234, 0, 0);
    check(regs.scale == 1234, "SCALE");
    check({regs.relu_en, regs.res_en, regs.bias_en} == 3'b101 && regs.bias_shift == 7, "other registers kept");
    issue(CFG_BIAS, 5, 0, 40, 70);
    check(u_ddr.reads == 3, $sformatf("bias words read %0d", u_ddr.reads));
    for (int e = 0; e < 3; e++) begin
      issue(CFG_REG, REG_BIAS_IDX, 5 + e, 0, 0);
      @(negedge clk);
      for (int c = 0; c < TP; c++)
        check(bias[c] == DATA_W'((40 + e) * 100 + c), $sformatf("bias entry %0d lane %0d = %0d", 5 + e, c, bias[c]));
    end
    check(u_ddr.stalls > 0, "DDR back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
