// tb_idla_load: sends Load instructions for inp_buf, wgt_buf and res_buf with
// 2-D strided DDR blocks through a stalling DDR model and checks every
// buffer write (address and data) against the expected sequence. Also checks
// the tokens: an instruction with pop_next waits until Comp's token is
// offered, one with push_next offers a token to Comp when done.
module tb_idla_load;
  import idla_pkg::*;
  logic clk = 0, rst_n = 0;
  logic insn_valid, insn_ready, busy;
  logic [INSN_W-1:0] insn;
  logic c2l_valid, c2l_ready, l2c_valid, l2c_ready;
  logic inp_we, wgt_we, res_we;
  logic [15:0] inp_waddr, wgt_waddr, res_waddr;
  logic [TP-1:0][DATA_W-1:0] wdata;
  int checks = 0, failures = 0, tokens_out = 0, tokens_in = 0, dep_waits = 0;

  typedef struct { int buf_sel; int addr; int dword; } wr_t;
  wr_t expq [$];

  ddr_rd_if #(.AW(ADDR_W), .DW(TP*DATA_W)) rd (.clk, .rst_n);
  ddr_rd_model #(.DW(TP*DATA_W), .DEPTH(1024)) u_ddr (.clk, .rst_n, .port(rd));
  idla_load dut (.*);

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // every DDR word i holds lane c = i*7 + c
  always @(posedge clk) if (rst_n) begin
    int n;
    n = int'(inp_we) + int'(wgt_we) + int'(res_we);
    check(n <= 1, "one buffer written at a time");
    if (n == 1) begin
      wr_t e;
      int sel, a;
      sel = inp_we ? 0 : wgt_we ? 1 : 2;
      a   = inp_we ? inp_waddr : wgt_we ? wgt_waddr : res_waddr;
      if (expq.size() == 0) check(0, "unexpected write");
      else begin
        e = expq.pop_front();
        check(sel == e.buf_sel && a == e.addr, $sformatf("write to buf %0d addr %0d, expected %0d/%0d", sel, a, e.buf_sel, e.addr));
        for (int c = 0; c < TP; c++)
          check(wdata[c] == DATA_W'(e.dword * 7 + c), "write data");
      end
    end
    if (l2c_valid && l2c_ready) tokens_out++;
    if (c2l_valid && c2l_ready) tokens_in++;
  end

  task automatic load(input buf_id_e b, input int sram, input int dram, input int xs, input int ys,
                      input int stride, input bit popn, input bit pushn);
    mem_insn_t m;
    m = '0;
    m.op = OP_LOAD; m.buf_id = b; m.sram_base = 16'(sram); m.dram_base = 32'(dram);
    m.x_size = 16'(xs); m.y_size = 16'(ys); m.dram_stride = 16'(stride);
    m.dept.pop_next = popn; m.dept.push_next = pushn;
    for (int y = 0; y < ys; y++)
      for (int x = 0; x < xs; x++)
        expq.push_back('{int'(b == BUF_INP ? 0 : b == BUF_WGT ? 1 : 2), sram + y * xs + x, dram + y * stride + x});
    @(negedge clk);
    insn = m; insn_valid = 1;
    @(posedge clk);
    while (!insn_ready) @(posedge clk);
    @(negedge clk);
    insn_valid = 0;
  endtask

  initial begin
    insn_valid = 0; insn = '0; c2l_valid = 0; l2c_ready = 1;
    for (int i = 0; i < 1024; i++)
      for (int c = 0; c < TP; c++) u_ddr.mem[i][c*DATA_W +: DATA_W] = DATA_W'(i * 7 + c);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(BUF_INP, 10, 100, 5, 4, 12, 0, 1);
    load(BUF_WGT, 64, 300, 32, 2, 40, 0, 0);
    load(BUF_RES, 0, 500, 3, 3, 3, 0, 1);
    // this one needs a token from Comp: hold it back for a while
    load(BUF_INP, 0, 700, 4, 2, 8, 1, 1);
    repeat (50) begin
      @(negedge clk);
      if (busy && expq.size() == 8) dep_waits++;
    end
    check(expq.size() == 8, "load waited for its token");
    c2l_valid = 1;
    @(posedge clk);
    while (!c2l_ready) @(posedge clk);
    @(negedge clk);
    c2l_valid = 0;
    while (busy) @(negedge clk);
    check(expq.size() == 0, "all writes seen");
    check(tokens_out == 3, $sformatf("tokens to Comp %0d", tokens_out));
    check(tokens_in == 1, "token from Comp taken once");
    check(dep_waits == 50, "dependency wait");
    check(u_ddr.stalls > 0, "DDR back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
