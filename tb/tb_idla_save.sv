// tb_idla_save: Save instructions read a behavioural out_buf and write DDR
// through a write port whose ready is random; checks every DDR write
// (address and data, in order), the rate of one word per cycle when DDR is
// always ready, and the tokens: an instruction with pop_prev waits for
// Comp's token, push_prev returns one.
module tb_idla_save;
  import idla_pkg::*;
  localparam int OD = 256;
  logic clk = 0, rst_n = 0;
  logic insn_valid, insn_ready, busy;
  logic [INSN_W-1:0] insn;
  logic c2s_valid, c2s_ready, s2c_valid, s2c_ready;
  logic out_re;
  logic [15:0] out_raddr;
  logic [TP-1:0][DATA_W-1:0] out_rdata, wr_data;
  logic wr_valid, wr_ready;
  logic [ADDR_W-1:0] wr_addr;
  logic [TP-1:0][DATA_W-1:0] out_m [OD];
  bit   always_ready;
  int checks = 0, failures = 0, tokens_out = 0, tokens_in = 0, ddr_stalls = 0, writes = 0;

  typedef struct { int addr; int sword; } wr_t;
  wr_t expq [$];

  idla_save dut (.*);

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

  always @(posedge clk) begin
    if (out_re) out_rdata <= out_m[out_raddr % OD];
    if (rst_n) begin
      if (wr_valid && !wr_ready) ddr_stalls++;
      if (wr_valid && wr_ready) begin
        wr_t e;
        writes++;
        if (expq.size() == 0) check(0, "unexpected write");
        else begin
          e = expq.pop_front();
          check(int'(wr_addr) == e.addr, $sformatf("DDR address %0d expected %0d", wr_addr, e.addr));
          check(wr_data == out_m[e.sword], $sformatf("data of word %0d", e.sword));
        end
      end
      if (s2c_valid && s2c_ready) tokens_out++;
      if (c2s_valid && c2s_ready) tokens_in++;
    end
    wr_ready <= always_ready || ($urandom_range(2) != 0);
  end

  task automatic save(input int sram, input int dram, input int xs, input int ys, input int stride,
                      input bit popp, input bit pushp);
    mem_insn_t m;
    m = '0;
    m.op = OP_SAVE; m.buf_id = BUF_OUT; m.sram_base = 16'(sram); m.dram_base = 32'(dram);
    m.x_size = 16'(xs); m.y_size = 16'(ys); m.dram_stride = 16'(stride);
    m.dept.pop_prev = popp; m.dept.push_prev = pushp;
    for (int y = 0; y < ys; y++)
      for (int x = 0; x < xs; x++)
        expq.push_back('{dram + y * stride + x, sram + y * xs + x});
    @(negedge clk);
    insn = m; insn_valid = 1;
    @(posedge clk);
    while (!insn_ready) @(posedge clk);
    @(negedge clk);
    insn_valid = 0;
  endtask

  initial begin
    longint t0;
    insn_valid = 0; insn = '0; c2s_valid = 0; s2c_ready = 1; always_ready = 0;
    for (int i = 0; i < OD; i++)
      for (int c = 0; c < TP; c++) out_m[i][c] = DATA_W'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    save(0, 1000, 6, 5, 10, 0, 1);
    save(40, 2000, 1, 7, 3, 0, 0);
    while (busy) @(negedge clk);
    // rate: 64 words with DDR always ready
    always_ready = 1;
    repeat (2) @(negedge clk);
    save(100, 3000, 64, 1, 64, 0, 0);
    t0 = $time;
    while (busy) @(negedge clk);
    check(($time - t0) / 10 <= 64 + 4, $sformatf("64 words took %0d cycles", ($time - t0) / 10));
    always_ready = 0;
    // needs Comp's token
    save(200, 4000, 4, 2, 4, 1, 1);
    repeat (40) @(negedge clk);
    check(expq.size() == 8, "save waited for its token");
    c2s_valid = 1;
    @(posedge clk);
    while (!c2s_ready) @(posedge clk);
    @(negedge clk);
    c2s_valid = 0;
    while (busy) @(negedge clk);
    check(expq.size() == 0, "all writes seen");
    check(tokens_out == 2, $sformatf("tokens to Comp %0d", tokens_out));
    check(tokens_in == 1, "token from Comp taken once");
    check(ddr_stalls > 0, "DDR back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
