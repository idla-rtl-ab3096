// tb_idla_dense: runs Comp instructions on the Dense unit with behavioural
// inp/wgt/accumulation buffers (one-cycle reads, old data on a same-cycle
// write) and compares the whole accumulation buffer with a reference loop
// nest computed here. Cases: 3x3 convolution stride 1 with ACC_FLAG, a second
// input-channel block (stride 2) added without ACC_FLAG, a 3x3 kernel on a
// single output pixel (every cycle hits the bypass), average and max
// pooling. Each run must take K*K*OH*OW + 2 cycles from start to done.
module tb_idla_dense;
  import idla_pkg::*;
  localparam int ID = 512, WT = 64, AD = 128;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, bypass_hit;
  comp_insn_t insn;
  logic inp_re, wgt_re, acc_re, acc_we;
  logic [15:0] inp_raddr, wgt_raddr, acc_raddr, acc_waddr;
  logic [TP-1:0][DATA_W-1:0] inp_rdata;
  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt_rdata;
  logic [TP-1:0][ACC_W-1:0] acc_rdata, acc_wdata;

  logic [TP-1:0][DATA_W-1:0]         inp_m [ID];
  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt_m [WT];
  logic [TP-1:0][ACC_W-1:0]          acc_m [AD];
  logic [TP-1:0][ACC_W-1:0]          ref_m [AD];

  int checks = 0, failures = 0, bypasses = 0;
  longint cyc = 0;

  idla_dense dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (inp_re) inp_rdata <= inp_m[inp_raddr % ID];
    if (wgt_re) wgt_rdata <= wgt_m[wgt_raddr % WT];
    if (acc_re) acc_rdata <= acc_m[acc_raddr % AD];
    if (acc_we) acc_m[acc_waddr % AD] <= acc_wdata;
    if (bypass_hit) bypasses++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // reference: what one instruction does to ref_m
  task automatic reference(input comp_insn_t c);
    for (int oh = 0; oh < c.size.oh; oh++)
      for (int ow = 0; ow < c.size.ow; ow++)
        for (int co = 0; co < TP; co++) begin
          longint v;
          int a;
          a = c.acc_base + oh * c.size.ow + ow;
          if (c.acc_flag) v = (c.cmp_op == CMP_MAXP) ? -32768 : 0;
          else            v = longint'($signed(ref_m[a][co]));
          for (int kh = 0; kh < c.size.k; kh++)
            for (int kw = 0; kw < c.size.k; kw++) begin
              int ia, wa;
              ia = c.inp_base + (oh * c.size.stride + kh) * c.size.iw + ow * c.size.stride + kw;
              wa = c.wgt_base + kh * c.size.k + kw;
              case (c.cmp_op)
                CMP_AVGP: v += longint'($signed(inp_m[ia][co]));
                CMP_MAXP: if (longint'($signed(inp_m[ia][co])) > v) v = longint'($signed(inp_m[ia][co]));
                default:
                  for (int ci = 0; ci < TP; ci++)
                    v += longint'($signed(wgt_m[wa][co][ci])) * longint'($signed(inp_m[ia][ci]));
              endcase
              v = longint'(int'(v));   // 32-bit wrap like the accumulator
            end
          ref_m[a][co] = ACC_W'(v);
        end
  endtask

  task automatic run(input cmp_op_e op, input bit accf, input int k, input int s,
                     input int iw, input int oh, input int ow, input int ib, input int wb,
                     input int ab, input string name);
    comp_insn_t c;
    longint t0;
    int n;
    c = '0;
    c.op = OP_COMP; c.cmp_op = op; c.acc_flag = accf;
    c.size.k = 4'(k); c.size.stride = 4'(s); c.size.iw = 8'(iw);
    c.size.oh = 8'(oh); c.size.ow = 8'(ow);
    c.inp_base = 16'(ib); c.wgt_base = 16'(wb); c.acc_base = 16'(ab);
    reference(c);
    @(negedge clk);
    insn = c; start = 1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    insn = '0;
    while (!done) @(negedge clk);
    n = k * k * oh * ow;
    check(cyc - t0 == n + 2, $sformatf("%s: latency %0d expected %0d", name, cyc - t0, n + 2));
    @(negedge clk);
    for (int a = 0; a < AD; a++)
      for (int co = 0; co < TP; co++)
        check(acc_m[a][co] == ref_m[a][co],
              $sformatf("%s: acc[%0d][%0d] = %0d expected %0d", name, a, co,
                        $signed(acc_m[a][co]), $signed(ref_m[a][co])));
  endtask

  initial begin
    start = 0; insn = '0;
    for (int i = 0; i < ID; i++)
      for (int c = 0; c < TP; c++) inp_m[i][c] = DATA_W'($urandom_range(400)) - 16'd200;
    for (int i = 0; i < WT; i++)
      for (int r = 0; r < TP; r++)
        for (int c = 0; c < TP; c++) wgt_m[i][r][c] = DATA_W'($urandom_range(200)) - 16'd100;
    for (int i = 0; i < AD; i++)
      for (int c = 0; c < TP; c++) begin
        acc_m[i][c] = ACC_W'($urandom);
        ref_m[i][c] = acc_m[i][c];
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    //       op        accf k  s  iw oh ow inp  wgt acc
    run(CMP_CONV, 1, 3, 1, 6, 4, 4, 0,   0,  0,  "conv3x3 s1");
    run(CMP_CONV, 0, 3, 2, 9, 4, 4, 100, 9,  0,  "conv3x3 s2 accumulate");
    run(CMP_CONV, 1, 1, 1, 5, 5, 5, 200, 20, 20, "conv1x1");
    run(CMP_CONV, 1, 3, 1, 3, 1, 1, 300, 30, 60, "single pixel");
    check(bypasses >= 8, $sformatf("bypass used %0d times", bypasses));
    for (int i = 0; i < ID; i++)
      for (int c = 0; c < TP; c++) inp_m[i][c] = DATA_W'($urandom);
    run(CMP_AVGP, 1, 2, 2, 8, 4, 4, 0,   0,  70, "avg pool");
    run(CMP_MAXP, 1, 3, 2, 9, 4, 4, 100, 0,  90, "max pool");
    run(CMP_MAXP, 0, 2, 1, 5, 4, 4, 200, 0,  90, "max pool accumulate");
    $display("bypasses=%0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
