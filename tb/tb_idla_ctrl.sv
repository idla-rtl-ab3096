// tb_idla_ctrl: a program of 200 random instructions (with a few undefined
// opcodes) in a stalling DDR model; the three queues accept at random. Checks
// that every instruction reaches the right queue, in program order and
// unchanged, that undefined opcodes are dropped and counted, that fetch
// starts at insn_base and that busy falls when the program is done.
module tb_idla_ctrl;
  import idla_pkg::*;
  localparam int N = 200, BASE = 37;
  logic clk = 0, rst_n = 0;
  logic start, busy;
  logic [ADDR_W-1:0] insn_base;
  logic [31:0] insn_count;
  logic [15:0] bad_ops;
  logic ld_valid, ld_ready, cp_valid, cp_ready, sv_valid, sv_ready;
  logic [INSN_W-1:0] insn;
  logic [INSN_W-1:0] prog [N];
  int checks = 0, failures = 0, next_ld = 0, next_cp = 0, next_sv = 0, n_bad = 0, q_stalls = 0;
  int ld_idx [$], cp_idx [$], sv_idx [$];

  ddr_rd_if #(.AW(ADDR_W), .DW(INSN_W)) rd (.clk, .rst_n);
  ddr_rd_model #(.DW(INSN_W), .DEPTH(512)) u_ddr (.clk, .rst_n, .port(rd));
  idla_ctrl dut (.*);

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
    if (rst_n) begin
      check(int'(ld_valid) + int'(cp_valid) + int'(sv_valid) <= 1, "one queue at a time");
      if ((ld_valid && !ld_ready) || (cp_valid && !cp_ready) || (sv_valid && !sv_ready)) q_stalls++;
      if (ld_valid && ld_ready) begin
        check(ld_idx.size() != 0 && insn == prog[ld_idx[0]], "Load queue order");
        void'(ld_idx.pop_front());
      end
      if (cp_valid && cp_ready) begin
        check(cp_idx.size() != 0 && insn == prog[cp_idx[0]], "Comp queue order");
        void'(cp_idx.pop_front());
      end
      if (sv_valid && sv_ready) begin
        check(sv_idx.size() != 0 && insn == prog[sv_idx[0]], "Save queue order");
        void'(sv_idx.pop_front());
      end
    end
    ld_ready <= $urandom_range(2) != 0;
    cp_ready <= $urandom_range(2) != 0;
    sv_ready <= $urandom_range(2) != 0;
  end

  initial begin
    start = 0; insn_base = BASE; insn_count = N;
    for (int i = 0; i < N; i++) begin
      logic [2:0] op;
      op = (i % 23 == 5) ? 3'd6 : 3'($urandom_range(3));
      prog[i] = {$urandom, $urandom, $urandom, $urandom};
      prog[i][2:0] = op;
      u_ddr.mem[BASE + i] = prog[i];
      case (op)
        3'd0: ld_idx.push_back(i);
        3'd1, 3'd3: cp_idx.push_back(i);
        3'd2: sv_idx.push_back(i);
        default: n_bad++;
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
    check(ld_idx.size() == 0 && cp_idx.size() == 0 && sv_idx.size() == 0, "every instruction dispatched");
    check(bad_ops == 16'(n_bad), $sformatf("bad_ops %0d expected %0d", bad_ops, n_bad));
    check(u_ddr.reads == N, "one fetch per instruction");
    check(q_stalls > 0 && u_ddr.stalls > 0, "queue and DDR back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
