// tb_idla_wgt_buf: writes weight tiles one row per cycle, in a scrambled row
// order, then reads whole tiles back and checks every row; reads are one
// cycle after re.
module tb_idla_wgt_buf;
  import idla_pkg::*;
  localparam int T = 4;
  logic clk = 0;
  logic we, re;
  logic [$clog2(T)+$clog2(TP)-1:0] waddr;
  logic [$clog2(T)-1:0] raddr;
  logic [TP-1:0][DATA_W-1:0] wdata;
  logic [TP-1:0][TP-1:0][DATA_W-1:0] rdata;
  logic [TP-1:0][DATA_W-1:0] model [T][TP];
  int checks = 0, failures = 0;

  idla_wgt_buf #(.TILES(T)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < T * TP; n++) begin
        int idx;
        idx = (n * 37 + pass * 11) % (T * TP);   // 37 is odd: a permutation
        @(negedge clk);
        we = 1; waddr = idx;
        for (int e = 0; e < TP; e++) wdata[e] = DATA_W'($urandom);
        model[idx / TP][idx % TP] = wdata;
      end
      @(negedge clk); we = 0;
      for (int t = T - 1; t >= 0; t--) begin
        @(negedge clk);
        re = 1; raddr = t;
        @(posedge clk);
        @(negedge clk);
        re = 0;
        for (int r = 0; r < TP; r++) begin
          checks++;
          if (rdata[r] !== model[t][r]) begin
            failures++;
            $display("FAIL tile %0d row %0d", t, r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
