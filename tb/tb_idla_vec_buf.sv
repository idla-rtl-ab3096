// tb_idla_vec_buf: random writes and reads against an array model; checks the
// one-cycle read latency, that read data holds while re is low and that a
// read of an address written in the same cycle returns the old contents.
module tb_idla_vec_buf;
  localparam int W = 64, D = 32;
  logic clk = 0;
  logic we, re;
  logic [$clog2(D)-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0, rdw = 0;

  idla_vec_buf #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word first so nothing read is uninitialised
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = i; wdata = {$urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      we = $urandom_range(1); waddr = $urandom_range(D-1); wdata = {$urandom, $urandom};
      re = $urandom_range(1); raddr = (cyc % 7 == 0) ? waddr : $urandom_range(D-1);
      if (re) expect_q = model[raddr];
      if (re && we && raddr == waddr) rdw++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL cycle %0d: rdata %h expected %h", cyc, rdata, expect_q);
      end
    end
    checks++;
    if (rdw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
