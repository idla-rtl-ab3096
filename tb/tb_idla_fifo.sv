// tb_idla_fifo: random pushes and pops against a queue model; checks data
// order, the ready/valid flags at full and empty, count, and that a push and
// a pop in the same cycle are both taken when the FIFO is full.
module tb_idla_fifo;
  localparam int W = 8, D = 4;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, pop_valid, pop_ready;
  logic [W-1:0] push_data, pop_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int full_seen = 0, both_at_full = 0;
  logic [W-1:0] model [$];

  idla_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; pop_ready = 0; push_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // drive on the falling edge, sample before the rising edge
      @(negedge clk);
      push_valid = ($urandom_range(3) != 0);
      push_data  = W'($urandom);
      pop_ready  = (cyc % 500 < 250) ? ($urandom_range(3) == 0) : ($urandom_range(3) != 0);
      #1;
      check(count == model.size(), "count");
      check(pop_valid == (model.size() != 0), "pop_valid");
      check(push_ready == (model.size() < D || pop_ready), "push_ready");
      if (model.size() != 0) check(pop_data == model[0], "data order");
      if (model.size() == D) full_seen++;
      if (model.size() == D && push_valid && pop_ready) both_at_full++;
      @(posedge clk);
      if (pop_valid && pop_ready) void'(model.pop_front());
      if (push_valid && push_ready) model.push_back(push_data);
    end
    check(full_seen > 0, "FIFO never filled");
    check(both_at_full > 0, "no push+pop while full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
