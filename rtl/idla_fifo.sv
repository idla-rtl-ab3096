// idla_fifo: synchronous valid/ready FIFO.
//
// Used twice over in the engine: with WIDTH = 1 as the handshake FIFOs that
// carry dependency tokens between Load, Comp and Save (a token says "the
// buffer you wait for is ready" or "the buffer you wrote is free again"), and
// with WIDTH = 128 as the instruction queues filled by Ctrl. A push is taken
// when push_valid && push_ready, a pop when pop_valid && pop_ready. pop_data
// shows the oldest entry combinationally. When full, a push and a pop in the
// same cycle are both taken. Depth and protocol are this design's choice.
module idla_fifo #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_valid,
  output logic             push_ready,
  input  logic [WIDTH-1:0] push_data,
  output logic             pop_valid,
  input  logic             pop_ready,
  output logic [WIDTH-1:0] pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign pop_valid  = (count != 0);
  assign push_ready = (32'(count) < DEPTH) || pop_ready;
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;
  assign pop_data   = mem[rptr];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= inc(wptr);
      if (do_pop)  rptr <= inc(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= push_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
endmodule
