// idla_mac_array: the TP x TP multiply-add array of the Dense unit.
//
// The two innermost loops of a convolution, over output channel co and input
// channel ci, are fully unrolled: psum[co] = sum over ci of wgt[co][ci] *
// inp[ci], a matrix-vector product of a TP x TP weight tile and a TP-channel
// input vector. Each row is TP signed 16x16 multipliers feeding one sum
// (written as a loop; synthesis builds the adder tree).
// The array is purely combinational, so one product vector is produced per
// cycle in the cycle its operands arrive; the Dense unit adds it to the
// accumulation. Products and sums are ACC_W bits wide (this design's choice).
module idla_mac_array
  import idla_pkg::*;
(
  input  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt,   // [co][ci]
  input  logic [TP-1:0][DATA_W-1:0]         inp,   // [ci]
  output logic [TP-1:0][ACC_W-1:0]          psum   // [co]
);
  always_comb begin
    for (int co = 0; co < TP; co++) begin
      logic signed [ACC_W-1:0] sum;
      sum = '0;
      for (int ci = 0; ci < TP; ci++)
        sum += ACC_W'($signed(wgt[co][ci]) * $signed(inp[ci]));
      psum[co] = sum;
    end
  end
endmodule
