// idla_alu: fused post-processing of one accumulator vector (the Alu of Comp).
//
// Applies, lane by lane, the steps that follow a convolution so that a layer
// with its batch normalisation (folded into weights and bias), residual
// addition and ReLU leaves the chip once: 
//   x = acc + (bias << bias_shift)           if bias_en
//   y = sat16((x * scale) >>> out_shift)     always (dynamic fixed point; also
//                                            the divide of average pooling)
//   y = sat16(y + res)                       if res_en
//   y = max(y, 0)                            if relu_en
// Bias add, residual add and ReLU, each optional, follow the published
// design; their order, the rescale step and the saturation are this design's
// choice. Purely combinational.
module idla_alu
  import idla_pkg::*;
(
  input  alu_cfg_t                  cfg,
  input  logic [TP-1:0][ACC_W-1:0]  acc,
  input  logic [TP-1:0][DATA_W-1:0] bias,
  input  logic [TP-1:0][DATA_W-1:0] res,
  output logic [TP-1:0][DATA_W-1:0] out
);
  localparam int unsigned XW = ACC_W + 18;   // room for the scale product

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [XW-1:0] v);
    if (v > XW'(DATA_MAX))       return DATA_MAX;
    else if (v < XW'(signed'(DATA_MIN))) return DATA_MIN;
    else                          return v[DATA_W-1:0];
  endfunction

  always_comb begin
    for (int i = 0; i < TP; i++) begin
      logic signed [XW-1:0]     x;
      logic signed [DATA_W-1:0] y;
      x = XW'($signed(acc[i]));
      if (cfg.bias_en) x = x + (XW'($signed(bias[i])) <<< cfg.bias_shift);
      x = (x * $signed({2'b00, cfg.scale})) >>> cfg.out_shift;
      y = sat(x);
      if (cfg.res_en) y = sat(XW'(y) + XW'($signed(res[i])));
      if (cfg.relu_en && y[DATA_W-1]) y = '0;
      out[i] = y;
    end
  end
endmodule
