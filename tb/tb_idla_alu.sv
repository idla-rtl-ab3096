// tb_idla_alu: random accumulators, biases, residuals and configurations
// (every combination of bias/residual/ReLU enables, shifts, scales that
// saturate) against a reference computed here with 64-bit integers.
module tb_idla_alu;
  import idla_pkg::*;
  alu_cfg_t                  cfg;
  logic [TP-1:0][ACC_W-1:0]  acc;
  logic [TP-1:0][DATA_W-1:0] bias, res, out;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, relu_zero = 0;

  idla_alu dut (.*);

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      cfg = '0;
      cfg.bias_en    = t[0];
      cfg.res_en     = t[1];
      cfg.relu_en    = t[2];
      cfg.bias_shift = 6'($urandom_range(8));
      cfg.out_shift  = 6'($urandom_range(12));
      cfg.scale      = (t % 5 == 0) ? 16'd1 : 16'($urandom_range(300));
      for (int i = 0; i < TP; i++) begin
        acc[i]  = (t % 3 == 0) ? ACC_W'($urandom) : ACC_W'(int'($urandom_range(200000)) - 100000);
        bias[i] = DATA_W'($urandom);
        res[i]  = DATA_W'($urandom);
      end
      #1;
      for (int i = 0; i < TP; i++) begin
        longint x, y;
        x = longint'($signed(acc[i]));
        if (cfg.bias_en) x += longint'($signed(bias[i])) * (longint'(1) << cfg.bias_shift);
        x = x * longint'(cfg.scale);
        x = x >>> cfg.out_shift;
        y = sat16(x);
        if (x > 32767) sat_hi++;
        if (x < -32768) sat_lo++;
        if (cfg.res_en) y = sat16(y + longint'($signed(res[i])));
        if (cfg.relu_en && y < 0) begin y = 0; relu_zero++; end
        checks++;
        if ($signed(out[i]) != y) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d lane %0d got %0d expected %0d", t, i, $signed(out[i]), y);
        end
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || relu_zero == 0) begin
      failures++;
      $display("FAIL: saturation or ReLU never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
