// tb_idla_mac_array: random weight tiles and input vectors, including the
// extreme values -32768 and 32767; every output lane is compared with a
// dot product computed here in 64-bit integers and truncated to 32 bits.
module tb_idla_mac_array;
  import idla_pkg::*;
  logic [TP-1:0][TP-1:0][DATA_W-1:0] wgt;
  logic [TP-1:0][DATA_W-1:0]         inp;
  logic [TP-1:0][ACC_W-1:0]          psum;
  int checks = 0, failures = 0;

  idla_mac_array dut (.*);

  function automatic logic [DATA_W-1:0] rnd(input int mode);
    case (mode)
      0: return DATA_W'($urandom);
      1: return DATA_W'($urandom_range(255)) - 16'd128;
      2: return ($urandom_range(1) != 0) ? 16'h8000 : 16'h7fff;
      default: return 16'h8000;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 60; t++) begin
      for (int co = 0; co < TP; co++)
        for (int ci = 0; ci < TP; ci++) wgt[co][ci] = rnd(t % 4);
      for (int ci = 0; ci < TP; ci++) inp[ci] = rnd((t / 4) % 4);
      #1;
      for (int co = 0; co < TP; co++) begin
        longint s;
        s = 0;
        for (int ci = 0; ci < TP; ci++)
          s += longint'($signed(wgt[co][ci])) * longint'($signed(inp[ci]));
        checks++;
        if (psum[co] !== ACC_W'(s)) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d co=%0d got %0d expected %0d", t, co, $signed(psum[co]), s);
        end
      end
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
