// tb_rinv_rom: the reciprocal table. For random and edge inputs, checks the
// exponent (position of the leading one), the table entry against
// round(2^24 / (256 + f)), and that mant * 2^-(16+exp) is within 2^-8
// relative error of 1/v.
module tb_rinv_rom;
  localparam int VW = 19, M = 8;
  logic [VW-1:0] v = '0;
  logic [16:0] mant;
  logic [4:0] exp;
  int checks = 0, failures = 0;

  rinv_rom #(.VW(VW), .M(M)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    longint vv, k, f, r;
    real rel;
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: vv = 1;  1: vv = 2;  2: vv = 3;  3: vv = (1 << VW) - 1;  4: vv = 255; 5: vv = 256;
        default: vv = longint'($urandom_range(1, (1 << VW) - 1)) >> $urandom_range(0, VW - 1);
      endcase
      if (vv == 0) vv = 1;
      v = VW'(vv);
      #1;
      k = 0;
      while ((longint'(1) << (k + 1)) <= vv) k++;
      f = ((vv - (longint'(1) << k)) * 256) >> k;
      r = ((longint'(1) << 24) + (256 + f) / 2) / (256 + f);
      check(longint'(exp) == k, $sformatf("v %0d exp %0d exp. %0d", vv, exp, k));
      check(longint'(mant) == r, $sformatf("v %0d mant %0d exp. %0d", vv, mant, r));
      rel = (real'(mant) / (2.0 ** (16 + exp))) * real'(vv) - 1.0;
      check(rel < 0.0040 && rel > -0.0040, $sformatf("v %0d relative error %f", vv, rel));
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
