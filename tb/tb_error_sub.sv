// tb_error_sub: y = sat(acc >> 7) and e = sat(d * 2^7 - y) for random and
// saturating inputs.
module tb_error_sub;
  import rls_pkg::*;
  localparam int ACC_W = 28;
  logic signed [ACC_W-1:0] acc = '0;
  sample_t d = '0;
  coef_t y, e;
  int checks = 0, failures = 0;

  error_sub #(.ACC_W(ACC_W)) dut (.*);

  function automatic longint sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    longint ey, ee, a;
    for (int t = 0; t < 2000; t++) begin
      if (t < 1000) a = longint'($signed(23'($urandom)));        // in range
      else          a = longint'($signed(ACC_W'($urandom)));     // mostly saturating
      acc = ACC_W'(a);
      d = sample_t'($urandom);
      #1;
      ey = sat16(a >>> 7);
      ee = sat16(longint'(d) * 128 - ey);
      checks++;
      if (y != coef_t'(ey) || e != coef_t'(ee)) begin
        failures++;
        if (failures < 10) $display("FAIL: acc %0d d %0d -> y %0d e %0d exp %0d %0d", a, d, y, e, ey, ee);
      end
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
