// tb_weight_update: ge = (mu * e) >>> 8 registered on load, then
// w_new = sat(w_old + ((ge * x + 2^14) >>> 15)) for random taps, including
// saturating cases.
module tb_weight_update;
  import rls_pkg::*;
  logic clk = 0, rst = 1, load = 0;
  mu_t mu = '0;
  coef_t e = '0, w_old = '0, w_new;
  sample_t x = '0;
  ge_t ge;
  int checks = 0, failures = 0;

  weight_update dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic longint sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    longint g, ew;
    @(negedge clk); rst = 0;
    for (int s = 0; s < 60; s++) begin
      mu = mu_t'($urandom); e = coef_t'($urandom);
      if (s == 0) begin mu = 16'hffff; e = -32768; end
      load = 1;
      @(negedge clk);
      load = 0;
      g = (longint'(mu) * longint'(e)) >>> 8;
      check(longint'(ge) == g, $sformatf("ge %0d exp %0d", ge, g));
      mu = mu_t'($urandom); e = coef_t'($urandom);   // must not matter now
      for (int i = 0; i < 8; i++) begin
        x = sample_t'($urandom); w_old = coef_t'($urandom);
        #1;
        ew = sat16(longint'(w_old) + ((g * longint'(x) + 16384) >>> 15));
        check(longint'(w_new) == ew, $sformatf("w_new %0d exp %0d", w_new, ew));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
