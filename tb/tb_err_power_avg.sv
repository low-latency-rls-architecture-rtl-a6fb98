// tb_err_power_avg: the running error power against a model
//   P <= P + ((e^2 >> 14) - P) >>> 4,
// for a large constant error (P must rise towards e^2), random errors, and
// zero error (P must decay), plus the held value when en is low.
module tb_err_power_avg;
  import rls_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  coef_t e = '0;
  pow_t pow;
  logic [15:0] mse;
  int checks = 0, failures = 0;

  err_power_avg #(.AVG_SHIFT(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint p, ev;
    p = 0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 300; t++) begin
      if (t < 100)      ev = -16384;                          // e = -1.0
      else if (t < 200) ev = longint'($signed(16'($urandom)));
      else              ev = 0;
      e = coef_t'(ev);
      en = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      if (en) p = p + ((((ev * ev) >> 14) - p) >>> 4);
      check(longint'(pow) == p, $sformatf("t %0d pow %0d exp %0d", t, pow, p));
      check(mse == 16'(p >> 2), "mse");
      if (t == 99) check(pow > 15000 && pow <= 16384, "power did not approach e^2");
      if (t == 299) check(pow < 200, "power did not decay");
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
