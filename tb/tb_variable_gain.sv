// tb_variable_gain: the gain against the real-valued law
//   mu = MU_MIN + (MU_MAX - MU_MIN) * P / (P + P0)
// (tolerance for the table and truncation), its reset value, that it moves
// only on en, and that it does not fall (beyond table rounding) with rising
// power.
module tb_variable_gain;
  import rls_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  pow_t pow = '0;
  mu_t mu;
  int checks = 0, failures = 0;

  variable_gain dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    real ideal;
    mu_t prev, held;
    @(negedge clk);
    check(mu == 16'd16384, "reset value");
    rst = 0;
    prev = '0;
    for (int t = 0; t < 600; t++) begin
      if (t < 300) pow = pow_t'(t * 437);                 // rising sweep
      else         pow = pow_t'($urandom_range(0, 65536) >> $urandom_range(0, 16));
      en = 1;
      @(negedge clk);
      en = 0;
      ideal = 1024.0 + 15360.0 * real'(pow) / (real'(pow) + 1024.0);
      check(real'(mu) > ideal - 70.0 && real'(mu) < ideal + 70.0,
            $sformatf("P %0d mu %0d ideal %f", pow, mu, ideal));
      if (t < 300) begin
        // the table's rounding allows small local dips, no real fall
        check(mu + 16'd64 >= prev, $sformatf("mu fell from %0d to %0d", prev, mu));
        prev = mu;
      end
      held = mu;
      pow = pow_t'($urandom);
      @(negedge clk);
      check(mu == held, "mu changed without en");
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
