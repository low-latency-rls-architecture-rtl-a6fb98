// tb_running_summer: sums of 8 random products, started with first, against
// a model; includes all-extreme products to check the guard bits.
module tb_running_summer;
  import rls_pkg::*;
  localparam int N = 8;
  localparam int ACC_W = PROD_W + $clog2(N) + 1;
  logic clk = 0, rst = 1, en = 0, first = 0;
  prod_t din = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  running_summer #(.N_TAPS(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint s;
    @(negedge clk); rst = 0;
    for (int r = 0; r < 40; r++) begin
      s = 0;
      for (int i = 0; i < N; i++) begin
        en = 1; first = (i == 0);
        din = (r == 0) ? prod_t'(-(1 << 22)) : (r == 1) ? prod_t'((1 << 22) - 1) : prod_t'($urandom);
        s = (i == 0) ? longint'(din) : s + longint'(din);
        @(negedge clk);
        en = 0;
        if ($urandom_range(0, 1) == 1) @(negedge clk);   // idle cycle: hold
        check(longint'(acc) == s, $sformatf("acc %0d exp %0d", acc, s));
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
