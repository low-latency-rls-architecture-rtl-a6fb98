// tb_data_memory: shifts random samples into the delay line and reads every
// position against a model, x(n-i) at address i; checks that it holds without
// a shift and that reset clears it.
module tb_data_memory;
  import rls_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst = 1, shift = 0;
  sample_t din = '0, rdata;
  logic [2:0] raddr = '0;
  sample_t m [N];
  int checks = 0, failures = 0;

  data_memory #(.N_TAPS(N)) dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      raddr = 3'(i); #1;
      check(rdata == m[i], $sformatf("x[%0d]=%0d exp %0d", i, rdata, m[i]));
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) m[i] = '0;
    @(negedge clk); rst = 0;
    check_all();
    for (int t = 0; t < 30; t++) begin
      shift = ($urandom_range(0, 3) != 0); din = sample_t'($urandom);
      @(negedge clk);
      if (shift) begin
        for (int i = N - 1; i > 0; i--) m[i] = m[i-1];
        m[0] = din;
      end
      shift = 0;
      check_all();
    end
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < N; i++) m[i] = '0;
    check_all();
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
