// tb_tap_weight_memory: random writes and reads against a model, through the
// read port and the parallel weights view; checks zero starting weights.
module tb_tap_weight_memory;
  import rls_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst = 1, we = 0;
  logic [2:0] raddr = '0, waddr = '0;
  coef_t rdata, wdata = '0;
  coef_t weights [N];
  coef_t m [N];
  int checks = 0, failures = 0;

  tap_weight_memory #(.N_TAPS(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) m[i] = '0;
    @(negedge clk); rst = 0;
    for (int t = 0; t < 200; t++) begin
      we = ($urandom_range(0, 1) == 1); waddr = 3'($urandom); wdata = coef_t'($urandom);
      raddr = 3'($urandom);
      #1;
      check(rdata == m[raddr], $sformatf("read w[%0d]=%0d exp %0d", raddr, rdata, m[raddr]));
      @(negedge clk);
      if (we) m[waddr] = wdata;
      we = 0;
      #1;
      for (int i = 0; i < N; i++) check(weights[i] == m[i], $sformatf("weights[%0d]", i));
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
