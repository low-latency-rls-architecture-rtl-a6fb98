// tb_sample_ram: writes random words to every address of one input RAM bank,
// reads them back (one-cycle read latency), and checks that rdata holds while
// re is low and that reset clears it.
module tb_sample_ram;
  localparam int DEPTH = 16, WIDTH = 16;
  logic clk = 0, rst = 1, we = 0, re = 0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sample_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    @(negedge clk);
    check(rdata == '0, "rdata not cleared by reset");
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 4'(a); wdata = 16'($urandom); ref_mem[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < 3; r++)
      for (int a = 0; a < DEPTH; a++) begin
        int ra = (a * 7 + r) % DEPTH;
        re = 1; raddr = 4'(ra);
        @(negedge clk);
        check(rdata == ref_mem[ra], $sformatf("addr %0d read %h exp %h", ra, rdata, ref_mem[ra]));
        re = 0; raddr = 4'(ra + 1);
        @(negedge clk);
        check(rdata == ref_mem[ra], "rdata changed with re low");
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
