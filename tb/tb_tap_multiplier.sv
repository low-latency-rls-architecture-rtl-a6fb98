// tb_tap_multiplier: random and extreme operands; the full product must appear
// one cycle after en, with p_valid, and hold while en is low.
module tb_tap_multiplier;
  import rls_pkg::*;
  logic clk = 0, rst = 1, en = 0, p_valid;
  sample_t a = '0;
  coef_t b = '0;
  prod_t p;
  int checks = 0, failures = 0;

  tap_multiplier dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint ea, eb, last;
    @(negedge clk); rst = 0;
    last = 0;
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: begin a = -128; b = -32768; end
        1: begin a = 127;  b = -32768; end
        2: begin a = -128; b = 32767;  end
        default: begin a = sample_t'($urandom); b = coef_t'($urandom); end
      endcase
      en = (t < 3) || ($urandom_range(0, 3) != 0);
      ea = longint'(a); eb = longint'(b);
      @(negedge clk);
      check(p_valid == en, "p_valid");
      if (en) last = ea * eb;
      check(longint'(p) == last, $sformatf("p %0d exp %0d", p, last));
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
