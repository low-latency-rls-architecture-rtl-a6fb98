// tb_rls_ctrl: the schedule of one step. For each combination of the two
// modes it offers a pair, then records in which cycle (counted from the pop)
// each control output is active and checks the documented schedule: capture
// at 1, MAC addresses 0..N-1 at 3..N+2, first product accumulated at N+3... ,
// error/power/gain/ge at N+4..N+7, updates at N+8..2N+7 (none with adaptation
// off), done at 2N+8 (N+8), and the shift at 2 (normal) or at done
// (prediction).
module tb_rls_ctrl;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  logic avail = 0, pair_valid = 0, adapt_en = 0, predict = 0, p_valid;
  logic pop, capture, shift, mul_en, acc_en, acc_first, err_load, pow_en;
  logic gain_en, ge_load, w_we, done, busy, predict_q, adapt_q;
  logic [2:0] addr;
  int checks = 0, failures = 0;

  rls_ctrl #(.N_TAPS(N)) dut (.*);
  always #5 clk = ~clk;

  // stand-in for the multiplier's registered valid
  always_ff @(posedge clk) p_valid <= rst ? 1'b0 : mul_en;
  // stand-in for the input RAM: the pair arrives the cycle after the pop
  always_ff @(posedge clk) pair_valid <= rst ? 1'b0 : pop;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit ad, input bit pr);
    int c, t_done, n_mac, n_upd, n_shift, t_shift, n_first, n_acc;
    int total;
    total = ad ? 2 * N + 8 : N + 8;
    adapt_en = ad; predict = pr; avail = 1;
    c = -1; t_done = -1; n_mac = 0; n_upd = 0; n_shift = 0; t_shift = -1; n_first = 0; n_acc = 0;
    // wait for the pop
    while (!pop) @(negedge clk);
    c = 0;
    while (c <= total + 2) begin
      if (c == 0) check(pop, "pop");
      if (c > 0) check(!pop, $sformatf("pop at %0d", c));
      if (c == 1) avail = 0;
      check(capture == (c == 1), $sformatf("capture at %0d", c));
      if (mul_en) begin
        check(c == 3 + n_mac && addr == 3'(n_mac), $sformatf("mac at %0d addr %0d", c, addr));
        n_mac++;
      end
      if (acc_en) begin
        check(acc_first == (n_acc == 0), "acc_first");
        n_acc++;
      end
      check(err_load == (c == N + 4), $sformatf("err_load at %0d", c));
      check(pow_en   == (c == N + 5), $sformatf("pow_en at %0d", c));
      check(gain_en  == (c == N + 6), $sformatf("gain_en at %0d", c));
      check(ge_load  == (c == N + 7), $sformatf("ge_load at %0d", c));
      if (w_we) begin
        check(c == N + 8 + n_upd && addr == 3'(n_upd), $sformatf("update at %0d addr %0d", c, addr));
        n_upd++;
      end
      if (shift) begin n_shift++; t_shift = c; end
      if (done) t_done = c;
      check(busy == (c > 0 && c <= total), $sformatf("busy at %0d", c));
      @(negedge clk);
      c++;
    end
    check(n_mac == N, $sformatf("mac count %0d", n_mac));
    check(n_acc == N, $sformatf("acc count %0d", n_acc));
    check(n_upd == (ad ? N : 0), $sformatf("update count %0d", n_upd));
    check(t_done == total, $sformatf("done at %0d exp %0d", t_done, total));
    check(n_shift == 1, "one shift per sample");
    check(t_shift == (pr ? total : 2), $sformatf("shift at %0d", t_shift));
    check(predict_q == pr && adapt_q == ad, "mode latches");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!pop && !busy, "idle without avail");
    run(1, 0);
    run(0, 0);
    run(1, 1);
    run(0, 1);
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
