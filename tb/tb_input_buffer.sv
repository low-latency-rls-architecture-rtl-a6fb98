// tb_input_buffer: ping-pong behaviour of the input buffer.
// Fills bank 0 and checks that nothing is offered before it is full, fills
// bank 1, checks that further pairs overflow, drains both banks in order
// through the MUX (one-cycle read latency), counts bank swaps, and finally
// interleaves writes and reads at random against a queue model.
module tb_input_buffer;
  import rls_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1, in_valid = 0, pop = 0;
  pair_t in_pair = '0, pair;
  logic overflow, avail, pair_valid, bank_swap;
  int checks = 0, failures = 0, n_ovf = 0, n_swap = 0;
  pair_t q [$];

  input_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (overflow) n_ovf++;
    if (bank_swap) n_swap++;
  end

  always @(negedge clk) if (!rst && pair_valid) begin
    if (q.size() == 0) check(0, "pair without input");
    else begin
      pair_t e;
      e = q.pop_front();
      check(pair == e, $sformatf("pair %h exp %h", pair, e));
    end
  end

  task automatic write(input bit keep);
    in_valid = 1; in_pair = pair_t'($urandom);
    if (keep) q.push_back(in_pair);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic read_one();
    check(avail, "avail low when a pair is expected");
    pop = 1; @(negedge clk); pop = 0;
  endtask

  initial begin
    @(negedge clk); rst = 0; @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      check(!avail, "avail before a bank is full");
      write(1);
    end
    check(avail, "avail low with a full bank");
    for (int i = 0; i < DEPTH; i++) write(1);
    for (int i = 0; i < 3; i++) write(0);
    check(n_ovf == 3, $sformatf("overflow count %0d", n_ovf));
    for (int i = 0; i < 2 * DEPTH; i++) read_one();
    @(negedge clk); @(negedge clk);
    check(!avail, "avail with both banks empty");
    check(n_swap == 2, $sformatf("swaps %0d", n_swap));
    check(q.size() == 0, "pairs missing");
    // random traffic; the reference drops a write when the model says both
    // banks hold data not yet read: tracked as counts per bank
    begin
      int wb = 0, rb = 0, wcnt = 0, rcnt = 0, ovf0;
      bit full [2] = '{0, 0};
      ovf0 = n_ovf;
      for (int t = 0; t < 400; t++) begin
        bit w, r, exp_ovf, do_w, do_r;
        w = ($urandom_range(0, 2) != 0);
        r = ($urandom_range(0, 3) == 0);
        exp_ovf = w && full[wb];
        check(avail == full[rb], "avail mismatch in random traffic");
        in_valid = w; in_pair = pair_t'($urandom); pop = r;
        if (w && !full[wb]) q.push_back(in_pair);
        #1;
        check(overflow == exp_ovf, "overflow mismatch in random traffic");
        do_w = w && !full[wb];
        do_r = r && full[rb];
        if (do_r) begin
          rcnt++;
          if (rcnt == DEPTH) begin rcnt = 0; full[rb] = 0; rb ^= 1; end
        end
        if (do_w) begin
          wcnt++;
          if (wcnt == DEPTH) begin wcnt = 0; full[wb] = 1; wb ^= 1; end
        end
        @(negedge clk);
      end
      in_valid = 0; pop = 0;
      check(n_ovf > ovf0, "no overflow in random traffic");
    end
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
