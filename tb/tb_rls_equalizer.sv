// tb_rls_equalizer: channel equalisation with the full design at defaults.
//
// Binary symbols s(n) = +/-0.375 pass through the FIR channel
// 0.75 + 0.25 z^-1 - 0.125 z^-2 with +/-1 LSB noise; the filter sees the channel
// output as x and is trained with d = s(n-1). After training, the sign of the
// filter output must recover every symbol of the last 200, the mean error
// must be below a quarter of its starting value, and the gain must have
// fallen well below its peak. The channel and symbol alphabet are chosen for this test.
module tb_rls_equalizer;
  import rls_pkg::*;

  localparam int N = 8, BANKS = 50, BUF = 16;

  logic clock = 0, reset = 1;
  logic in_valid = 0;
  sample_t x_in = '0, d_in = '0;
  logic adapt_en = 1, predict = 0;
  logic overflow, bank_swap, busy, out_valid;
  coef_t y_out, err_out;
  logic [15:0] mse_out;
  mu_t mu_out;
  coef_t weights_out [N];

  rls_ri dut (.*);
  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int sym_q [$];
  int n_out = 0, wrong = 0;
  longint e_early = 0, e_late = 0;
  mu_t mu_peak = '0;

  always @(posedge clock) begin
    if (!reset && out_valid) begin
      int s;
      s = sym_q.pop_front();
      if (mu_out > mu_peak) mu_peak = mu_out;
      if (n_out < 100) e_early += (err_out < 0) ? -err_out : err_out;
      if (n_out >= BANKS * BUF - 200) begin
        e_late += (err_out < 0) ? -err_out : err_out;
        if ((y_out < 0) != (s < 0)) wrong++;
      end
      n_out++;
    end
  end

  initial begin
    int s0, s1, s2, x;
    s0 = 0; s1 = 0; s2 = 0;
    repeat (4) @(negedge clock);
    reset = 0;
    for (int n = 0; n < BANKS * BUF; n++) begin
      s2 = s1; s1 = s0;
      s0 = ($urandom_range(0, 1) == 1) ? 48 : -48;
      x = ((96 * s0 + 32 * s1 - 16 * s2) >>> 7) + $urandom_range(0, 2) - 1;
      @(negedge clock);
      in_valid = 1; x_in = sample_t'(x); d_in = sample_t'(s1);
      sym_q.push_back(s1);
      @(negedge clock);
      in_valid = 0;
      repeat (2 * N + 10) @(negedge clock);
    end
    while (sym_q.size() != 0 || busy) @(negedge clock);
    checks++; if (n_out != BANKS * BUF) failures++;
    checks++; if (wrong != 0) failures++;
    checks++; if (e_late / 200 * 4 > e_early / 100) failures++;
    checks++; if (!(mu_out + 16'd2000 < mu_peak)) failures++;
    checks++; if (overflow) failures++;
    $display("equaliser: outputs %0d, wrong decisions in last 200: %0d, mean|e| first 100 %0d, last 200 %0d, mu peak %0d, final %0d",
             n_out, wrong, e_early / 100, e_late / 200, mu_peak, mu_out);
    for (int i = 0; i < N; i++) $display("  w[%0d] = %0d", i, weights_out[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
