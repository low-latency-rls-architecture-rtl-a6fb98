// tb_rls_ri: end-to-end test of the adaptive filter at its default size.
//
// An integer reference model, written from the arithmetic rules of the design
// (formats, truncation, saturation, error averaging, gain formula with the
// reciprocal table), predicts every y, e, mse, mu and weight bit-exactly. The
// phases exercise each mechanism at least once:
//   1 system identification of a fixed 8-tap FIR: the weights must converge
//   2 adaptation off: the weights must not move
//   3 prediction mode: the desired response is the next input sample
//   4 back-to-back input: the second bank fills while the first is processed,
//     the third bank finds both banks full and is dropped (overflow)
// It also checks the output spacing (2N+9 cycles with adaptation, N+9
// without) and counts bank swaps and gain changes.
module tb_rls_ri;
  import rls_pkg::*;

  localparam int N   = 8;
  localparam int BUF = 16;

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
  longint cycle = 0;
  always @(posedge clock) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- reference model ----------------
  longint mx [N], mw [N];
  longint mP = 0, mmu = 16384;

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint gain_of(input longint p);
    longint v, k, f, r, ratio;
    v = p + 1024;
    k = 0;
    while ((longint'(1) << (k + 1)) <= v) k++;
    f = ((v - (longint'(1) << k)) * 256) >> k;
    r = ((longint'(1) << 24) + (256 + f) / 2) / (256 + f);
    ratio = (p * r) >> (k + 1);
    if (ratio > 32767) ratio = 32767;
    return 1024 + (((16384 - 1024) * ratio) >> 15);
  endfunction

  longint exp_y, exp_e;
  task automatic model_step(input longint x, input longint d, input bit adapt, input bit pred);
    longint acc, des, sq, ge;
    if (!pred) begin
      for (int i = N - 1; i > 0; i--) mx[i] = mx[i-1];
      mx[0] = x;
    end
    acc = 0;
    for (int i = 0; i < N; i++) acc += mx[i] * mw[i];
    exp_y = sat16(acc >>> 7);
    des   = pred ? x : d;
    exp_e = sat16(des * 128 - exp_y);
    sq    = exp_e * exp_e;
    mP    = mP + (((sq >> 14) - mP) >>> 4);
    mmu   = gain_of(mP);
    ge    = (mmu * exp_e) >>> 8;                 // Q2.22
    if (adapt)
      for (int i = 0; i < N; i++) mw[i] = sat16(mw[i] + ((ge * mx[i] + 16384) >>> 15));
    if (pred) begin
      for (int i = N - 1; i > 0; i--) mx[i] = mx[i-1];
      mx[0] = x;
    end
  endtask

  // ---------------- stimulus ----------------
  longint h [N] = '{40, -24, 16, 8, -6, 4, 2, -1};   // unknown system, Q1.7
  longint hist [N];
  typedef struct { longint x; longint d; } pr_t;
  pr_t q [$];            // accepted pairs, in order
  longint last_out = -1;
  bit cur_adapt = 1, cur_pred = 0;

  function automatic longint sat8(input longint v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  // one pair of the identification workload: d = h * x (Q1.7), plus small noise
  function automatic pr_t ident_pair();
    pr_t p;
    longint s;
    for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = longint'($signed(8'($urandom)));   // full range
    s = 0;
    for (int i = 0; i < N; i++) s += h[i] * hist[i];
    p.x = hist[0];
    p.d = sat8((s >>> 7) + longint'($urandom_range(0, 2)) - 1);
    return p;
  endfunction

  task automatic send(input pr_t p, input bit keep);
    @(negedge clock);
    in_valid = 1; x_in = sample_t'(p.x); d_in = sample_t'(p.d);
    if (keep) q.push_back(p);
    @(negedge clock);
    in_valid = 0;
  endtask

  task automatic send_gap(input pr_t p, input int gap);
    send(p, 1);
    repeat (gap) @(negedge clock);
  endtask

  task automatic drain();
    while (q.size() != 0 || busy) @(negedge clock);
    repeat (3) @(negedge clock);
    last_out = -1;
  endtask

  // ---------------- monitor ----------------
  int n_out = 0, n_swap = 0, n_ovf = 0, n_frozen = 0, n_pred = 0, n_mu_change = 0;
  int spacing_ok = 0;
  longint last_mu = 16384;
  coef_t w_before [N];
  longint abs_early = 0, abs_late = 0;

  always @(posedge clock) begin
    if (!reset && bank_swap) n_swap++;
    if (!reset && overflow)  n_ovf++;
  end

  always @(posedge clock) begin
    if (!reset && out_valid) begin
      pr_t p;
      if (q.size() == 0) begin
        check(0, "output without a pending input");
      end else begin
        p = q.pop_front();
        model_step(p.x, p.d, cur_adapt, cur_pred);
        check(y_out == coef_t'(exp_y), $sformatf("y %0d exp %0d", y_out, exp_y));
        check(err_out == coef_t'(exp_e), $sformatf("e %0d exp %0d", err_out, exp_e));
        check(mse_out == 16'(mP >> 2), $sformatf("mse %0d exp %0d", mse_out, mP >> 2));
        check(mu_out == mu_t'(mmu), $sformatf("mu %0d exp %0d", mu_out, mmu));
        if (mmu != last_mu) n_mu_change++;
        last_mu = mmu;
        if (!cur_adapt) n_frozen++;
        if (cur_pred) n_pred++;
        if (n_out < 100) abs_early += (exp_e < 0) ? -exp_e : exp_e;
        else if (n_out >= 500 && n_out < 600) abs_late += (exp_e < 0) ? -exp_e : exp_e;
        n_out++;
      end
      // outputs of one bank come back to back at the documented spacing
      if (last_out >= 0 && q.size() % BUF != BUF - 1 && cycle - last_out < 100) begin
        check(cycle - last_out == (cur_adapt ? 2 * N + 9 : N + 9),
              $sformatf("output spacing %0d", cycle - last_out));
        spacing_ok++;
      end
      last_out = cycle;
    end
  end

  // weights are checked one cycle after each output (written back by then)
  always @(posedge clock) begin
    if (!reset && out_valid) begin
      #1;
      for (int i = 0; i < N; i++)
        check(weights_out[i] == coef_t'(mw[i]), $sformatf("w[%0d] %0d exp %0d", i, weights_out[i], mw[i]));
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin mx[i] = 0; mw[i] = 0; hist[i] = 0; end
    repeat (4) @(negedge clock);
    reset = 0;

    // 1: system identification, 40 banks
    cur_adapt = 1; cur_pred = 0; adapt_en = 1; predict = 0;
    for (int b = 0; b < 40; b++)
      for (int i = 0; i < BUF; i++) send_gap(ident_pair(), 2 * N + 10);
    drain();
    check(abs_late * 4 < abs_early, $sformatf("no convergence: early %0d late %0d", abs_early, abs_late));
    for (int i = 0; i < N; i++)
      check(weights_out[i] - coef_t'(h[i] * 128) < 160 && coef_t'(h[i] * 128) - weights_out[i] < 160,
            $sformatf("w[%0d]=%0d far from %0d", i, weights_out[i], h[i] * 128));

    $display("identification: mean |e| first 100 = %0d, samples 500-599 = %0d (Q2.14 LSBs)",
             abs_early / 100, abs_late / 100);
    for (int i = 0; i < N; i++) $display("  w[%0d] = %0d (target %0d)", i, weights_out[i], h[i] * 128);

    // 2: adaptation off
    cur_adapt = 0; adapt_en = 0;
    w_before = weights_out;
    for (int i = 0; i < BUF; i++) send_gap(ident_pair(), N + 10);
    drain();
    check(weights_out == w_before, "weights moved with adaptation off");

    // 3: prediction of a slowly varying signal
    cur_adapt = 1; adapt_en = 1; cur_pred = 1; predict = 1;
    for (int i = 0; i < 2 * BUF; i++) begin
      pr_t p;
      p.x = (i % 16 < 8) ? 48 : -48;
      p.d = 0;
      send_gap(p, 2 * N + 10);
    end
    drain();

    // 4: three banks back to back: the third is dropped
    cur_pred = 0; predict = 0;
    n_ovf = 0;
    for (int i = 0; i < 3 * BUF; i++) send(ident_pair(), i < 2 * BUF);
    drain();
    check(n_ovf == BUF, $sformatf("overflow count %0d", n_ovf));

    check(n_out == 40 * BUF + BUF + 2 * BUF + 2 * BUF, $sformatf("outputs %0d", n_out));
    check(n_swap == 40 + 1 + 2 + 2, $sformatf("bank swaps %0d", n_swap));
    check(n_frozen > 0, "adaptation-off never exercised");
    check(n_pred > 0, "prediction mode never exercised");
    check(n_mu_change > 10, $sformatf("gain changed only %0d times", n_mu_change));
    check(spacing_ok > 100, "output spacing not checked");
    $display("mechanisms: swaps=%0d overflow=%0d frozen=%0d predict=%0d mu_changes=%0d spacing_checks=%0d",
             n_swap, BUF, n_frozen, n_pred, n_mu_change, spacing_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
