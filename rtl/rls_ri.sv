// rls_ri: time-shared adaptive FIR filter with buffered input and variable gain.
//
// Sample pairs (x, d) stream in on in_valid and are held in two ping-pong input
// RAMs (input_buffer). For each pair the controller (rls_ctrl) moves x into the
// data memory, runs the N taps one per cycle through a single multiplier and a
// running summer to form the FIR output y, subtracts y from the desired sample
// to get the error e, squares and averages e into the residual power P, derives
// the gain mu from P (variable_gain with the rinv_rom reciprocal), and finally
// updates each weight w(i) += mu e x(i), writing it back into the tap weight
// memory. With predict = 1 the desired sample is the new x itself and the filter
// works on the N previous samples (linear prediction); with adapt_en = 0 the
// weights are frozen.
//
// Interface: clock, reset (synchronous, active high), 8-bit Q1.7 x_in / d_in
// with in_valid (one pair per cycle at most; pairs that find the buffer full
// are dropped and overflow pulses; bank_swap pulses when an input bank has been
// emptied). Results, all 16-bit, are registered and
// valid on the out_valid pulse: y_out and err_out (Q2.14), mse_out (Q4.12),
// mu_out (Q0.16). weights_out shows the current weights (Q2.14) at all times.
// busy is high while a sample is being processed.
//
// Timing: a pair is processed once its input bank is full (BUF_DEPTH pairs);
// pairs of a full bank are then processed back to back, one every 2*N_TAPS+9
// cycles (N_TAPS+9 with adaptation off), which is also the highest sustained
// input rate. out_valid comes 2*N_TAPS+9 cycles after the pop of its pair. The block structure follows the source's block diagram; the
// schedule, formats, sizes and mode inputs are this design's choices.
module rls_ri
  import rls_pkg::*;
#(
  parameter int unsigned N_TAPS    = 8,
  parameter int unsigned BUF_DEPTH = 16,
  parameter int unsigned AVG_SHIFT = 4
) (
  input  logic        clock,
  input  logic        reset,
  input  logic        in_valid,
  input  sample_t     x_in,
  input  sample_t     d_in,
  input  logic        adapt_en,
  input  logic        predict,
  output logic        overflow,
  output logic        bank_swap,
  output logic        busy,
  output logic        out_valid,
  output coef_t       y_out,
  output coef_t       err_out,
  output logic [15:0] mse_out,
  output mu_t         mu_out,
  output coef_t       weights_out [N_TAPS]
);

  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1;
  localparam int unsigned ACC_W = PROD_W + $clog2(N_TAPS) + 1;

  // input buffer
  logic  avail, pop, pair_valid;
  pair_t pair, cur;

  // controller
  logic          capture, shift, mul_en, acc_en, acc_first, err_load;
  logic          pow_en, gain_en, ge_load, w_we, done, predict_q;
  logic [AW-1:0] addr;

  // datapath
  sample_t                 x_rd;
  coef_t                   w_rd, w_new, y_c, e_c, y_q, e_q;
  prod_t                   p;
  logic                    p_valid;
  logic signed [ACC_W-1:0] acc;
  sample_t                 desired;
  pow_t                    pow;
  logic [15:0]             mse;
  mu_t                     mu;

  input_buffer #(.DEPTH(BUF_DEPTH)) u_inbuf (
    .clk        (clock),
    .rst        (reset),
    .in_valid   (in_valid),
    .in_pair    ('{x: x_in, d: d_in}),
    .overflow   (overflow),
    .avail      (avail),
    .pop        (pop),
    .pair_valid (pair_valid),
    .pair       (pair),
    .bank_swap  (bank_swap)
  );

  rls_ctrl #(.N_TAPS(N_TAPS)) u_ctrl (
    .clk        (clock),
    .rst        (reset),
    .avail      (avail),
    .pair_valid (pair_valid),
    .adapt_en   (adapt_en),
    .predict    (predict),
    .p_valid    (p_valid),
    .pop        (pop),
    .capture    (capture),
    .shift      (shift),
    .addr       (addr),
    .mul_en     (mul_en),
    .acc_en     (acc_en),
    .acc_first  (acc_first),
    .err_load   (err_load),
    .pow_en     (pow_en),
    .gain_en    (gain_en),
    .ge_load    (ge_load),
    .w_we       (w_we),
    .done       (done),
    .busy       (busy),
    .predict_q  (predict_q),
    .adapt_q    ()
  );

  // current sample pair, held for the whole step
  always_ff @(posedge clock) begin
    if (reset)        cur <= '0;
    else if (capture) cur <= pair;
  end

  assign desired = predict_q ? cur.x : cur.d;

  data_memory #(.N_TAPS(N_TAPS)) u_xmem (
    .clk   (clock),
    .rst   (reset),
    .shift (shift),
    .din   (cur.x),
    .raddr (addr),
    .rdata (x_rd)
  );

  tap_weight_memory #(.N_TAPS(N_TAPS)) u_wmem (
    .clk     (clock),
    .rst     (reset),
    .raddr   (addr),
    .rdata   (w_rd),
    .we      (w_we),
    .waddr   (addr),
    .wdata   (w_new),
    .weights (weights_out)
  );

  tap_multiplier u_mul (
    .clk     (clock),
    .rst     (reset),
    .en      (mul_en),
    .a       (x_rd),
    .b       (w_rd),
    .p       (p),
    .p_valid (p_valid)
  );

  running_summer #(.N_TAPS(N_TAPS)) u_sum (
    .clk   (clock),
    .rst   (reset),
    .en    (acc_en),
    .first (acc_first),
    .din   (p),
    .acc   (acc)
  );

  error_sub #(.ACC_W(ACC_W)) u_err (
    .acc (acc),
    .d   (desired),
    .y   (y_c),
    .e   (e_c)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      y_q <= '0;
      e_q <= '0;
    end else if (err_load) begin
      y_q <= y_c;
      e_q <= e_c;
    end
  end

  err_power_avg #(.AVG_SHIFT(AVG_SHIFT)) u_pow (
    .clk (clock),
    .rst (reset),
    .en  (pow_en),
    .e   (e_q),
    .pow (pow),
    .mse (mse)
  );

  variable_gain u_gain (
    .clk (clock),
    .rst (reset),
    .en  (gain_en),
    .pow (pow),
    .mu  (mu)
  );

  weight_update u_upd (
    .clk   (clock),
    .rst   (reset),
    .load  (ge_load),
    .mu    (mu),
    .e     (e_q),
    .x     (x_rd),
    .w_old (w_rd),
    .w_new (w_new),
    .ge    ()
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      out_valid <= 1'b0;
      y_out     <= '0;
      err_out   <= '0;
      mse_out   <= '0;
      mu_out    <= '0;
    end else begin
      out_valid <= done;
      if (done) begin
        y_out   <= y_q;
        err_out <= e_q;
        mse_out <= mse;
        mu_out  <= mu;
      end
    end
  end

endmodule
