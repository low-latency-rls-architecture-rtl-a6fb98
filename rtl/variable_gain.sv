// variable_gain: gain factor applied to the error, set by the residual power.
//
// The gain grows with the averaged error power P and saturates:
//     mu = MU_MIN + (MU_MAX - MU_MIN) * P / (P + P0).
// While the filter is far from its solution (large error power) it adapts with
// up to MU_MAX; once the error is small the gain falls towards MU_MIN, which
// lowers the excess error after convergence. The division is done with the
// rinv_rom reciprocal: P / (P + P0) = P * mant * 2^-(16 + exp), formed in Q0.15
// and clamped below 1. The result is registered on en (one cycle).
//
// The source places a "variable gain" block between the error and the weight
// update and says the amount of forgetting is chosen as an inverse function of
// the residual power, computed through a ROM-based reciprocal; the formula
// above, its constants and formats are this design's choices. mu is unsigned
// Q0.16 and resets to MU_MAX.
module variable_gain
  import rls_pkg::*;
#(
  parameter mu_t  MU_MIN = 16'd1024,   // 2^-6
  parameter mu_t  MU_MAX = 16'd16384,  // 2^-2
  parameter pow_t P0     = 18'd1024    // 1/16 in Q4.14
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  pow_t pow,
  output mu_t  mu
);

  localparam int unsigned VW = POW_W + 1;
  localparam int unsigned EW = $clog2(VW);

  logic [VW-1:0]          v;
  logic [16:0]            mant;
  logic [EW-1:0]          ex;
  logic [POW_W+17-1:0]    prod;
  logic [POW_W+17-1:0]    ratio_w;
  logic [14:0]            ratio;   // Q0.15, below 1
  logic [MU_W+15-1:0]     span;
  mu_t                    mu_next;

  assign v = VW'(pow) + VW'(P0);

  rinv_rom #(.VW(VW), .M(8)) u_rinv (
    .v    (v),
    .mant (mant),
    .exp  (ex)
  );

  always_comb begin
    prod    = (POW_W+17)'(pow) * (POW_W+17)'(mant);
    ratio_w = prod >> (int'(ex) + 1);
    ratio   = (ratio_w > (POW_W+17)'(32767)) ? 15'h7fff : ratio_w[14:0];
    span    = (MU_W+15)'(MU_MAX - MU_MIN) * (MU_W+15)'(ratio);
    mu_next = MU_MIN + mu_t'(span >> 15);
  end

  always_ff @(posedge clk) begin
    if (rst)     mu <= MU_MAX;
    else if (en) mu <= mu_next;
  end

endmodule
