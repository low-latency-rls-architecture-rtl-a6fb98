// err_power_avg: error square calculation and averaging logic.
//
// On en the Q2.14 error is squared, scaled to Q4.14 (shift by 14, truncating)
// and folded into an exponential running average
//     P <= P + (e^2 - P) / 2^AVG_SHIFT,
// a first-order low-pass with time constant of about 2^AVG_SHIFT samples. P is
// the residual (error) power; it drives the variable gain and is brought out as
// an MSE estimate, mse = P in Q4.12 (P >> 2). The source names this block and
// says the MSE is the measure of how well the filter has adapted; the averaging
// rule, its time constant and the formats are this design's choices. P resets
// to zero.
module err_power_avg
  import rls_pkg::*;
#(
  parameter int unsigned AVG_SHIFT = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  coef_t e,
  output pow_t  pow,
  output logic [15:0] mse
);

  logic signed [2*COEF_W-1:0] sq;
  pow_t                       sq14;
  logic signed [POW_W:0]      diff;

  assign sq   = e * e;
  assign sq14 = pow_t'(sq >>> C_FRAC);
  assign diff = $signed({1'b0, sq14}) - $signed({1'b0, pow});

  always_ff @(posedge clk) begin
    if (rst)     pow <= '0;
    else if (en) pow <= pow_t'($signed({1'b0, pow}) + (diff >>> AVG_SHIFT));
  end

  assign mse = 16'(pow >> 2);

endmodule
