// error_sub: forms the filter output and the estimation error.
//
// Combinational. The Q3.21 running sum is scaled to Q2.14 (arithmetic shift by
// 7, truncating) and saturated to 16 bits to give y. The Q1.7 desired sample is
// aligned to Q2.14 and e = d - y is saturated to 16 bits. The rounding and
// saturation rules are this design's choices.
module error_sub
  import rls_pkg::*;
#(
  parameter int unsigned ACC_W = 28
) (
  input  logic signed [ACC_W-1:0] acc,
  input  sample_t                 d,
  output coef_t                   y,
  output coef_t                   e
);

  localparam int unsigned SH = X_FRAC;  // Q.21 -> Q.14

  logic signed [47:0] y_wide, d_wide;

  assign y_wide = 48'(acc >>> SH);
  assign y      = sat_coef(y_wide);
  assign d_wide = 48'(d) <<< (C_FRAC - X_FRAC);
  assign e      = sat_coef(d_wide - 48'(y));

endmodule
