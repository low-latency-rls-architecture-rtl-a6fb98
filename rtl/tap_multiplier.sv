// tap_multiplier: the one multiplier of the FIR part.
//
// Multiplies a Q1.7 sample by a Q2.14 weight into a full-precision Q3.21
// product, registered: p is valid the cycle after en (p_valid). Because the
// filter taps are processed one per cycle, this single multiplier replaces the
// N multipliers of a parallel FIR, as the source describes. The output register
// is this design's choice.
module tap_multiplier
  import rls_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  sample_t a,
  input  coef_t   b,
  output prod_t   p,
  output logic    p_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      p       <= '0;
      p_valid <= 1'b0;
    end else begin
      p_valid <= en;
      if (en) p <= prod_t'(a) * prod_t'(b);
    end
  end

endmodule
