// weight_update: the update multiplier and adder of the weight-vector path.
//
// Two steps. On load the scaled error ge = mu * e (Q0.16 times Q2.14) is
// registered once per sample, kept to 22 fraction bits (Q2.22, 24 bits,
// truncated). Then, one tap per cycle, the shared update multiplier forms
// ge * x(i) (Q3.29), rounds it to the weights' Q2.14 (add half an LSB, shift)
// and adds it to the old weight:
//     w_new = sat(w_old + round(ge * x(i))),
// combinationally, so the controller can write w_new back into the tap weight
// memory in the cycle the tap is read. This is the weight correction of the
// source (error times variable gain times data vector, added to the previous
// weights). The single time-shared multiplier for the taps, the extra fraction
// bits of ge, the rounding and the saturation are this design's choices; the
// rounding matters, since plain truncation of the small corrections biases
// every weight downwards and stalls adaptation near the solution.
module weight_update
  import rls_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    load,
  input  mu_t     mu,
  input  coef_t   e,
  input  sample_t x,
  input  coef_t   w_old,
  output coef_t   w_new,
  output ge_t     ge
);

  localparam int unsigned GX_W = GE_W + SAMPLE_W;
  localparam int unsigned SH   = GE_FRAC + X_FRAC - C_FRAC;  // Q.29 -> Q.14

  logic signed [MU_W+COEF_W:0] mue;
  logic signed [GX_W-1:0]      gx;

  assign mue = $signed({1'b0, mu}) * e;

  always_ff @(posedge clk) begin
    if (rst)       ge <= '0;
    else if (load) ge <= ge_t'(mue >>> (MU_W + C_FRAC - GE_FRAC));
  end

  assign gx    = GX_W'(ge) * GX_W'(x);
  assign w_new = sat_coef(48'(w_old) + ((48'(gx) + (48'sd1 <<< (SH - 1))) >>> SH));

endmodule
