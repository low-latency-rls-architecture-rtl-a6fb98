// rls_pkg: number formats, shared types and helpers of the adaptive filter.
//
// Samples x and d are 8-bit two's complement Q1.7 (the 8-bit input buses of the
// top-level symbol). Weights, the filter output y and the error e are 16-bit
// Q2.14 (the 16-bit output buses). A product x*w is 24-bit Q3.21. The gain mu is
// unsigned Q0.16, the error power unsigned Q4.14 and the scaled error mu*e
// signed Q2.22. These fractional
// positions are this design's choice; only the bus widths come from the source.
package rls_pkg;

  localparam int unsigned SAMPLE_W = 8;   // width of x and d
  localparam int unsigned COEF_W   = 16;  // width of weights, y, e
  localparam int unsigned X_FRAC   = 7;   // fraction bits of a sample
  localparam int unsigned C_FRAC   = 14;  // fraction bits of a weight / error
  localparam int unsigned PROD_W   = SAMPLE_W + COEF_W;  // x*w
  localparam int unsigned MU_W     = 16;  // gain, unsigned Q0.16
  localparam int unsigned POW_W    = 18;  // error power, unsigned Q4.14
  localparam int unsigned GE_W     = 24;  // scaled error mu*e, signed Q2.22
  localparam int unsigned GE_FRAC  = 22;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [PROD_W-1:0]   prod_t;
  typedef logic        [MU_W-1:0]     mu_t;
  typedef logic        [POW_W-1:0]    pow_t;
  typedef logic signed [GE_W-1:0]     ge_t;

  // One input sample pair as stored in the input buffering RAMs.
  typedef struct packed {
    sample_t x;  // filter input
    sample_t d;  // desired response
  } pair_t;

  localparam int unsigned PAIR_W = $bits(pair_t);

  // Saturate a wide signed value to the 16-bit coefficient range.
  function automatic coef_t sat_coef(input logic signed [47:0] v);
    if (v > 48'sd32767)       return coef_t'(16'sh7fff);
    else if (v < -48'sd32768) return coef_t'(16'sh8000);
    else                      return coef_t'(v[COEF_W-1:0]);
  endfunction

endpackage
