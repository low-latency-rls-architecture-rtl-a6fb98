// running_summer: accumulator that adds up the tap products.
//
// On en the product din is added to acc; with first also set, acc is loaded
// with din instead, which starts a new sum. After the N products of one sample
// acc holds the FIR output y = sum w(i)x(n-i) in Q3.21, with guard bits so the
// sum cannot wrap. The guard-bit count is this design's choice.
module running_summer
  import rls_pkg::*;
#(
  parameter int unsigned N_TAPS = 8,
  localparam int unsigned ACC_W = PROD_W + $clog2(N_TAPS) + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  prod_t                   din,
  output logic signed [ACC_W-1:0] acc
);

  always_ff @(posedge clk) begin
    if (rst)       acc <= '0;
    else if (en) begin
      if (first)   acc <= ACC_W'(din);
      else         acc <= acc + ACC_W'(din);
    end
  end

endmodule
