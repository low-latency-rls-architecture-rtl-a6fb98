// tap_weight_memory: the tap weights w(0)..w(N-1).
//
// A register file of N 16-bit Q2.14 weights with one combinational read port,
// one synchronous write port and a parallel view of all weights (brought out at
// the top so the adapted filter can be observed). Reset loads the starting
// weights, all zero. The read port is used during the filter pass and the
// update pass; the write port writes back the updated weight of the tap being
// read, in the same cycle. The source names the memory and its write-back path;
// the zero starting weights and the port arrangement are this design's choices.
module tap_weight_memory
  import rls_pkg::*;
#(
  parameter int unsigned N_TAPS = 8,
  localparam int unsigned AW = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] raddr,
  output coef_t         rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  coef_t         wdata,
  output coef_t         weights [N_TAPS]
);

  coef_t w [N_TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_TAPS; i++) w[i] <= '0;
    end else if (we) begin
      w[waddr] <= wdata;
    end
  end

  assign rdata   = w[raddr];
  assign weights = w;

endmodule
