// data_memory: the input vector of the filter, x(n) down to x(n-N+1).
//
// N sample registers forming a tapped delay line. A shift pulse moves every
// sample one place down and writes din into position 0, so position i holds
// x(n-i). One combinational read port (raddr -> rdata) feeds the shared
// multiplier during the filter pass and the update multiplier during the weight
// update pass. All samples reset to zero. The source shows the memory as a
// column X(0)..X(n) fed from the MUX; the delay-line organisation is this
// design's choice.
module data_memory
  import rls_pkg::*;
#(
  parameter int unsigned N_TAPS = 8,
  localparam int unsigned AW = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          shift,
  input  sample_t       din,
  input  logic [AW-1:0] raddr,
  output sample_t       rdata
);

  sample_t x [N_TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_TAPS; i++) x[i] <= '0;
    end else if (shift) begin
      x[0] <= din;
      for (int i = 1; i < N_TAPS; i++) x[i] <= x[i-1];
    end
  end

  assign rdata = x[raddr];

endmodule
