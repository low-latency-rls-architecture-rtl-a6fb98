// sample_ram: one bank of the input buffering RAM.
//
// A simple dual-port RAM of DEPTH words: one synchronous write port and one
// synchronous read port (data appears on rdata the cycle after re). The input
// buffer uses two of these as a ping-pong pair, filling one while the filter
// drains the other. Depth and the registered read are this design's choices;
// the source only shows two "input buffering RAMs" in front of a MUX. The read
// register is cleared by reset; the array itself is not (it is always written
// before it is read).
module sample_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)     rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
