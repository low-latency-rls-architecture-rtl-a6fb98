// input_buffer: ping-pong input buffering RAMs and the read-out MUX.
//
// Incoming sample pairs arrive on in_valid/in_pair, at most one per cycle, and
// are written into bank wr_bank of two sample_ram banks. When a bank holds DEPTH
// pairs it is marked full and writing moves to the other bank. The filter side
// reads pairs from the full bank rd_bank, one per pop, and the MUX selects that
// bank's read data; pair_valid follows pop by one cycle. When the last pair of a
// bank has been popped the bank is freed and reading moves to the other bank
// (bank_swap pulses). A pair that arrives while the bank being written is still
// full is dropped and overflow pulses. avail says a pair can be popped.
//
// The source says only that continuous input is stored in two input RAMs and
// read out alternately through a MUX; whole-bank ping-pong, the full flags and
// the overflow rule are this design's choices.
module input_buffer
  import rls_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  // write side
  input  logic  in_valid,
  input  pair_t in_pair,
  output logic  overflow,    // pulse: in_pair dropped
  // read side
  output logic  avail,
  input  logic  pop,
  output logic  pair_valid,
  output pair_t pair,
  output logic  bank_swap    // pulse: a bank was emptied and released
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic          wr_bank, rd_bank, rd_bank_q;
  logic [AW-1:0] wr_idx, rd_idx;
  logic [1:0]    full;
  logic [PAIR_W-1:0] rdata [2];

  logic do_write, do_read, wr_last, rd_last;

  assign do_write = in_valid && !full[wr_bank];
  assign overflow = in_valid &&  full[wr_bank];
  assign avail    = full[rd_bank];
  assign do_read  = pop && full[rd_bank];
  assign wr_last  = (wr_idx == AW'(DEPTH - 1));
  assign rd_last  = (rd_idx == AW'(DEPTH - 1));
  assign bank_swap = do_read && rd_last;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    sample_ram #(.DEPTH(DEPTH), .WIDTH(PAIR_W)) u_ram (
      .clk   (clk),
      .rst   (rst),
      .we    (do_write && (wr_bank == 1'(b))),
      .waddr (wr_idx),
      .wdata (in_pair),
      .re    (do_read && (rd_bank == 1'(b))),
      .raddr (rd_idx),
      .rdata (rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_bank    <= 1'b0;
      rd_bank    <= 1'b0;
      rd_bank_q  <= 1'b0;
      wr_idx     <= '0;
      rd_idx     <= '0;
      full       <= '0;
      pair_valid <= 1'b0;
    end else begin
      pair_valid <= do_read;
      if (do_read) rd_bank_q <= rd_bank;
      if (do_write) begin
        if (wr_last) begin
          wr_idx        <= '0;
          full[wr_bank] <= 1'b1;
          wr_bank       <= ~wr_bank;
        end else begin
          wr_idx <= wr_idx + 1'b1;
        end
      end
      if (do_read) begin
        if (rd_last) begin
          rd_idx        <= '0;
          full[rd_bank] <= 1'b0;
          rd_bank       <= ~rd_bank;
        end else begin
          rd_idx <= rd_idx + 1'b1;
        end
      end
    end
  end

  // MUX: read data of the bank the last pop addressed.
  assign pair = rd_bank_q ? pair_t'(rdata[1]) : pair_t'(rdata[0]);

endmodule
