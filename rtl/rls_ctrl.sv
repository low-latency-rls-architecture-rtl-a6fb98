// rls_ctrl: sequencer of one filter-and-adapt step per input sample.
//
// For each sample pair it steps through
//   IDLE  wait for a full input bank, pop one pair
//   WAIT  the pair arrives from the input RAM and is latched (capture)
//   LOAD  shift x into the data memory (normal mode only)
//   MAC   N cycles: tap i of data and weight memory into the shared multiplier
//   DRAIN the last product enters the running summer
//   ERR   y and e = d - y are registered
//   POW   error square averaging
//   GAIN  variable gain from the new error power
//   GE    mu * e is registered in the weight update unit
//   UPD   N cycles: w(i) <= w(i) + mu e x(i) written back (skipped if adaptation
//         is off)
//   DONE  result valid; in prediction mode x is shifted in only now
// so one sample occupies the controller for 2N+9 cycles with adaptation and
// N+9 without, counting from the cycle of the pop to the cycle of done. The mode inputs are sampled at capture and hold for the whole step.
// In prediction mode the desired response is the new sample itself and the
// filter sees only the N previous samples ("subtracted from the next data
// sample"); in normal mode it is the paired d input. The state split, the cycle
// counts and the mode inputs are this design's choices: the source gives the
// order of operations but no schedule.
module rls_ctrl #(
  parameter int unsigned N_TAPS = 8,
  localparam int unsigned AW = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          avail,
  input  logic          pair_valid,
  input  logic          adapt_en,
  input  logic          predict,
  input  logic          p_valid,     // product valid, from the multiplier
  output logic          pop,
  output logic          capture,
  output logic          shift,
  output logic [AW-1:0] addr,
  output logic          mul_en,
  output logic          acc_en,
  output logic          acc_first,
  output logic          err_load,
  output logic          pow_en,
  output logic          gain_en,
  output logic          ge_load,
  output logic          w_we,
  output logic          done,
  output logic          busy,
  output logic          predict_q,
  output logic          adapt_q
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_LOAD, S_MAC, S_DRAIN, S_ERR, S_POW, S_GAIN, S_GE, S_UPD,
    S_DONE
  } state_t;

  state_t        state;
  logic [AW-1:0] idx;
  logic          first_q;
  logic          last;

  assign last = (idx == AW'(N_TAPS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      idx       <= '0;
      first_q   <= 1'b0;
      predict_q <= 1'b0;
      adapt_q   <= 1'b0;
    end else begin
      first_q <= (state == S_MAC) && (idx == '0);
      unique case (state)
        S_IDLE:  if (avail) state <= S_WAIT;
        S_WAIT:  if (pair_valid) begin
                   predict_q <= predict;
                   adapt_q   <= adapt_en;
                   state     <= S_LOAD;
                 end
        S_LOAD:  begin
                   idx   <= '0;
                   state <= S_MAC;
                 end
        S_MAC:   begin
                   idx <= idx + 1'b1;
                   if (last) begin
                     idx   <= '0;
                     state <= S_DRAIN;
                   end
                 end
        S_DRAIN: state <= S_ERR;
        S_ERR:   state <= S_POW;
        S_POW:   state <= S_GAIN;
        S_GAIN:  state <= S_GE;
        S_GE:    begin
                   idx   <= '0;
                   state <= adapt_q ? S_UPD : S_DONE;
                 end
        S_UPD:   begin
                   idx <= idx + 1'b1;
                   if (last) begin
                     idx   <= '0;
                     state <= S_DONE;
                   end
                 end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pop       = (state == S_IDLE) && avail;
  assign capture   = (state == S_WAIT) && pair_valid;
  assign shift     = ((state == S_LOAD) && !predict_q) || ((state == S_DONE) && predict_q);
  assign addr      = idx;
  assign mul_en    = (state == S_MAC);
  assign acc_en    = p_valid;
  assign acc_first = first_q;
  assign err_load  = (state == S_ERR);
  assign pow_en    = (state == S_POW);
  assign gain_en   = (state == S_GAIN);
  assign ge_load   = (state == S_GE);
  assign w_we      = (state == S_UPD);
  assign done      = (state == S_DONE);
  assign busy      = (state != S_IDLE);

  // A pair is popped only from the idle state, so a new step never overlaps one
  // in progress.
  a_pop_idle: assert property (@(posedge clk) disable iff (rst) pop |-> state == S_IDLE);

endmodule
