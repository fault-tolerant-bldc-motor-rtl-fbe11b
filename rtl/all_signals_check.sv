// all_signals_check -- checks the state sequence of all three hall signals together.
//
// The three signals {A,B,C} address a small ROM holding the state number 1..6 of each hall code
// (codes 000 and 111 read 8, a value chosen here so that every move into them is rejected;
// the one move out of them that passes is to state 3). The ROM output is registered. Each ROM sample minus the one before it must be
// below 2 (no change, or one state forward) or equal to 11 (the 6 -> 1 wrap in 4-bit
// arithmetic); anything else is an error. The error register is written only in the cycle that
// follows a change on any of the three signals, delayed by one cycle to line up with the ROM's
// latency, so the error stays as it is until the signals change again.
//
// The registered ROM, the constants 2 and 11 and the delayed write enable follow the published
// method; the ROM value of the two unused codes and the reset are choices of this design.
//
// Timing: a change sampled in cycle t is judged in cycle t+1 and shows on error from cycle t+2.
// Synchronous active-high reset clears error and loads the state history with the current code.
// Only the positive direction of rotation is accepted.
module all_signals_check
  import hall_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic error
);

  hall_t             h, h_d;
  logic [STATE_W-1:0] st, st_d, diff;
  logic              change, change_d, bad;

  assign h = {a, b, c};

  always_ff @(posedge clk) begin
    h_d  <= h;
    st   <= hall_state(h);       // registered ROM
    st_d <= st;
  end

  assign change = (h != h_d);
  assign diff   = st - st_d;
  assign bad    = ~((diff < DIFF_LIMIT) || (diff == DIFF_WRAP));

  always_ff @(posedge clk) begin
    if (rst) begin
      change_d <= 1'b0;
      error    <= 1'b0;
    end else begin
      change_d <= change;
      if (change_d) error <= bad;
    end
  end

  // The verdict is held between changes of the hall code.
  a_error_held: assert property (@(posedge clk) disable iff (rst) !change_d |=> $stable(error));

endmodule
