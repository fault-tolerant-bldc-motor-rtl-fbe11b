// pair_check -- sequence check of one pair of hall signals (x leads y by 120 el. degrees).
//
// In the positive direction of rotation the pair (x,y) runs through 00, 10, 11, 01 (repeated
// states left out). Inverting x while y is high and placing y on top gives the code
// {y, x^y} = 0, 1, 2, 3: plain binary counting. The code of the current sample minus the code
// of the previous clock's sample is therefore 0 (no change) or 1 (a correct step, including the
// 3 -> 0 wrap); any other difference (2 = a skipped state, 3 = a step backwards) sets bit 1 of
// the 2-bit difference, which is the fault indicator.
//
// Interface and timing: fault is combinational from the current inputs and the one-cycle
// delayed code, so it is a one-cycle pulse in the cycle in which the wrong change is first
// sampled. change marks every cycle in which either signal differs from the previous sample.
// The encoding, the subtraction and the use of bit 1 follow the published method. Choices of
// this design: the change output, and outputs held low during the synchronous reset (the
// delayed code follows the input every cycle, so nothing is reported just after reset). Only the
// positive direction is accepted.
module pair_check (
  input  logic clk,
  input  logic rst,
  input  logic x,        // leading signal of the pair
  input  logic y,        // lagging signal of the pair
  output logic fault,    // the last sampled change of the pair was not a forward step
  output logic change    // the pair changed in this cycle
);

  logic [1:0] code, code_d, diff;

  assign code = {y, x ^ y};

  always_ff @(posedge clk) code_d <= code;   // reset also loads the current code

  assign diff   = code - code_d;
  assign fault  = diff[1] & ~rst;
  assign change = (diff != 2'b00) & ~rst;

endmodule
