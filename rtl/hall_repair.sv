// hall_repair -- hall sensor check and repair: keeps a BLDC drive commutating with one faulty
// hall sensor.
//
// Three generator blocks run all the time, each building a substitute for one hall signal from
// the other two (A from C and B, B from A and C, C from B and A, wired for the positive direction
// of rotation). The signal check watches the raw inputs and flags the one faulty signal; a flag
// switches that signal's multiplexer from the raw input to its substitute. The all-signals check
// watches the repaired signals; while their state sequence is broken it forces all three outputs
// low. A drive treats the all-low code as forbidden and switches the inverter off, so a wrong
// sequence during the short time before the faulty signal is identified cannot cause a wrong
// commutation. This leave-out lasts at most about 180 el. degrees.
//
// The topology follows the published method. The method calls the leave-out optional; here it
// is always present.
//
// Interface: hall_in/hall_out are {A,B,C}. fault = {fault_a, fault_b, fault_c}. error is the
// leave-out flag. Inputs must be synchronous to clk. Timing: the raw-or-substitute multiplexers
// and the output forcing are combinational, so hall_out follows hall_in in the same cycle when
// nothing is wrong; a flag takes one cycle after the edge that reveals it, and a broken sequence
// on the repaired signals is forced low from the second cycle after it appears. The substitutes
// need one full electrical revolution of healthy rotation before they are valid, so start-up and
// standstill are not covered.
module hall_repair
  import hall_pkg::*;
#(
  parameter int unsigned CNT_W = 24    // generator counter width (clock cycles per 60 el. deg)
) (
  input  logic  clk,
  input  logic  rst,
  input  hall_t hall_in,
  output hall_t hall_out,
  output hall_t repaired,   // signals after substitution, before the leave-out forcing
  output hall_t fault,      // {A, B, C} identified as faulty
  output logic  error       // leave-out: all outputs forced low
);

  logic a, b, c;
  logic gen_a, gen_b, gen_c;
  logic fa, fb, fc;

  assign {a, b, c} = hall_in;

  hall_generate #(.CNT_W(CNT_W)) u_gen_a (.clk, .rst, .x(c), .y(b), .z(gen_a));
  hall_generate #(.CNT_W(CNT_W)) u_gen_b (.clk, .rst, .x(a), .y(c), .z(gen_b));
  hall_generate #(.CNT_W(CNT_W)) u_gen_c (.clk, .rst, .x(b), .y(a), .z(gen_c));

  signal_check u_sig (
    .clk, .rst, .a, .b, .c,
    .fault_a(fa), .fault_b(fb), .fault_c(fc)
  );

  assign fault    = {fa, fb, fc};
  assign repaired = {fa ? gen_a : a,
                     fb ? gen_b : b,
                     fc ? gen_c : c};

  all_signals_check u_all (
    .clk, .rst,
    .a(repaired[2]), .b(repaired[1]), .c(repaired[0]),
    .error
  );

  assign hall_out = error ? 3'b000 : repaired;

endmodule
