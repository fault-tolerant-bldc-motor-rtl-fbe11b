// signal_check -- identifies which one of the three hall signals is faulty.
//
// Three pair checks watch the pairs AB, BC and CA (in each pair the first signal leads the
// second by 120 el. degrees in the positive direction). A single faulty signal upsets the two
// pairs it belongs to and never the third, so the faulty signal is the one common to two
// reporting pairs: fault_a = AB and CA, fault_b = AB and BC, fault_c = BC and CA.
//
// The pair indicators are one-cycle pulses. A stuck signal makes its two pairs report at
// different edges (for a stuck A, pair AB reports at an edge of B and pair CA at an edge of C),
// so each pair indicator is kept in a register until the pair changes again, and the two kept
// indicators are ANDed. The per-signal fault register is set as soon as that AND is true and is
// rewritten only at an edge of the signal itself: a stuck signal stays flagged for as long as it
// shows no edge, and a signal that recovers is cleared at its first edge that both of its pairs
// accept. Which registers hold what, and the set/refresh rule of the per-signal register, are
// choices of this design; the published method states only that pair indicators are ANDed and
// that the result is kept in registers until a new edge occurs.
//
// Timing: all outputs are registered. A detection in cycle t shows on fault_x from cycle t+1.
// Synchronous active-high reset clears every indicator.
module signal_check (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic fault_a,
  output logic fault_b,
  output logic fault_c
);

  logic f_ab, f_bc, f_ca;          // pair fault pulses
  logic ch_ab, ch_bc, ch_ca;       // pair change strobes
  logic k_ab, k_bc, k_ca;          // kept pair indicators
  logic n_ab, n_bc, n_ca;          // kept indicators including this cycle's change
  logic a_d, b_d, c_d;
  logic set_a, set_b, set_c;

  pair_check u_ab (.clk, .rst, .x(a), .y(b), .fault(f_ab), .change(ch_ab));
  pair_check u_bc (.clk, .rst, .x(b), .y(c), .fault(f_bc), .change(ch_bc));
  pair_check u_ca (.clk, .rst, .x(c), .y(a), .fault(f_ca), .change(ch_ca));

  assign n_ab = ch_ab ? f_ab : k_ab;
  assign n_bc = ch_bc ? f_bc : k_bc;
  assign n_ca = ch_ca ? f_ca : k_ca;

  assign set_a = n_ab & n_ca;
  assign set_b = n_ab & n_bc;
  assign set_c = n_bc & n_ca;

  always_ff @(posedge clk) begin
    a_d <= a;
    b_d <= b;
    c_d <= c;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {k_ab, k_bc, k_ca}          <= '0;
      {fault_a, fault_b, fault_c} <= '0;
    end else begin
      k_ab <= n_ab;
      k_bc <= n_bc;
      k_ca <= n_ca;
      if (set_a || (a != a_d)) fault_a <= set_a;
      if (set_b || (b != b_d)) fault_b <= set_b;
      if (set_c || (c != c_d)) fault_c <= set_c;
    end
  end

  // A flag is released only at an edge of its own signal.
  a_release_a: assert property (@(posedge clk) disable iff (rst) $fell(fault_a) |-> $past(a != a_d));
  a_release_b: assert property (@(posedge clk) disable iff (rst) $fell(fault_b) |-> $past(b != b_d));
  a_release_c: assert property (@(posedge clk) disable iff (rst) $fell(fault_c) |-> $past(c != c_d));

endmodule
