// hall_motor_model -- behavioural model of the three hall sensors of a rotating BLDC motor.
//
// Not synthesizable logic of the design: a stimulus source for the testbenches. The rotor
// advances one 60 el. degree hall state every seg_len clock cycles in the positive direction
// (state 1 = A0 B1 C0, then 011, 001, 101, 100, 110). seg_len is sampled at every state change,
// so a testbench accelerates the motor by lowering it. since_edge counts the cycles since the
// last state change; states counts state changes.
module hall_motor_model
  import hall_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  int unsigned seg_len,
  output hall_t       hall,
  output int unsigned since_edge,
  output longint      states
);

  int unsigned s;
  int unsigned left;

  always_ff @(posedge clk) begin
    if (rst) begin
      s          <= 1;
      left       <= seg_len;
      since_edge <= 0;
      states     <= 0;
    end else if (left <= 1) begin
      s          <= (s == 6) ? 1 : s + 1;
      left       <= seg_len;
      since_edge <= 0;
      states     <= states + 1;
    end else begin
      left       <= left - 1;
      since_edge <= since_edge + 1;
    end
  end

  assign hall = state_hall(s);

endmodule
