// tb_hall_repair -- self-checking test of the complete hall check and repair block.
//
// A behavioural motor drives the hall inputs; faults are placed on them by the testbench.
// Checks, cycle by cycle:
//   * healthy rotation: output equals input, no flag, no leave-out;
//   * each signal stuck low and stuck high: the right signal is flagged and stays flagged, no
//     other is; once flagged, the output follows the true sensor pattern except within a few
//     cycles of a true edge (the substitute is one cycle late at constant speed); every leave-out
//     (all outputs low) lasts no more than 180 el. degrees; the output never shows a code that
//     would commutate wrongly (a state other than all-low, the true one, the one before it or the
//     one after it) for more than the two cycles the all-signals check needs to react; the
//     next state is allowed because a pulse that turns the true code into the next code is a
//     legal forward step that no sequence check can tell from rotation;
//   * a stuck fault during acceleration;
//   * short pulses: flags clear again after the pulse, and the output returns to the input.
// Counts how often a flag rose and how often a leave-out happened, and fails if either never did.
module tb_hall_repair;
  import hall_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  int unsigned seg_len = 60;
  hall_t       h_true, h_in, h_out, repaired, fault;
  logic        error;
  int unsigned since_edge;
  longint      states;
  int          checks = 0, failures = 0;
  int          n_flag = 0, n_leave = 0, n_pulse_cleared = 0;

  // fault placement
  int   stuck_sel = -1;
  logic stuck_val = 1'b0;
  int   pulse_sel = -1;

  always_comb begin
    h_in = h_true;
    if (stuck_sel >= 0) h_in[2 - stuck_sel] = stuck_val;
    if (pulse_sel >= 0) h_in[2 - pulse_sel] = ~h_true[2 - pulse_sel];
  end

  hall_motor_model motor (.clk, .rst, .seg_len, .hall(h_true), .since_edge, .states);

  hall_repair #(.CNT_W(16)) dut (.clk, .rst, .hall_in(h_in), .hall_out(h_out), .repaired,
                                 .fault, .error);

  always #5 clk = ~clk;

  // ---- monitors --------------------------------------------------------------------------
  logic  error_d = 1'b0;
  hall_t fault_d = '0;
  int    leave_len = 0;
  bit    check_follow = 1'b0;    // output must follow the true pattern
  bit    check_safe = 1'b0;      // output may only show the true state or the previous one
  hall_t h_prev_state = 3'b110;
  hall_t h_true_d = 3'b010;
  int    unsafe_run = 0;

  always @(negedge clk) begin
    if (h_true != h_true_d) h_prev_state = h_true_d;
    if (!rst) begin
      if (error && !error_d) n_leave++;
      if ((fault & ~fault_d) != 0) n_flag++;
      leave_len = error ? leave_len + 1 : 0;
      if (error) begin
        checks++;
        if (h_out !== 3'b000) failures++;
        if (leave_len > 3 * seg_len + 4) begin
          failures++;
          if (leave_len == 3 * seg_len + 5) $display("leave-out longer than 180 deg at %0t", $time);
        end
      end
      if (check_follow && since_edge > 3) begin
        checks++;
        if (h_out !== h_true) begin
          failures++;
          if (failures < 10) $display("%0t follow: out=%b true=%b fault=%b", $time, h_out, h_true, fault);
        end
      end
      if (check_safe) begin
        unsafe_run = (h_out !== h_true && h_out !== h_prev_state && h_out !== 3'b000 &&
                      h_out !== state_hall(int'(hall_state(h_true)) % 6 + 1))
                     ? unsafe_run + 1 : 0;
        checks++;
        if (unsafe_run > 2) begin
          failures++;
          if (failures < 10) $display("%0t unsafe: out=%b true=%b prev=%b", $time, h_out, h_true, h_prev_state);
        end
      end
    end
    h_true_d = h_true;
    error_d  = error;
    fault_d  = fault;
  end

  task automatic wait_states(input int n);
    longint target = states + longint'(n);
    while (states < target) @(negedge clk);
  endtask

  task automatic expect_fault(input hall_t want, input string what);
    checks++;
    if (fault !== want) begin
      failures++;
      $display("%s: fault=%b expected %b", what, fault, want);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    wait_states(12);                        // substitutes become valid
    check_follow = 1'b1;
    wait_states(12);
    checks++;
    if (n_leave != 0 || n_flag != 0) failures++;
    // stuck faults at constant speed
    for (int sig = 0; sig < 3; sig++) begin
      for (int v = 0; v < 2; v++) begin
        check_follow = 1'b0;
        check_safe   = 1'b1;
        repeat ($urandom_range(1, 5 * seg_len)) @(negedge clk);
        stuck_sel = sig;
        stuck_val = v[0];
        wait_states(8);
        expect_fault(3'b100 >> sig, "stuck");
        check_follow = 1'b1;
        wait_states(12);
        expect_fault(3'b100 >> sig, "stuck held");
        check_follow = 1'b0;
        stuck_sel = -1;
        wait_states(8);
        expect_fault(3'b000, "recovered");
      end
    end
    // stuck fault during acceleration: segment length falls by 1 per state
    stuck_sel = 1;
    stuck_val = 1'b0;
    for (int i = 0; i < 30; i++) begin
      wait_states(1);
      seg_len = seg_len - 1;
      if (i == 10) check_follow = 1'b0;
    end
    expect_fault(3'b010, "stuck during acceleration");
    stuck_sel = -1;
    check_follow = 1'b0;
    wait_states(8);
    // short pulses on each signal at random places
    for (int i = 0; i < 12; i++) begin
      repeat ($urandom_range(1, 6 * seg_len)) @(negedge clk);
      pulse_sel = i % 3;
      repeat ($urandom_range(2, seg_len / 3)) @(negedge clk);
      pulse_sel = -1;
      wait_states(7);
      checks++;
      if (fault == 3'b000 && h_out == h_true) n_pulse_cleared++;
      else failures++;
    end
    check_safe = 1'b0;
    checks++;
    if (n_flag == 0 || n_leave == 0) failures++;
    $display("flags raised %0d, leave-outs %0d, pulses cleared %0d", n_flag, n_leave, n_pulse_cleared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
