// tb_bldc_fpga_top -- end-to-end test of the bench drive at its default sizes.
//
// A behavioural motor produces the hall signals; the fault simulator inside the design places
// the faults. The expected gate commands are derived from the true (fault-free) hall state with
// the testbench's own six-step table. Phases:
//   1. normal mode, healthy sensors: gates follow the true state exactly;
//   2. normal mode, A stuck high: the drive commutates wrongly (shows why the repair is needed);
//   3. switch to safe mode with A still stuck high, then B stuck low, then C stuck high: the
//      faulty sensor is flagged, a leave-out (all switches off) happens, and afterwards the gates
//      follow the true state except within a few cycles of a true edge;
//   4. B stuck low while the motor accelerates (the substitute edge is late by the change of the
//      segment length, so the allowed window after a true edge is widened by that amount);
//   5. periodic short pulses on each signal: after each fault is removed the flags clear and the
//      gates follow the true state again.
// Counts every mechanism (mode switch, flag per signal, leave-out, substitute in use, wrong
// commutation in normal mode, fault during acceleration, pulse repaired) and fails for one that
// never happened.
module tb_bldc_fpga_top;
  import hall_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  int unsigned seg_len = 400;
  hall_t       h_true;
  int unsigned since_edge;
  longint      states;

  logic        safe_mode = 1'b0;
  fault_mode_e fault_mode = FAULT_NONE;
  logic [1:0]  fault_sel = '0;
  logic [23:0] pulse_len = 24'd150, pulse_period = 24'd6000;
  logic [5:0]  gates;
  hall_t       hall_faulty, hall_used, hall_repaired, fault;
  logic        error, pulse_active;

  int checks = 0, failures = 0;
  int n_mode_switch = 0, n_leave = 0, n_wrong_normal = 0, n_subst = 0, n_accel = 0;
  int n_pulse_repaired = 0, n_pulses = 0;
  int n_flag [3] = '{0, 0, 0};

  hall_motor_model motor (.clk, .rst, .seg_len, .hall(h_true), .since_edge, .states);

  bldc_fpga_top dut (
    .clk, .rst,
    .hall_sensor(h_true),
    .safe_mode, .fault_mode, .fault_sel, .pulse_len, .pulse_period,
    .gates, .hall_faulty, .hall_used, .hall_repaired, .fault, .error, .pulse_active
  );

  always #5 clk = ~clk;

  function automatic logic [5:0] table_gates(input hall_t h);
    case (h)                          // {AH, AL, BH, BL, CH, CL}
      3'b010:  return 6'b100100;
      3'b011:  return 6'b100001;
      3'b001:  return 6'b001001;
      3'b101:  return 6'b011000;
      3'b100:  return 6'b010010;
      3'b110:  return 6'b000110;
      default: return 6'b000000;
    endcase
  endfunction

  // ---- monitors --------------------------------------------------------------------------
  bit    follow = 1'b0;         // gates must match the true state away from edges
  bit    count_wrong = 1'b0;
  int    slack = 3;              // cycles after a true edge in which a mismatch is allowed
  logic  error_d = 1'b0, safe_d = 1'b0, pulse_d = 1'b0;
  hall_t fault_d = '0;

  always @(negedge clk) begin
    if (!rst) begin
      if (error && !error_d && safe_mode) n_leave++;
      if (safe_mode != safe_d) n_mode_switch++;
      if (pulse_active && !pulse_d) n_pulses++;
      for (int i = 0; i < 3; i++) if (fault[2 - i] && !fault_d[2 - i]) n_flag[i]++;
      if (safe_mode && fault != 0 && !error && since_edge > 3 && gates == table_gates(h_true))
        n_subst++;
      if (count_wrong && gates != 0 && gates != table_gates(h_true)) n_wrong_normal++;
      if (follow && since_edge > slack) begin
        checks++;
        if (gates !== table_gates(h_true)) begin
          failures++;
          if (failures < 10)
            $display("%0t gates=%b expected %b (true %b used %b fault %b)", $time, gates,
                     table_gates(h_true), h_true, hall_used, fault);
        end
      end
      if (safe_mode && error) begin
        checks++;
        if (gates !== 6'b0) failures++;     // leave-out switches everything off
      end
    end
    error_d = error;
    safe_d  = safe_mode;
    pulse_d = pulse_active;
    fault_d = fault;
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

  task automatic stuck_case(input int sig, input fault_mode_e m);
    follow = 1'b0;
    repeat ($urandom_range(1, 6 * seg_len)) @(negedge clk);
    fault_sel  = 2'(sig);
    fault_mode = m;
    wait_states(8);
    expect_fault(3'b100 >> sig, "stuck");
    follow = 1'b1;
    wait_states(12);
    follow = 1'b0;
    fault_mode = FAULT_NONE;
    wait_states(8);
    expect_fault(3'b000, "recovered");
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // 1. normal mode, healthy
    wait_states(2);
    follow = 1'b1;
    wait_states(12);
    follow = 1'b0;
    // 2. normal mode, A stuck high
    count_wrong = 1'b1;
    fault_sel  = 2'd0;
    fault_mode = FAULT_HIGH;
    wait_states(12);
    count_wrong = 1'b0;
    // 3. safe mode
    safe_mode = 1'b1;
    wait_states(8);
    expect_fault(3'b100, "A stuck high after mode switch");
    follow = 1'b1;
    wait_states(12);
    follow = 1'b0;
    fault_mode = FAULT_NONE;
    wait_states(8);
    stuck_case(1, FAULT_LOW);
    stuck_case(2, FAULT_HIGH);
    stuck_case(0, FAULT_LOW);
    // 4. stuck fault during acceleration
    fault_sel  = 2'd1;
    fault_mode = FAULT_LOW;
    for (int i = 0; i < 60; i++) begin
      wait_states(1);
      seg_len = seg_len - 4;
      if (i == 12) begin
        slack  = 3 + 2 * 4;           // the substitute lags by the last change of the interval
        follow = 1'b1;
      end
    end
    follow = 1'b0;
    slack  = 3;
    checks++;
    if (fault == 3'b010) n_accel++;
    else failures++;
    fault_mode = FAULT_NONE;
    wait_states(8);
    // 5. periodic short pulses
    for (int sig = 0; sig < 3; sig++) begin
      fault_sel  = 2'(sig);
      fault_mode = FAULT_PULSE;
      repeat (4 * 6000) @(negedge clk);
      fault_mode = FAULT_NONE;
      wait_states(8);
      follow = 1'b1;
      wait_states(6);
      follow = 1'b0;
      checks++;
      if (fault == 3'b000) n_pulse_repaired++;
      else failures++;
    end
    // mechanisms
    $display("mode switches %0d, flags A/B/C %0d/%0d/%0d, leave-outs %0d, substitute cycles %0d",
             n_mode_switch, n_flag[0], n_flag[1], n_flag[2], n_leave, n_subst);
    $display("wrong commutations in normal mode %0d, accel %0d, pulses %0d, pulse faults repaired %0d",
             n_wrong_normal, n_accel, n_pulses, n_pulse_repaired);
    checks++;
    if (n_mode_switch == 0 || n_leave == 0 || n_subst == 0 || n_wrong_normal == 0 ||
        n_accel == 0 || n_pulses == 0 || n_pulse_repaired == 0 ||
        n_flag[0] == 0 || n_flag[1] == 0 || n_flag[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
