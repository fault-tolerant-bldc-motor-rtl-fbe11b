// tb_workload_bench -- the bench experiments at real time scales, top at its default sizes.
//
// Clock 100 MHz: every time below is counted in clock cycles of 10 ns. Motor: 4 pole pairs; at
// n rpm one 60 el. degree hall state lasts 2.5e8 / n cycles (3102 rpm nominal: 80,593 cycles;
// 3700 rpm no load: 67,568 cycles). Safe mode throughout. Runs:
//   1. permanent high fault on A from 55 ms at nominal speed, held for 100 ms: A must be flagged
//      within one electrical revolution plus one state, the gates must then follow the true
//      state (outside a few cycles after each edge), and leave-outs must last under 180 degrees;
//   2. pulses of 3 ms every 40 ms on A at nominal speed for 120 ms: after the last pulse the flags
//      must clear and the gates follow the true state again;
//   3. permanent low fault on B while the motor accelerates from 1000 rpm to 3700 rpm (segment
//      length 1 % shorter every state): B stays flagged and the gates follow the true state
//      outside a window of 2 % of a state after each edge.
// Prints the detection time, number of leave-outs and their longest duration.
module tb_workload_bench;
  import hall_pkg::*;

  localparam int unsigned NOMINAL = 80593;    // cycles per 60 el. degrees at 3102 rpm
  localparam int unsigned NO_LOAD = 67568;    // cycles per 60 el. degrees at 3700 rpm
  localparam int unsigned SLOW    = 250000;   // cycles per 60 el. degrees at 1000 rpm

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  int unsigned seg_len = NOMINAL;
  hall_t       h_true;
  int unsigned since_edge;
  longint      states;
  longint      cyc = 0;

  logic        safe_mode = 1'b1;
  fault_mode_e fault_mode = FAULT_NONE;
  logic [1:0]  fault_sel = '0;
  logic [23:0] pulse_len = 24'd300_000, pulse_period = 24'd4_000_000;   // 3 ms, 40 ms
  logic [5:0]  gates;
  hall_t       hall_faulty, hall_used, hall_repaired, fault;
  logic        error, pulse_active;

  int checks = 0, failures = 0;
  int n_leave = 0, max_leave = 0, leave_len = 0, n_pulses = 0;
  int slack = 3;
  bit follow = 1'b0;
  logic error_d = 1'b0, pulse_d = 1'b0;

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

  always @(negedge clk) begin
    cyc++;
    if (!rst) begin
      if (error && !error_d) n_leave++;
      if (pulse_active && !pulse_d) n_pulses++;
      leave_len = error ? leave_len + 1 : 0;
      if (leave_len > max_leave) max_leave = leave_len;
      if (follow && since_edge > slack) begin
        checks++;
        if (gates !== table_gates(h_true)) begin
          failures++;
          if (failures < 10) $display("%0d us: gates=%b expected %b", cyc / 100, gates, table_gates(h_true));
        end
      end
    end
    error_d = error;
    pulse_d = pulse_active;
  end

  task automatic wait_states(input int n);
    longint target = states + longint'(n);
    while (states < target) @(negedge clk);
  endtask

  task automatic wait_cycles(input longint n);
    longint target = cyc + n;
    while (cyc < target) @(negedge clk);
  endtask

  initial begin
    longint t0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // 1. permanent high fault on A at 55 ms
    wait_cycles(5_500_000 - 4);
    fault_sel  = 2'd0;
    fault_mode = FAULT_HIGH;
    t0 = cyc;
    while (fault != 3'b100 && cyc - t0 < 7 * NOMINAL) @(negedge clk);
    checks++;
    if (fault != 3'b100) failures++;
    $display("stuck-high A at 55 ms: flagged after %0d us (%0d leave-outs so far, longest %0d us)",
             (cyc - t0) / 100, n_leave, max_leave / 100);
    wait_states(2);
    follow = 1'b1;
    wait_cycles(10_000_000 - (cyc - t0));
    follow = 1'b0;
    checks++;
    if (max_leave > 3 * NOMINAL) failures++;
    fault_mode = FAULT_NONE;
    wait_states(8);
    checks++;
    if (fault != 3'b000) failures++;
    // 2. 3 ms pulses every 40 ms
    fault_mode = FAULT_PULSE;
    wait_cycles(12_000_000);
    fault_mode = FAULT_NONE;
    wait_states(8);
    checks++;
    if (fault != 3'b000 || n_pulses != 3) failures++;
    follow = 1'b1;
    wait_states(6);
    follow = 1'b0;
    $display("pulses: %0d applied, leave-outs so far %0d", n_pulses, n_leave);
    // 3. permanent low fault on B during acceleration 1000 -> 3700 rpm
    seg_len = SLOW;
    wait_states(12);
    fault_sel  = 2'd1;
    fault_mode = FAULT_LOW;
    wait_states(8);
    slack = 3 + seg_len / 50;
    follow = 1'b1;
    while (seg_len > NO_LOAD) begin
      wait_states(1);
      seg_len = seg_len - seg_len / 100;
      slack   = 3 + seg_len / 50;
    end
    follow = 1'b0;
    checks++;
    if (fault != 3'b010) failures++;
    $display("acceleration to 3700 rpm with B stuck low done at %0d ms; leave-outs %0d, longest %0d us",
             cyc / 100_000, n_leave, max_leave / 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
