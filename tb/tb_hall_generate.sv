// tb_hall_generate -- self-checking test of the substitute signal generator.
//
// Drives x = C and y = B of a hall pattern rotating in the positive direction with a segment
// length (clock cycles per 60 el. degrees) that changes every segment, as in acceleration and
// braking. A reference built from the sample indices alone predicts every edge of z: with x
// falling at sample k0 and y rising at sample k1, z must fall at the clock edge 2*k1 - k0 (and
// likewise for the rising half). z is compared with the reference in every cycle once the
// reference has scheduled its first edge. At constant speed the substitute must equal the real
// A delayed by one cycle; that is checked too.
module tb_hall_generate;
  import hall_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x = 1'b0, y = 1'b0, z;
  logic a_true = 1'b0;
  int   checks = 0, failures = 0;

  hall_generate #(.CNT_W(12)) dut (.clk, .rst, .x, .y, .z);

  always #5 clk = ~clk;

  // reference
  longint k = 0;                 // sample index of the current posedge
  longint t_xf = -1, t_xr = -1;
  longint fall_at = -1, rise_at = -1;
  logic   x_p = 1'b0, y_p = 1'b0;
  logic   z_ref = 1'b0, z_known = 1'b0;
  logic   a_d = 1'b0;
  bit     const_speed = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      k <= k + 1;
      if (x_p && !x) t_xf = k;
      if (!x_p && x) t_xr = k;
      if (!y_p && y && t_xf >= 0) fall_at = 2 * k - t_xf;
      if (y_p && !y && t_xr >= 0) rise_at = 2 * k - t_xr;
      if (k == fall_at) begin z_ref = 1'b0; z_known = 1'b1; end
      if (k == rise_at) begin z_ref = 1'b1; z_known = 1'b1; end
    end
    x_p = x;
    y_p = y;
  end

  always @(negedge clk) begin
    if (!rst && z_known) begin
      checks++;
      if (z !== z_ref) begin
        failures++;
        if (failures < 10) $display("mismatch at sample %0d: z=%b expected %b", k, z, z_ref);
      end
      if (const_speed) begin
        checks++;
        if (z !== a_d) failures++;
      end
    end
    a_d <= a_true;
  end

  task automatic spin(input int segs, input int len_min, input int len_max, input bit fixed);
    int unsigned s = 1;
    int len = len_min;
    hall_t h;
    for (int i = 0; i < segs; i++) begin
      h = state_hall(s);
      @(negedge clk);
      a_true = h[2];
      y      = h[1];
      x      = h[0];
      if (!fixed) len = len_min + int'($urandom_range(0, len_max - len_min));
      repeat (len - 1) @(negedge clk);
      s = (s == 6) ? 1 : s + 1;
    end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    spin(60, 20, 200, 1'b0);          // random speed changes
    spin(60, 90, 90, 1'b1);           // steady speed, check z against delayed A
    const_speed = 1'b1;
    spin(60, 90, 90, 1'b1);
    const_speed = 1'b0;
    spin(36, 7, 9, 1'b0);             // fast
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
