// tb_signal_check -- self-checking test of faulty-signal identification.
//
// A hall pattern rotates in the positive direction with random segment lengths. Scenarios:
// healthy rotation (no flag may ever rise), each signal stuck low and stuck high in turn (that
// signal's flag must rise within seven 60-degree segments (the pair of edges that reveals a
// stuck signal comes once per revolution), stay up while the fault lasts, and
// no other flag may rise), and recovery (after the fault is removed every flag must be down
// within one revolution and stay down).
module tb_signal_check;
  import hall_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  hall_t h_true = 3'b010, h_in;
  int    stuck_sel = -1;          // -1: none, 0..2: A, B, C
  logic  stuck_val = 1'b0;
  logic  fa, fb, fc;
  int    checks = 0, failures = 0;
  int    detections = 0;

  always_comb begin
    h_in = h_true;
    if (stuck_sel >= 0) h_in[2 - stuck_sel] = stuck_val;
  end

  signal_check dut (.clk, .rst, .a(h_in[2]), .b(h_in[1]), .c(h_in[0]),
                    .fault_a(fa), .fault_b(fb), .fault_c(fc));

  always #5 clk = ~clk;

  int unsigned s = 1;

  // one 60 el. degree segment; returns the flags seen at its end
  task automatic segment(output hall_t flags);
    int len = int'($urandom_range(30, 80));
    @(negedge clk);
    h_true = state_hall(s);
    s = (s == 6) ? 1 : s + 1;
    repeat (len - 1) @(negedge clk);
    flags = {fa, fb, fc};
  endtask

  task automatic expect_flags(input hall_t flags, input hall_t want, input string what);
    checks++;
    if (flags !== want) begin
      failures++;
      if (failures < 10) $display("%s: flags=%b expected %b", what, flags, want);
    end
  endtask

  initial begin
    hall_t f, want;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 24; i++) begin
      segment(f);
      expect_flags(f, 3'b000, "healthy");
    end
    for (int sig = 0; sig < 3; sig++) begin
      for (int v = 0; v < 2; v++) begin
        repeat ($urandom_range(0, 5)) segment(f);
        stuck_sel = sig;
        stuck_val = v[0];
        want = 3'b100 >> sig;
        for (int i = 0; i < 7; i++) begin            // detection within seven segments
          segment(f);
          checks++;
          if ((f & ~want) != 3'b000) failures++;     // never the wrong signal
        end
        if (f == want) detections++;
        else $display("signal %0d stuck at %0d not flagged: %b", sig, v, f);
        for (int i = 0; i < 18; i++) begin
          segment(f);
          expect_flags(f, want, "stuck");
        end
        stuck_sel = -1;
        for (int i = 0; i < 6; i++) segment(f);
        for (int i = 0; i < 12; i++) begin
          segment(f);
          expect_flags(f, 3'b000, "recovered");
        end
      end
    end
    checks++;
    if (detections != 6) failures++;
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
