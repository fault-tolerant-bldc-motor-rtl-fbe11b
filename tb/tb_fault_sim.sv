// tb_fault_sim -- self-checking test of the fault simulator.
//
// Random hall codes pass through while each mode is applied to each signal in turn. The
// reference computes the expected output from the mode and from its own pulse clock: the pulse
// covers the first pulse_len cycles of every pulse_period cycles, counted from the first cycle
// after the mode or selection last changed.
module tb_fault_sim;
  import hall_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  hall_t       h_in = '0, h_out;
  fault_mode_e mode = FAULT_NONE;
  logic [1:0]  sel = '0;
  logic [11:0] pulse_len = 12'd7, pulse_period = 12'd40;
  logic        pulse_active;
  int          checks = 0, failures = 0, n_pulses = 0;

  fault_sim #(.TIME_W(12)) dut (.clk, .rst, .hall_in(h_in), .mode, .sel, .pulse_len, .pulse_period,
                                .hall_out(h_out), .pulse_active);

  always #5 clk = ~clk;

  initial begin
    hall_t m, want;
    int    t;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int md = 0; md < 4; md++) begin
      for (int sg = 0; sg < 3; sg++) begin
        mode = fault_mode_e'(md);
        sel  = 2'(sg);
        m    = 3'b100 >> sg;
        t    = -1;                              // first cycle: timer restarts
        for (int i = 0; i < 300; i++) begin
          h_in = 3'($urandom_range(0, 7));
          #1;
          case (mode)
            FAULT_NONE:  want = h_in;
            FAULT_LOW:   want = h_in & ~m;
            FAULT_HIGH:  want = h_in | m;
            default:     want = (t >= 0 && (t % 40) < 7) ? (h_in ^ m) : h_in;
          endcase
          checks++;
          if (h_out !== want) begin
            failures++;
            if (failures < 10) $display("mode %0d sel %0d cycle %0d: out=%b want=%b", md, sg, i, h_out, want);
          end
          if (mode == FAULT_PULSE && t >= 0 && (t % 40) == 0) n_pulses++;
          t++;
          @(negedge clk);
        end
      end
    end
    checks++;
    if (n_pulses < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
