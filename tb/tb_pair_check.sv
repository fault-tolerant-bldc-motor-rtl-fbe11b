// tb_pair_check -- self-checking test of the two-signal sequence check.
//
// Drives the pair (x, y) with random moves: forward steps of the sequence 00 -> 10 -> 11 -> 01,
// holds, backward steps and two-state jumps. The reference places each pair value on the circle
// of the forward sequence with a look-up (00:0, 10:1, 11:2, 01:3 as xy) and expects a fault pulse
// exactly in the cycle of a change whose distance around the circle is not one step forward.
module tb_pair_check;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x = 1'b0, y = 1'b0;
  logic fault, change;
  int   checks = 0, failures = 0;
  int   n_fwd = 0, n_bad = 0;

  pair_check dut (.clk, .rst, .x, .y, .fault, .change);

  always #5 clk = ~clk;

  function automatic int pos(input logic xx, input logic yy);
    case ({xx, yy})
      2'b00: return 0;
      2'b10: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  initial begin
    int p, q, step;
    logic exp_fault, exp_change;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    p = pos(x, y);
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 9))
        0, 1, 2:       step = 0;
        3, 4, 5, 6, 7: step = 1;
        8:             step = 2;
        default:       step = 3;
      endcase
      q = (p + step) % 4;
      case (q)
        0: {x, y} = 2'b00;
        1: {x, y} = 2'b10;
        2: {x, y} = 2'b11;
        default: {x, y} = 2'b01;
      endcase
      #1;
      exp_change = (q != p);
      exp_fault  = exp_change && (step != 1);
      if (exp_fault) n_bad++;
      else if (exp_change) n_fwd++;
      checks++;
      if (fault !== exp_fault || change !== exp_change) begin
        failures++;
        if (failures < 10) $display("step %0d from %0d: fault=%b change=%b", step, p, fault, change);
      end
      p = q;
      @(posedge clk);
      #1;
      checks++;                        // the pulse lasts one cycle only
      if (fault !== 1'b0) failures++;
    end
    if (n_fwd == 0 || n_bad == 0) failures++;
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
