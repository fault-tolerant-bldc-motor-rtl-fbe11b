// tb_all_signals_check -- self-checking test of the three-signal sequence check.
//
// Drives random hall codes, mostly forward steps of the six-state sequence but also holds,
// backward steps, jumps and the two unused codes. The reference judges each change by the
// state order (a change is good when it goes one state forward, or between the two unused
// codes, or from an unused code to state 3, the one exit the state numbering lets through) and expects the error flag to take that verdict two cycles after the change is applied
// and to keep it until the next change.
module tb_all_signals_check;
  import hall_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  hall_t h = 3'b010;
  logic  error;
  int    checks = 0, failures = 0;
  int    n_err = 0, n_ok = 0;
  logic  expected = 1'b0;

  all_signals_check dut (.clk, .rst, .a(h[2]), .b(h[1]), .c(h[0]), .error);

  always #5 clk = ~clk;

  function automatic int idx(input hall_t v);     // 0..5 along the forward order, -1 unused
    for (int i = 1; i <= 6; i++) if (state_hall(i) == v) return i - 1;
    return -1;
  endfunction

  initial begin
    hall_t nxt;
    int    p, q;
    logic  verdict;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      p = idx(h);
      case ($urandom_range(0, 9))
        0, 1, 2, 3, 4: nxt = (p < 0) ? state_hall(1) : state_hall((p + 1) % 6 + 1);
        5:             nxt = h;
        6:             nxt = (p < 0) ? state_hall(3) : state_hall((p + 5) % 6 + 1);
        7:             nxt = 3'($urandom_range(0, 7));
        default:       nxt = ($urandom_range(0, 1) != 0) ? 3'b000 : 3'b111;
      endcase
      q = idx(nxt);
      if (nxt != h) begin
        verdict  = !(((p >= 0) && (q == (p + 1) % 6)) || ((p < 0) && (q < 0)) || ((p < 0) && (q == 2)));
        if (verdict) n_err++; else n_ok++;
      end else verdict = expected;
      h = nxt;                              // applied after this negedge: sample t
      @(negedge clk);                       // after posedge t
      checks++;
      if (error !== expected) failures++;   // not yet updated
      @(negedge clk);                       // after posedge t+1
      expected = verdict;
      checks++;
      if (error !== expected) begin
        failures++;
        if (failures < 10) $display("change %0d -> %b: error=%b expected %b", p, nxt, error, expected);
      end
    end
    checks++;
    if (n_err == 0 || n_ok == 0) failures++;
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
