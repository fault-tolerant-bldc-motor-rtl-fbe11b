// tb_commutation_table -- self-checking test of the six-step commutation table.
//
// For every hall code the reference derives the conducting phases from the state number
// (state k drives the pair listed in the design's table) and checks: exactly one high-side and
// one low-side switch on for a valid code, never both switches of one leg, all off for 000 and
// 111, and consecutive states sharing one switch (each step moves one phase).
module tb_commutation_table;
  import hall_pkg::*;

  hall_t      hall;
  logic [5:0] gates;
  int         checks = 0, failures = 0;

  commutation_table dut (.hall, .gates);

  // expected {high phase, low phase} of state k, phases 0 = A, 1 = B, 2 = C
  function automatic logic [5:0] expect_gates(input int k);
    int hi_ph [6] = '{0, 0, 1, 1, 2, 2};
    int lo_ph [6] = '{1, 2, 2, 0, 0, 1};
    logic [5:0] g = '0;
    if (k < 1 || k > 6) return g;
    g[5 - 2 * hi_ph[k-1]]     = 1'b1;
    g[5 - 2 * lo_ph[k-1] - 1] = 1'b1;
    return g;
  endfunction

  initial begin
    logic [5:0] prev;
    for (int code = 0; code < 8; code++) begin
      int k;
      k = 0;
      hall = 3'(code);
      for (int s = 1; s <= 6; s++) if (state_hall(s) == hall) k = s;
      #1;
      checks++;
      if (gates !== expect_gates(k)) begin
        failures++;
        $display("hall %b: gates=%b expected %b", hall, gates, expect_gates(k));
      end
      for (int leg = 0; leg < 3; leg++) begin
        checks++;
        if (gates[5 - 2 * leg] && gates[4 - 2 * leg]) failures++;
      end
      checks++;
      if ((k == 0) ? (gates != 0) : ($countones(gates) != 2)) failures++;
    end
    hall = state_hall(6);
    #1 prev = gates;
    for (int s = 1; s <= 6; s++) begin
      hall = state_hall(s);
      #1;
      checks++;
      if ($countones(gates & prev) != 1) failures++;
      prev = gates;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
