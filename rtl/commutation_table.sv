// commutation_table -- six-step commutation: one pair of inverter switches per hall state.
//
// The drive used with the check and repair logic is a plain look-up table that assigns
// transistor commands to every combination of hall signals. In each of the six valid states one
// high-side switch and one low-side switch of different phases conduct; the codes 000 and 111
// switch every transistor off, which is what makes the all-low leave-out of the repair logic a
// safe pause. The pairing of hall states with phase pairs (state 1: A+ B-, 2: A+ C-, 3: B+ C-,
// 4: B+ A-, 5: C+ A-, 6: C+ B-) is this design's choice; the right alignment depends on how the
// sensors are mounted in a given motor.
//
// Interface: gates = {AH, AL, BH, BL, CH, CL}, active high. Purely combinational.
module commutation_table
  import hall_pkg::*;
(
  input  hall_t      hall,
  output logic [5:0] gates
);

  always_comb begin
    unique case (hall_state(hall))
      4'd1:    gates = 6'b10_01_00;   // A+ B-
      4'd2:    gates = 6'b10_00_01;   // A+ C-
      4'd3:    gates = 6'b00_10_01;   // B+ C-
      4'd4:    gates = 6'b01_10_00;   // B+ A-
      4'd5:    gates = 6'b01_00_10;   // C+ A-
      4'd6:    gates = 6'b00_01_10;   // C+ B-
      default: gates = 6'b00_00_00;   // all off
    endcase
  end

endmodule
