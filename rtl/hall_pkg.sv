// hall_pkg -- constants and types shared by the hall-sensor check and repair logic.
//
// Hall states follow the six-state table of one electrical revolution (state 1 = A0 B1 C0,
// 60 el. degrees per state, states counting up in the positive direction of rotation). The
// state look-up used by the all-signals check lives here as a function so that the checker and
// the testbenches use one table. The two codes that never occur on healthy sensors (000 and 111)
// map to 8, a value chosen in this design: every move from a valid state into them lies outside
// the accepted range of the all-signals check (8 - s is 2..7). No 4-bit value can also reject
// every move out of them; with 8 the one accepted exit is to state 3 (3 - 8 = 11 modulo 16). The accepted differences (below 2, or equal to 11 for
// the 6 -> 1 wrap in 4-bit arithmetic) are the checker's constants.
package hall_pkg;

  localparam int unsigned STATE_W = 4;                       // width of a state number
  localparam logic [STATE_W-1:0] STATE_INVALID = 4'd8;       // code for 000 / 111
  localparam logic [STATE_W-1:0] DIFF_LIMIT    = 4'd2;       // difference accepted if below
  localparam logic [STATE_W-1:0] DIFF_WRAP     = 4'd11;      // 1 - 6 modulo 16

  // Hall bits packed as {A, B, C}.
  typedef logic [2:0] hall_t;

  // Fault kinds that the fault simulator can place on one hall signal.
  typedef enum logic [1:0] {
    FAULT_NONE  = 2'd0,
    FAULT_LOW   = 2'd1,   // signal held permanently low
    FAULT_HIGH  = 2'd2,   // signal held permanently high
    FAULT_PULSE = 2'd3    // periodic short pulses (signal inverted during the pulse)
  } fault_mode_e;

  // State number of a hall code {A,B,C}.
  function automatic logic [STATE_W-1:0] hall_state(input hall_t h);
    case (h)
      3'b010:  return 4'd1;
      3'b011:  return 4'd2;
      3'b001:  return 4'd3;
      3'b101:  return 4'd4;
      3'b100:  return 4'd5;
      3'b110:  return 4'd6;
      default: return STATE_INVALID;
    endcase
  endfunction

  // Hall code {A,B,C} of state 1..6 (used by stimulus and the commutation table tests).
  function automatic hall_t state_hall(input int unsigned s);
    case (s)
      1:       return 3'b010;
      2:       return 3'b011;
      3:       return 3'b001;
      4:       return 3'b101;
      5:       return 3'b100;
      6:       return 3'b110;
      default: return 3'b000;
    endcase
  endfunction

endpackage
