// fault_sim -- places a test fault on one of the three hall signals.
//
// Used on the bench to exercise the check and repair logic. The selected signal (sel: 0 = A,
// 1 = B, 2 = C) is held low, held high, or inverted for pulse_len clock cycles at the start of
// every period of pulse_period cycles; the other two pass unchanged, as does everything when mode
// is FAULT_NONE. Pulse length and period are run-time inputs (the bench used 3 ms pulses every
// 40 ms). Inverting the signal during a pulse, the encoding of the controls and the pulse timer
// that restarts when the mode or selection changes are choices of this design.
//
// Timing: the output is combinational from hall_in and the registered pulse timer; the first
// pulse starts in the first cycle after the timer restarts.
module fault_sim
  import hall_pkg::*;
#(
  parameter int unsigned TIME_W = 24   // width of the pulse timer (clock cycles)
) (
  input  logic              clk,
  input  logic              rst,
  input  hall_t             hall_in,
  input  fault_mode_e       mode,
  input  logic [1:0]        sel,
  input  logic [TIME_W-1:0] pulse_len,
  input  logic [TIME_W-1:0] pulse_period,
  output hall_t             hall_out,
  output logic              pulse_active
);

  logic [TIME_W-1:0] tmr;
  fault_mode_e       mode_d;
  logic [1:0]        sel_d;
  logic              restart;
  hall_t             mask;

  assign restart = (mode != mode_d) || (sel != sel_d);

  always_ff @(posedge clk) begin
    if (rst) begin
      tmr    <= '0;
      mode_d <= FAULT_NONE;
      sel_d  <= '0;
    end else begin
      mode_d <= mode;
      sel_d  <= sel;
      if (restart || (tmr + 1'b1 >= pulse_period)) tmr <= '0;
      else                                         tmr <= tmr + 1'b1;
    end
  end

  assign pulse_active = (mode == FAULT_PULSE) && !restart && (tmr < pulse_len);

  always_comb begin
    mask = 3'b000;
    unique case (sel)
      2'd0:    mask = 3'b100;
      2'd1:    mask = 3'b010;
      2'd2:    mask = 3'b001;
      default: mask = 3'b000;
    endcase
    hall_out = hall_in;
    unique case (mode)
      FAULT_NONE:  hall_out = hall_in;
      FAULT_LOW:   hall_out = hall_in & ~mask;
      FAULT_HIGH:  hall_out = hall_in | mask;
      FAULT_PULSE: hall_out = pulse_active ? (hall_in ^ mask) : hall_in;
    endcase
  end

endmodule
