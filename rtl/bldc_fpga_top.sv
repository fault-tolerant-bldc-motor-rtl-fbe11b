// bldc_fpga_top -- bench drive with hall sensor fault tolerance.
//
// Chain: hall sensors -> fault simulator -> (safe mode) hall check and repair -> commutation
// table -> inverter gate commands. In normal mode (safe_mode = 0) the possibly faulted hall
// signals drive the commutation table directly; in safe mode they pass through the check and
// repair logic first, which flags the faulty sensor, substitutes a generated signal for it and
// forces the all-off code while the sequence is broken. The repair logic runs in both modes, so
// its substitutes are ready when safe mode is switched on. The chain and the two modes follow the
// bench setup of the published method; running the repair logic in both modes is a choice of
// this design.
//
// Interface: hall_sensor = {A,B,C}, synchronous to clk. Fault controls as in fault_sim. Outputs:
// gates = {AH, AL, BH, BL, CH, CL}; hall_used is the code given to the commutation table;
// hall_repaired is the repair logic's output before the all-low forcing; fault
// and error are the repair logic's flags. Timing: combinational from hall_sensor to gates apart
// from the registered flags of the repair logic. Synchronous active-high reset.
module bldc_fpga_top
  import hall_pkg::*;
#(
  parameter int unsigned CNT_W  = 24,   // generator counter width
  parameter int unsigned TIME_W = 24    // fault simulator timer width
) (
  input  logic              clk,
  input  logic              rst,
  input  hall_t             hall_sensor,
  input  logic              safe_mode,
  input  fault_mode_e       fault_mode,
  input  logic [1:0]        fault_sel,
  input  logic [TIME_W-1:0] pulse_len,
  input  logic [TIME_W-1:0] pulse_period,
  output logic [5:0]        gates,
  output hall_t             hall_faulty,
  output hall_t             hall_used,
  output hall_t             hall_repaired,
  output hall_t             fault,
  output logic              error,
  output logic              pulse_active
);

  hall_t repaired_out;

  fault_sim #(.TIME_W(TIME_W)) u_fault (
    .clk, .rst,
    .hall_in(hall_sensor),
    .mode(fault_mode),
    .sel(fault_sel),
    .pulse_len, .pulse_period,
    .hall_out(hall_faulty),
    .pulse_active
  );

  hall_repair #(.CNT_W(CNT_W)) u_repair (
    .clk, .rst,
    .hall_in(hall_faulty),
    .hall_out(repaired_out),
    .repaired(hall_repaired),
    .fault,
    .error
  );

  assign hall_used = safe_mode ? repaired_out : hall_faulty;

  commutation_table u_comm (.hall(hall_used), .gates);

endmodule
