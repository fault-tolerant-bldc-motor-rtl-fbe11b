// hall_generate -- builds a substitute hall signal z from the edges of two fine signals x and y.
//
// In the positive direction of rotation the edges of three hall signals follow each other
// 60 el. degrees apart: x falls, y rises, z falls; later x rises, y falls, z rises. The block
// measures the most recent x-to-y edge interval in clock cycles and lays the same interval
// after the y edge to place the matching z edge. No averaging is done, so the substitute follows
// acceleration with one interval of delay.
//
// Structure (two identical halves):
//   low half : x falling edge restarts cnt_xf; y rising edge stores cnt_xf into len_lo and
//              restarts cnt_yr; when cnt_yr equals len_lo, z is cleared.
//   high half: x rising edge restarts cnt_xr; y falling edge stores cnt_xr into len_hi and
//              restarts cnt_yf; when cnt_yf equals len_hi, z is set.
// The z register is written when either comparison matches, with the inverted low-half match as
// data, so a simultaneous match clears z.
//
// Timing: inputs are sampled on clk and must be synchronous to it. An edge seen in cycle t0 on x
// and in cycle t1 on y makes z change at the clock edge that ends cycle t1 + (t1 - t0), i.e. z is
// visible from cycle t1 + (t1 - t0) + 1.
//
// The structure follows the published method. Choices of this design: the counter width CNT_W,
// counters that saturate rather than wrap (a saturated counter means "no edge for a very long
// time"), and a synchronous, active-high reset that leaves the counters saturated, the stored lengths at zero and z low.
module hall_generate #(
  parameter int unsigned CNT_W = 24
) (
  input  logic clk,
  input  logic rst,
  input  logic x,       // signal whose edge leads by 60 el. degrees
  input  logic y,       // signal whose edge sits between the x edge and the generated edge
  output logic z        // generated substitute signal
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic x_d, y_d;
  logic x_fall, x_rise, y_fall, y_rise;
  logic [CNT_W-1:0] cnt_xf, cnt_yr, len_lo;   // low half
  logic [CNT_W-1:0] cnt_xr, cnt_yf, len_hi;   // high half
  logic eq_lo, eq_hi;

  always_ff @(posedge clk) begin
    x_d <= x;
    y_d <= y;
  end

  assign x_fall = x_d & ~x;
  assign x_rise = ~x_d & x;
  assign y_fall = y_d & ~y;
  assign y_rise = ~y_d & y;

  function automatic logic [CNT_W-1:0] step(input logic [CNT_W-1:0] c);
    return (c == CNT_MAX) ? c : c + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_xf <= CNT_MAX;
      cnt_yr <= CNT_MAX;
      cnt_xr <= CNT_MAX;
      cnt_yf <= CNT_MAX;
      len_lo <= '0;
      len_hi <= '0;
    end else begin
      cnt_xf <= x_fall ? '0 : step(cnt_xf);
      cnt_yr <= y_rise ? '0 : step(cnt_yr);
      cnt_xr <= x_rise ? '0 : step(cnt_xr);
      cnt_yf <= y_fall ? '0 : step(cnt_yf);
      if (y_rise) len_lo <= cnt_xf;
      if (y_fall) len_hi <= cnt_xr;
    end
  end

  assign eq_lo = (cnt_yr == len_lo);
  assign eq_hi = (cnt_yf == len_hi);

  always_ff @(posedge clk) begin
    if (rst)                 z <= 1'b0;
    else if (eq_lo || eq_hi) z <= ~eq_lo;
  end

endmodule
