// tlc_counter: 6-bit countdown timer of the controller, clocked at 1 Hz.
//
// While tEn is 0 the counter loads tval (the interval picked by the timer
// selector). While tEn is 1 it counts down by one per clock. t_out is high
// during the last second of an interval, when the count is 1 (or 0, which
// only a zero-length interval reaches); in that same cycle the counter
// reloads tval, so the controller can chain two timed states without a load
// cycle in between: a timed state drives the select code of the interval
// that follows it. An interval of N seconds thus lasts exactly N clocks
// after a load (or after the previous interval's reload).
//
// The load-on-tEn=0 / count-on-tEn=1 behaviour follows the design; the
// reload at expiry and t_out on the last second are this implementation's
// choices. Reset is synchronous and clears the count.
module tlc_counter
  import tlc_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          tEn,
  input  logic [TW-1:0] tval,
  output logic          t_out,
  output logic [TW-1:0] count
);

  assign t_out = tEn && (count <= TW'(1));

  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (!tEn || t_out)
      count <= tval;
    else
      count <= count - TW'(1);
  end

  // while enabled and not at the end, the count falls by exactly one
  a_countdown: assert property (@(posedge clk) disable iff (rst)
    (tEn && !t_out) |=> (count == $past(count) - TW'(1)));

endmodule
