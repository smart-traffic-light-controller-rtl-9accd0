// tlc_top: smart traffic light controller for a T-junction with two
// main-road movements (L2, L3), two minor roads with a presence sensor each
// (L1 with s1, L4 with s2) and an exit road L5 with three queue sensors.
//
// Structure (one clock domain, 1 Hz, synchronous active-high reset):
//   s3_raw -> tlc_s3_encoder -> s3 level ---------------------+
//   s1, s2 ---------------------------------------------------+-> tlc_controller -> L1..L5
//   tlc_controller.tsel -> tlc_timer_sel -> tval -> tlc_counter -> t_out -+
//   tlc_controller.tEn  --------------------------------> tlc_counter
// The controller sequences the lights; the timer selector and the counter
// time each state. Lamp codes are one-hot: 100 green, 010 yellow, 001 red.
// The controller state and the counter value (seconds left in the
// running interval) are brought out for observation.
module tlc_top
  import tlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       s1,
  input  logic       s2,
  input  logic [2:0] s3_raw,
  output logic [2:0] L1,
  output logic [2:0] L2,
  output logic [2:0] L3,
  output logic [2:0] L4,
  output logic [2:0] L5,
  output logic [4:0] state,
  output logic [5:0] timer
);

  level_t        s3;
  logic          tEn, t_out;
  tsel_t         tsel;
  logic [TW-1:0] tval, count;
  lamp_t         l1, l2, l3, l4, l5;
  state_t        st;

  tlc_s3_encoder u_enc (.s3_raw(s3_raw), .s3(s3));

  tlc_timer_sel u_tsel (.tsel(tsel), .tval(tval));

  tlc_counter u_cnt (
    .clk(clk), .rst(rst), .tEn(tEn), .tval(tval), .t_out(t_out), .count(count)
  );

  tlc_controller u_ctl (
    .clk(clk), .rst(rst), .t_out(t_out), .s1(s1), .s2(s2), .s3(s3),
    .L1(l1), .L2(l2), .L3(l3), .L4(l4), .L5(l5),
    .tEn(tEn), .tsel(tsel), .state(st)
  );

  assign L1 = l1;
  assign L2 = l2;
  assign L3 = l3;
  assign L4 = l4;
  assign L5 = l5;
  assign state = st;
  assign timer = count;

endmodule
