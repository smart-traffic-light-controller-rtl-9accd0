// tlc_s3_encoder: congestion level of exit road L5.
//
// Three IR sensors sit at increasing distances from the stop line of L5;
// a queue that reaches sensor k makes the sensors 1..k active. The encoder
// turns the three sensor bits into the 2-bit level s3: 00 no vehicle,
// 01 level 1 (normal), 10 level 2 (medium), 11 level 3 (congested). The
// level codes follow the design; the encoder itself is the simplest
// circuit that produces them. It is a priority encoder on the farthest
// active sensor, so a gap in the queue (a far sensor active, a near one
// not) still reports the longer queue. Purely combinational.
module tlc_s3_encoder
  import tlc_pkg::*;
(
  input  logic [2:0] s3_raw,   // bit 0 nearest the stop line
  output level_t     s3
);

  always_comb begin
    if (s3_raw[2])      s3 = LVL_3;
    else if (s3_raw[1]) s3 = LVL_2;
    else if (s3_raw[0]) s3 = LVL_1;
    else                s3 = LVL_NONE;
  end

endmodule
