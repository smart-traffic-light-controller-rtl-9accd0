// tlc_controller: the state machine of the T-junction traffic light
// controller (next-state logic, state register and output logic).
//
// Five movements are controlled: L2 and L3 on the main road (no sensor),
// L1 and L4 on minor roads (one IR sensor each, s1 and s2) and L5, the exit
// road, whose 2-bit congestion level s3 comes from three queue sensors.
// One cycle of the controller runs three phases:
//
//   A  all red 3 s, then s1 is checked.
//        s1=1: 1 s all red, L1+L2 green 20 s, L1 yellow 3 s (L2 green),
//              L2 green 20 s, L2 yellow 3 s
//        s1=0: 1 s all red, L2 green 40 s, L2 yellow 3 s
//   B  the same for L4 (minor, s2) and L3 (main)
//   C  all red 3 s, then s3 is checked.
//        00: L5 is skipped and the cycle restarts at phase A
//        01 / 10 / 11: 1 s all red, L5 green 10 / 20 / 30 s, L5 yellow 3 s
//
// The sensor checks at the end of a countdown, the green times, the 3 s
// timer, the 1 s delay before every change to green, the skip of an empty
// road and the state numbers of the checks (S3, S13, S23) and of the named
// greens (S5, S14, S25, S27, S29) follow the original description. The
// 3 s all-red length of the check states, the 3 s yellow, and the exact
// split into 29 states (the original machine has 31) are this
// implementation's own.
//
// Timing: clk is 1 Hz. The outputs are Moore outputs of the state. tEn=0
// (only in ST_START and the 1 s delay states) makes the counter load the
// interval named by tsel; in a timed state (tEn=1) tsel names the interval
// of the state that follows, which the counter reloads when t_out ends the
// current one. The machine leaves a timed state in the cycle t_out is high
// and a load state after one cycle. Reset (synchronous, active high) makes
// every light red and enters ST_START.
module tlc_controller
  import tlc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   t_out,   // last second of the running interval
  input  logic   s1,      // vehicle on L1
  input  logic   s2,      // vehicle on L4
  input  level_t s3,      // queue level on L5
  output lamp_t  L1,
  output lamp_t  L2,
  output lamp_t  L3,
  output lamp_t  L4,
  output lamp_t  L5,
  output logic   tEn,
  output tsel_t  tsel,
  output state_t state
);

  state_t next;

  // ---------------- state register
  always_ff @(posedge clk) begin
    if (rst) state <= ST_START;
    else     state <= next;
  end

  // ---------------- next-state logic
  always_comb begin
    next = state;
    unique case (state)
      ST_START:   next = ST_A_CLR;
      // phase A
      ST_A_CLR:   if (t_out) next = s1 ? ST_A_DLY_S : ST_A_DLY_N;
      ST_A_DLY_S: next = ST_A_G12;
      ST_A_G12:   if (t_out) next = ST_A_Y1;
      ST_A_Y1:    if (t_out) next = ST_A_G2;
      ST_A_G2:    if (t_out) next = ST_A_Y2;
      ST_A_Y2:    if (t_out) next = ST_B_CLR;
      ST_A_DLY_N: next = ST_A_G2L;
      ST_A_G2L:   if (t_out) next = ST_A_Y2L;
      ST_A_Y2L:   if (t_out) next = ST_B_CLR;
      // phase B
      ST_B_CLR:   if (t_out) next = s2 ? ST_B_DLY_S : ST_B_DLY_N;
      ST_B_DLY_S: next = ST_B_G34;
      ST_B_G34:   if (t_out) next = ST_B_Y4;
      ST_B_Y4:    if (t_out) next = ST_B_G3;
      ST_B_G3:    if (t_out) next = ST_B_Y3;
      ST_B_Y3:    if (t_out) next = ST_C_CLR;
      ST_B_DLY_N: next = ST_B_G3L;
      ST_B_G3L:   if (t_out) next = ST_B_Y3L;
      ST_B_Y3L:   if (t_out) next = ST_C_CLR;
      // phase C
      ST_C_CLR:
        if (t_out) begin
          unique case (s3)
            LVL_NONE: next = ST_A_CLR;
            LVL_1:    next = ST_C_DLY1;
            LVL_2:    next = ST_C_DLY2;
            LVL_3:    next = ST_C_DLY3;
          endcase
        end
      ST_C_DLY1:  next = ST_C_G10;
      ST_C_G10:   if (t_out) next = ST_C_Y10;
      ST_C_DLY2:  next = ST_C_G20;
      ST_C_G20:   if (t_out) next = ST_C_Y20;
      ST_C_DLY3:  next = ST_C_G30;
      ST_C_G30:   if (t_out) next = ST_C_Y30;
      ST_C_Y10, ST_C_Y20, ST_C_Y30:
                  if (t_out) next = ST_A_CLR;
      default:    next = ST_START;
    endcase
  end

  // ---------------- output logic
  always_comb begin
    L1   = LAMP_RED;
    L2   = LAMP_RED;
    L3   = LAMP_RED;
    L4   = LAMP_RED;
    L5   = LAMP_RED;
    tEn  = 1'b1;
    tsel = TSEL_3S;
    unique case (state)
      ST_START:   tEn = 1'b0;                       // load 3 s clearance
      ST_A_CLR, ST_B_CLR, ST_C_CLR: ;               // all red 3 s
      ST_A_DLY_S: begin tEn = 1'b0; tsel = TSEL_20S; end
      ST_A_G12:   begin L1 = LAMP_GREEN;  L2 = LAMP_GREEN; end
      ST_A_Y1:    begin L1 = LAMP_YELLOW; L2 = LAMP_GREEN; tsel = TSEL_20S; end
      ST_A_G2:    L2 = LAMP_GREEN;
      ST_A_Y2:    L2 = LAMP_YELLOW;
      ST_A_DLY_N: begin tEn = 1'b0; tsel = TSEL_40S; end
      ST_A_G2L:   L2 = LAMP_GREEN;
      ST_A_Y2L:   L2 = LAMP_YELLOW;
      ST_B_DLY_S: begin tEn = 1'b0; tsel = TSEL_20S; end
      ST_B_G34:   begin L4 = LAMP_GREEN;  L3 = LAMP_GREEN; end
      ST_B_Y4:    begin L4 = LAMP_YELLOW; L3 = LAMP_GREEN; tsel = TSEL_20S; end
      ST_B_G3:    L3 = LAMP_GREEN;
      ST_B_Y3:    L3 = LAMP_YELLOW;
      ST_B_DLY_N: begin tEn = 1'b0; tsel = TSEL_40S; end
      ST_B_G3L:   L3 = LAMP_GREEN;
      ST_B_Y3L:   L3 = LAMP_YELLOW;
      ST_C_DLY1:  begin tEn = 1'b0; tsel = TSEL_10S; end
      ST_C_DLY2:  begin tEn = 1'b0; tsel = TSEL_20S; end
      ST_C_DLY3:  begin tEn = 1'b0; tsel = TSEL_30S; end
      ST_C_G10, ST_C_G20, ST_C_G30: L5 = LAMP_GREEN;
      ST_C_Y10, ST_C_Y20, ST_C_Y30: L5 = LAMP_YELLOW;
      default:    tEn = 1'b0;
    endcase
  end

  // ---------------- safety rules
  // L5 only moves while every other light is red
  a_l5_alone: assert property (@(posedge clk) disable iff (rst)
    (L5 != LAMP_RED) |-> (L1 == LAMP_RED && L2 == LAMP_RED &&
                          L3 == LAMP_RED && L4 == LAMP_RED));
  // the two main-road phases never overlap
  a_main_excl: assert property (@(posedge clk) disable iff (rst)
    !(L2 != LAMP_RED && L3 != LAMP_RED));
  // a minor road is only open together with its own main-road direction
  a_l1_with_l2: assert property (@(posedge clk) disable iff (rst)
    (L1 != LAMP_RED) |-> (L2 == LAMP_GREEN));
  a_l4_with_l3: assert property (@(posedge clk) disable iff (rst)
    (L4 != LAMP_RED) |-> (L3 == LAMP_GREEN));
  // every change to green is preceded by one second of all red
  a_green_delay: assert property (@(posedge clk) disable iff (rst)
    ($rose(L1 == LAMP_GREEN) || $rose(L2 == LAMP_GREEN) ||
     $rose(L3 == LAMP_GREEN) || $rose(L4 == LAMP_GREEN) ||
     $rose(L5 == LAMP_GREEN)) |->
    $past(L1 == LAMP_RED && L2 == LAMP_RED && L3 == LAMP_RED &&
          L4 == LAMP_RED && L5 == LAMP_RED));

endmodule
