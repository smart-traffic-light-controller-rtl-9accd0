// tlc_pkg: types and constants shared by the T-junction traffic light
// controller.
//
// Lamp code: each of the five lights L1..L5 is a 3-bit one-hot code,
// bit 2 = green, bit 1 = yellow, bit 0 = red (100 green, 010 yellow,
// 001 red), following the design's lamp-condition table.
//
// Timer select: the 3-bit tsel code picks the interval the counter loads:
// 0 = 40 s, 1 = 30 s, 2 = 20 s, 3 = 10 s, 4 = 3 s. Codes 5..7 are unused
// and map to the shortest interval (3 s), which is this design's choice.
//
// Controller states: 29 states in three phases (A: main road L2 with minor
// road L1, B: main road L3 with minor road L4, C: exit road L5), encoded in
// 5 bits with codes 0..30; see tlc_controller for the sequence.
package tlc_pkg;

  localparam int unsigned TW = 6;   // timer width: holds up to 63 s

  typedef enum logic [2:0] {
    LAMP_RED    = 3'b001,
    LAMP_YELLOW = 3'b010,
    LAMP_GREEN  = 3'b100
  } lamp_t;

  typedef enum logic [2:0] {
    TSEL_40S = 3'd0,
    TSEL_30S = 3'd1,
    TSEL_20S = 3'd2,
    TSEL_10S = 3'd3,
    TSEL_3S  = 3'd4
  } tsel_t;

  // L5 congestion level from the three queue sensors on the exit road.
  typedef enum logic [1:0] {
    LVL_NONE = 2'b00,   // no vehicle detected
    LVL_1    = 2'b01,   // normal traffic
    LVL_2    = 2'b10,   // medium traffic
    LVL_3    = 2'b11    // congested
  } level_t;

  // State codes: the phase checks and the greens carry the numbers the
  // design's description gives them (S3, S13 and S23 end with a sensor
  // check; S5, S14, S25, S27 and S29 are the greens it names). Codes 1 and 2
  // are unused; the machine leaves them for ST_START.
  typedef enum logic [4:0] {
    ST_START   = 5'd0,    // after reset: all red, load the 3 s clearance
    // phase A: main road L2, minor road L1 (sensor s1)
    ST_A_CLR   = 5'd3,    // all red 3 s, s1 sampled when it ends
    ST_A_DLY_S = 5'd4,    // all red 1 s safety delay, load 20 s
    ST_A_G12   = 5'd5,    // L1 and L2 green 20 s
    ST_A_Y1    = 5'd6,    // L1 yellow 3 s, L2 stays green
    ST_A_G2    = 5'd7,    // L2 green alone 20 s
    ST_A_Y2    = 5'd8,    // L2 yellow 3 s
    ST_A_DLY_N = 5'd9,    // all red 1 s safety delay, load 40 s
    ST_A_G2L   = 5'd10,   // L2 green alone 40 s (L1 skipped)
    ST_A_Y2L   = 5'd11,   // L2 yellow 3 s
    // phase B: main road L3, minor road L4 (sensor s2)
    ST_B_DLY_S = 5'd12,   // all red 1 s safety delay, load 20 s
    ST_B_CLR   = 5'd13,   // all red 3 s, s2 sampled when it ends
    ST_B_G34   = 5'd14,   // L3 and L4 green 20 s
    ST_B_Y4    = 5'd15,   // L4 yellow 3 s, L3 stays green
    ST_B_G3    = 5'd16,   // L3 green alone 20 s
    ST_B_Y3    = 5'd17,   // L3 yellow 3 s
    ST_B_DLY_N = 5'd18,   // all red 1 s safety delay, load 40 s
    ST_B_G3L   = 5'd19,   // L3 green alone 40 s (L4 skipped)
    ST_B_Y3L   = 5'd20,   // L3 yellow 3 s
    // phase C: exit road L5 (sensor level s3)
    ST_C_DLY2  = 5'd21,   // all red 1 s, load 20 s
    ST_C_DLY3  = 5'd22,   // all red 1 s, load 30 s
    ST_C_CLR   = 5'd23,   // all red 3 s, s3 sampled when it ends
    ST_C_DLY1  = 5'd24,   // all red 1 s, load 10 s
    ST_C_G10   = 5'd25,   // L5 green 10 s (level 1)
    ST_C_Y10   = 5'd26,
    ST_C_G20   = 5'd27,   // L5 green 20 s (level 2)
    ST_C_Y20   = 5'd28,
    ST_C_G30   = 5'd29,   // L5 green 30 s (level 3)
    ST_C_Y30   = 5'd30
  } state_t;

endpackage
