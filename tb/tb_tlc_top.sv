// tb_tlc_top: end-to-end test of the whole controller at its real timing
// (one clock = one second, default parameters).
//
// Part 1 runs the eight sensor cases of the traffic-condition table:
//   1 no sensor        2 s1           3 s2            4 s1+s2
//   5 L5 level 1       6 L5 level 2   7 L5 level 3    8 s1+s2+L5 level 1
// For each case the sensors are held, the controller is reset, and the
// light pattern {L1..L5} is cut into segments of constant pattern. The
// segments of two full cycles, with their lengths in seconds, are compared
// with a list worked out from the timing rules: 1 s all red before each
// green, 3 s all-red clearance before each sensor check, green 20 s for a
// served minor road with its main road, 40 s for a main road alone, 3 s
// yellow, L5 green 10/20/30 s by level.
// Part 2 drives random, fast-changing sensors for a long run and checks the
// safety rules on every cycle: no conflicting greens, L5 only with all
// others red, every green preceded by all red, every green lasting one of
// the legal times, and that the greens the traffic-condition table names
// show their state codes (L1+L2 in 5, L3+L4 in 14, L5 in 25/27/29).
// Each mechanism (L1 served/skipped, L4 served/skipped, L5 skipped, L5
// served at levels 1..3, clearance-to-green safety delay, timer chaining
// from a green straight into its yellow) is counted; one that never
// happens counts as a failure.
module tb_tlc_top;

  localparam bit [2:0] R = 3'b001, Y = 3'b010, G = 3'b100;

  typedef struct packed {
    logic [14:0] pat;   // {L1, L2, L3, L4, L5}
    int          dur;
  } seg_t;

  logic       clk = 0, rst = 1, s1 = 0, s2 = 0;
  logic [2:0] s3_raw = '0;
  logic [2:0] L1, L2, L3, L4, L5;
  logic [4:0] state;
  logic [5:0] timer;
  int         checks = 0, failures = 0;

  // mechanism counters
  int n_l1_served = 0, n_l1_skipped = 0, n_l4_served = 0, n_l4_skipped = 0;
  int n_l5_skipped = 0, n_l5_lvl1 = 0, n_l5_lvl2 = 0, n_l5_lvl3 = 0;
  int n_safety_delay = 0, n_chain = 0;

  tlc_top dut (.clk(clk), .rst(rst), .s1(s1), .s2(s2), .s3_raw(s3_raw),
               .L1(L1), .L2(L2), .L3(L3), .L4(L4), .L5(L5),
               .state(state), .timer(timer));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [14:0] P(bit [2:0] a, bit [2:0] b, bit [2:0] c,
                                  bit [2:0] d, bit [2:0] e);
    return {a, b, c, d, e};
  endfunction

  localparam logic [14:0] ALLRED = {R, R, R, R, R};

  seg_t exp_q[$];

  // expected segments of one cycle, from the first green of phase A to the
  // all-red that ends the cycle
  task automatic add_cycle(input bit a1, input bit a2, input int lvl);
    if (a1) begin
      exp_q.push_back('{P(G, G, R, R, R), 20});
      exp_q.push_back('{P(Y, G, R, R, R), 3});
      exp_q.push_back('{P(R, G, R, R, R), 20});
      exp_q.push_back('{P(R, Y, R, R, R), 3});
    end else begin
      exp_q.push_back('{P(R, G, R, R, R), 40});
      exp_q.push_back('{P(R, Y, R, R, R), 3});
    end
    exp_q.push_back('{ALLRED, 4});          // 3 s clearance + 1 s delay
    if (a2) begin
      exp_q.push_back('{P(R, R, G, G, R), 20});
      exp_q.push_back('{P(R, R, G, Y, R), 3});
      exp_q.push_back('{P(R, R, G, R, R), 20});
      exp_q.push_back('{P(R, R, Y, R, R), 3});
    end else begin
      exp_q.push_back('{P(R, R, G, R, R), 40});
      exp_q.push_back('{P(R, R, Y, R, R), 3});
    end
    if (lvl == 0)
      exp_q.push_back('{ALLRED, 7});        // C clearance, A clearance, delay
    else begin
      exp_q.push_back('{ALLRED, 4});
      exp_q.push_back('{P(R, R, R, R, G), 10 * lvl});
      exp_q.push_back('{P(R, R, R, R, Y), 3});
      exp_q.push_back('{ALLRED, 4});
    end
  endtask

  function automatic logic [14:0] cur();
    return {L1, L2, L3, L4, L5};
  endfunction

  function automatic bit has_green(logic [14:0] p);
    return p[14] || p[11] || p[8] || p[5] || p[2];
  endfunction

  // count what a finished segment shows
  task automatic note(input seg_t s, input logic [14:0] nxt);
    if (s.pat == P(G, G, R, R, R)) n_l1_served++;
    if (s.pat == P(R, G, R, R, R) && s.dur == 40) n_l1_skipped++;
    if (s.pat == P(R, R, G, G, R)) n_l4_served++;
    if (s.pat == P(R, R, G, R, R) && s.dur == 40) n_l4_skipped++;
    if (s.pat == ALLRED && s.dur == 7) n_l5_skipped++;
    if (s.pat == P(R, R, R, R, G)) begin
      if (s.dur == 10) n_l5_lvl1++;
      if (s.dur == 20) n_l5_lvl2++;
      if (s.dur == 30) n_l5_lvl3++;
    end
    if (s.pat == ALLRED && has_green(nxt)) n_safety_delay++;
    if (has_green(s.pat) && (nxt[13] || nxt[10] || nxt[7] || nxt[4] || nxt[1]))
      n_chain++;
  endtask

  task automatic run_case(input int id, input bit a1, input bit a2, input int lvl);
    int          idx = 0, len, guard = 0;
    logic [14:0] prev, p;
    bit          first = 1;
    s1 = a1;
    s2 = a2;
    s3_raw = (lvl == 0) ? 3'b000 : (lvl == 1) ? 3'b001 : (lvl == 2) ? 3'b011 : 3'b111;
    exp_q.delete();
    exp_q.push_back('{ALLRED, 5});          // start, clearance, delay
    add_cycle(a1, a2, lvl);
    add_cycle(a1, a2, lvl);
    rst = 1;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    prev = cur();
    len = 1;
    while (idx < exp_q.size() && guard < 2000) begin
      guard++;
      @(negedge clk);
      p = cur();
      if (p == prev) len++;
      else begin
        checks++;
        if (prev != exp_q[idx].pat || len != exp_q[idx].dur) begin
          failures++;
          $display("case %0d segment %0d: got %b for %0d s, want %b for %0d s",
                   id, idx, prev, len, exp_q[idx].pat, exp_q[idx].dur);
        end
        note('{prev, len}, p);
        idx++;
        prev = p;
        len = 1;
      end
    end
    checks++;
    if (idx != exp_q.size()) begin
      failures++;
      $display("case %0d: only %0d of %0d segments seen", id, idx, exp_q.size());
    end
  endtask

  // random sensors, safety rules only
  task automatic stress(input int cycles);
    logic [14:0] prev, p;
    int          len = 1;
    int          lvl_now = 0;
    rst = 1;
    @(negedge clk);
    rst = 0;
    prev = cur();
    for (int i = 0; i < cycles; i++) begin
      // remember the level the L5 phase was chosen with
      if (L5 != G && L5 != Y) lvl_now = 0;
      if (L5 == R && L1 == R && L2 == R && L3 == R && L4 == R)
        lvl_now = s3_raw[2] ? 3 : s3_raw[1] ? 2 : s3_raw[0] ? 1 : 0;
      s1 = ($urandom_range(3) == 0);
      s2 = ($urandom_range(3) == 0);
      s3_raw = 3'($urandom);
      @(negedge clk);
      p = cur();
      checks++;
      // conflicts
      if ((L5 != R && (L1 != R || L2 != R || L3 != R || L4 != R)) ||
          (L2 != R && L3 != R) ||
          (L1 != R && L2 != G) || (L4 != R && L3 != G) ||
          !(L1 inside {R, Y, G}) || !(L2 inside {R, Y, G}) || !(L3 inside {R, Y, G}) ||
          !(L4 inside {R, Y, G}) || !(L5 inside {R, Y, G})) begin
        failures++;
        $display("stress cycle %0d: unsafe pattern %b", i, p);
      end
      // the greens named in the traffic-condition table carry their codes
      checks++;
      if ((p == P(G, G, R, R, R) && state != 5'd5) ||
          (p == P(R, R, G, G, R) && state != 5'd14) ||
          (L5 == G && lvl_now == 1 && state != 5'd25) ||
          (L5 == G && lvl_now == 2 && state != 5'd27) ||
          (L5 == G && lvl_now == 3 && state != 5'd29)) begin
        failures++;
        $display("stress cycle %0d: pattern %b in state %0d", i, p, state);
      end
      if (p == prev) len++;
      else begin
        checks++;
        // a green appearing must come out of all red
        if (((p[14] && !prev[14]) || (p[11] && !prev[11]) || (p[8] && !prev[8]) ||
             (p[5] && !prev[5]) || (p[2] && !prev[2])) && prev != ALLRED) begin
          failures++;
          $display("stress cycle %0d: green without all-red delay", i);
        end
        if (prev == P(R, G, R, R, R) || prev == P(R, R, G, R, R)) begin
          if (!(len inside {20, 40})) begin
            failures++;
            $display("stress cycle %0d: main-road green of %0d s", i, len);
          end
        end else if (prev[2] && !(len inside {10, 20, 30})) begin
          failures++;
          $display("stress cycle %0d: L5 green of %0d s", i, len);
        end else if (has_green(prev) && prev != P(R, G, R, R, R) &&
                     prev != P(R, R, G, R, R) && !prev[2] &&
                     !(prev inside {P(G, G, R, R, R), P(R, R, G, G, R), P(Y, G, R, R, R), P(R, R, G, Y, R)})) begin
          failures++;
          $display("stress cycle %0d: unexpected green pattern %b", i, prev);
        end
        note('{prev, len}, p);
        prev = p;
        len = 1;
      end
    end
  endtask

  initial begin
    run_case(1, 0, 0, 0);
    run_case(2, 1, 0, 0);
    run_case(3, 0, 1, 0);
    run_case(4, 1, 1, 0);
    run_case(5, 0, 0, 1);
    run_case(6, 0, 0, 2);
    run_case(7, 0, 0, 3);
    run_case(8, 1, 1, 1);
    stress(20000);
    $display("L1 served %0d skipped %0d | L4 served %0d skipped %0d | L5 skipped %0d lvl1 %0d lvl2 %0d lvl3 %0d | all-red before green %0d | green chained to yellow %0d",
             n_l1_served, n_l1_skipped, n_l4_served, n_l4_skipped, n_l5_skipped,
             n_l5_lvl1, n_l5_lvl2, n_l5_lvl3, n_safety_delay, n_chain);
    checks++;
    if (n_l1_served == 0 || n_l1_skipped == 0 || n_l4_served == 0 || n_l4_skipped == 0 ||
        n_l5_skipped == 0 || n_l5_lvl1 == 0 || n_l5_lvl2 == 0 || n_l5_lvl3 == 0 ||
        n_safety_delay == 0 || n_chain == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
