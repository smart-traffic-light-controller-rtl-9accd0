// tb_tlc_controller: checks the controller state machine on its own, with
// the testbench standing in for the timer.
//
// For every combination of s1, s2 and the L5 level (16 cases) the expected
// sequence of Moore outputs {L1..L5, tEn, tsel} over two full cycles is
// built from the sequence rules (which lights, which interval to load or
// chain next, which branch a sensor value selects). The testbench raises
// t_out at random moments; the machine must leave a load state (tEn=0)
// after exactly one cycle, stay in a timed state until t_out, and show the
// expected outputs in every cycle. The sensors hold the case's values only
// in the cycle where a check state ends and are random at all other times,
// so a sensor read at the wrong moment is caught. Mechanisms counted: L1
// served and skipped, L4 served and skipped, L5 skipped and served at each
// level.
module tb_tlc_controller;
  import tlc_pkg::*;

  typedef struct packed {
    lamp_t l1, l2, l3, l4, l5;
    logic  ten;
    tsel_t tsel;
  } step_t;

  logic   clk = 0, rst = 1, t_out = 0, s1 = 0, s2 = 0;
  level_t s3 = LVL_NONE;
  lamp_t  L1, L2, L3, L4, L5;
  logic   tEn;
  tsel_t  tsel;
  state_t state;
  int     checks = 0, failures = 0;
  int     n_l1_served = 0, n_l1_skipped = 0, n_l4_served = 0, n_l4_skipped = 0;
  int     n_l5_skipped = 0, n_l5_level [1:3] = '{0, 0, 0};

  tlc_controller dut (.clk(clk), .rst(rst), .t_out(t_out), .s1(s1), .s2(s2),
                      .s3(s3), .L1(L1), .L2(L2), .L3(L3), .L4(L4), .L5(L5),
                      .tEn(tEn), .tsel(tsel), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam lamp_t R = LAMP_RED, Y = LAMP_YELLOW, G = LAMP_GREEN;

  step_t exp_q[$];
  bit    chk_q[$];   // step ends with a sensor check

  function automatic step_t mk(lamp_t a, lamp_t b, lamp_t c, lamp_t d,
                               lamp_t e, logic ten, tsel_t ts);
    return '{a, b, c, d, e, ten, ts};
  endfunction

  // one cycle, phase A to the end of phase C
  task automatic add_cycle(input bit a1, input bit a2, input level_t lv);
    exp_q.push_back(mk(R, R, R, R, R, 1, TSEL_3S)); chk_q.push_back(1);   // A clearance
    if (a1) begin
      exp_q.push_back(mk(R, R, R, R, R, 0, TSEL_20S)); chk_q.push_back(0);
      exp_q.push_back(mk(G, G, R, R, R, 1, TSEL_3S));  chk_q.push_back(0);
      exp_q.push_back(mk(Y, G, R, R, R, 1, TSEL_20S)); chk_q.push_back(0);
      exp_q.push_back(mk(R, G, R, R, R, 1, TSEL_3S));  chk_q.push_back(0);
      exp_q.push_back(mk(R, Y, R, R, R, 1, TSEL_3S));  chk_q.push_back(0);
    end else begin
      exp_q.push_back(mk(R, R, R, R, R, 0, TSEL_40S)); chk_q.push_back(0);
      exp_q.push_back(mk(R, G, R, R, R, 1, TSEL_3S));  chk_q.push_back(0);
      exp_q.push_back(mk(R, Y, R, R, R, 1, TSEL_3S));  chk_q.push_back(0);
    end
    exp_q.push_back(mk(R, R, R, R, R, 1, TSEL_3S)); chk_q.push_back(1);   // B clearance
    if (a2) begin
      exp_q.push_back(mk(R, R, R, R, R, 0, TSEL_20S)); chk_q.push_back(0);
      exp_q.push_back(mk(R, R, G, G, R, 1, TSEL_3S));  chk_q.push_back(0);
      exp_q.push_back(mk(R, R, G, Y, R, 1, TSEL_20S)); chk_q.push_back(0);
      exp_q.push_back(mk(R, R, G, R, R, 1, TSEL_3S));  chk_q.push_back(0);
      exp_q.push_back(mk(R, R, Y, R, R, 1, TSEL_3S));  chk_q.push_back(0);
    end else begin
      exp_q.push_back(mk(R, R, R, R, R, 0, TSEL_40S)); chk_q.push_back(0);
      exp_q.push_back(mk(R, R, G, R, R, 1, TSEL_3S));  chk_q.push_back(0);
      exp_q.push_back(mk(R, R, Y, R, R, 1, TSEL_3S));  chk_q.push_back(0);
    end
    exp_q.push_back(mk(R, R, R, R, R, 1, TSEL_3S)); chk_q.push_back(1);   // C clearance
    if (lv != LVL_NONE) begin
      tsel_t ts = (lv == LVL_1) ? TSEL_10S : (lv == LVL_2) ? TSEL_20S : TSEL_30S;
      exp_q.push_back(mk(R, R, R, R, R, 0, ts));      chk_q.push_back(0);
      exp_q.push_back(mk(R, R, R, R, G, 1, TSEL_3S)); chk_q.push_back(0);
      exp_q.push_back(mk(R, R, R, R, Y, 1, TSEL_3S)); chk_q.push_back(0);
    end
  endtask

  task automatic run_case(input bit a1, input bit a2, input level_t lv);
    int    idx = 0, guard = 0;
    step_t now;
    exp_q.delete();
    chk_q.delete();
    exp_q.push_back(mk(R, R, R, R, R, 0, TSEL_3S)); chk_q.push_back(0);   // start
    add_cycle(a1, a2, lv);
    add_cycle(a1, a2, lv);
    rst = 1;
    t_out = 0;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    while (idx < exp_q.size() && guard < 5000) begin
      guard++;
      // inputs for this cycle
      t_out = ($urandom_range(2) == 0);
      if (chk_q[idx] && t_out) begin
        s1 = a1; s2 = a2; s3 = lv;
      end else begin
        s1 = 1'($urandom); s2 = 1'($urandom); s3 = level_t'($urandom_range(3));
      end
      #1;
      now = '{L1, L2, L3, L4, L5, tEn, tsel};
      checks++;
      if (now !== exp_q[idx]) begin
        failures++;
        $display("case s1=%0d s2=%0d s3=%0d step %0d: got %h, want %h",
                 a1, a2, lv, idx, now, exp_q[idx]);
      end
      if (!exp_q[idx].ten || t_out) idx++;
      @(negedge clk);
    end
    checks++;
    if (idx != exp_q.size()) begin
      failures++;
      $display("case s1=%0d s2=%0d s3=%0d stalled at step %0d", a1, a2, lv, idx);
    end
    if (a1) n_l1_served += 2; else n_l1_skipped += 2;
    if (a2) n_l4_served += 2; else n_l4_skipped += 2;
    if (lv == LVL_NONE) n_l5_skipped += 2; else n_l5_level[int'(lv)] += 2;
  endtask

  initial begin
    for (int c = 0; c < 16; c++)
      run_case(c[0], c[1], level_t'(c[3:2]));
    $display("L1 served %0d skipped %0d, L4 served %0d skipped %0d, L5 skipped %0d level1 %0d level2 %0d level3 %0d",
             n_l1_served, n_l1_skipped, n_l4_served, n_l4_skipped, n_l5_skipped,
             n_l5_level[1], n_l5_level[2], n_l5_level[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
