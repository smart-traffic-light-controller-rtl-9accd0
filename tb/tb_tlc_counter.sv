// tb_tlc_counter: checks the countdown timer's cycle timing. For random
// interval lengths the testbench loads the counter (tEn=0 for one cycle),
// then enables it and measures how many clocks pass until t_out, which must
// be exactly the loaded length; t_out must last one cycle. Back-to-back
// intervals are also chained through the reload at expiry without a load
// cycle, and a long tEn=0 must keep the counter loaded and t_out low.
module tb_tlc_counter;
  import tlc_pkg::*;

  logic          clk = 0, rst = 1, tEn = 0, t_out;
  logic [TW-1:0] tval = '0, count;
  int            checks = 0, failures = 0;

  tlc_counter dut (.clk(clk), .rst(rst), .tEn(tEn), .tval(tval),
                   .t_out(t_out), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, nxt, n;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    // load, then time, single intervals
    for (int k = 0; k < 60; k++) begin
      len = 1 + int'($urandom_range(62));
      tEn = 0;
      tval = TW'(len);
      repeat (1 + $urandom_range(3)) begin
        @(negedge clk);
        checks++;
        if (t_out || count != TW'(len)) begin
          failures++;
          $display("load: count=%0d t_out=%b, want %0d and 0", count, t_out, len);
        end
      end
      // wait for t_out, counting cycles from the first enabled one
      begin
        n = 0;
        tEn = 1;
        tval = TW'(3);
        while (!t_out && n < 100) begin
          @(negedge clk);
          n++;
        end
        n++;   // the t_out cycle itself
        checks++;
        if (n != len) begin
          failures++;
          $display("interval of %0d s lasted %0d clocks", len, n);
        end
        // reload of the 3 s follow-up at expiry, no load cycle
        @(negedge clk);
        checks++;
        if (count != TW'(3) || t_out) begin
          failures++;
          $display("reload: count=%0d t_out=%b, want 3 and 0", count, t_out);
        end
      end
    end
    // chains of intervals with reload at expiry
    tEn = 0;
    nxt = 20;
    tval = TW'(nxt);
    @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      n = 0;
      len = nxt;
      nxt = 2 + int'($urandom_range(40));
      tEn = 1;
      tval = TW'(nxt);
      while (!t_out && n < 100) begin
        @(negedge clk);
        n++;
      end
      n++;
      checks++;
      if (n != len) begin
        failures++;
        $display("chained interval of %0d s lasted %0d clocks", len, n);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
