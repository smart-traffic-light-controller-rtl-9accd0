// tb_tlc_timer_sel: exhaustive check of the timer selector. Every one of
// the eight tsel codes is applied and the selected 6-bit interval compared
// with the interval table (40, 30, 20, 10, 3 s; unused codes give 3 s).
module tb_tlc_timer_sel;
  import tlc_pkg::*;

  tsel_t         tsel;
  logic [TW-1:0] tval;
  int            checks = 0, failures = 0;

  tlc_timer_sel dut (.tsel(tsel), .tval(tval));

  localparam int EXPECT [8] = '{40, 30, 20, 10, 3, 3, 3, 3};

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      tsel = tsel_t'(c[2:0]);
      #1;
      checks++;
      if (int'(tval) != EXPECT[c]) begin
        failures++;
        $display("tsel=%0d: got %0d s, want %0d s", c, tval, EXPECT[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
