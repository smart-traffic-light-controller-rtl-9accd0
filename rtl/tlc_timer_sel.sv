// tlc_timer_sel: timer selector. A purely combinational 5-input multiplexer
// of constant intervals: tsel = 0..4 selects 40, 30, 20, 10 or 3 seconds as
// a 6-bit value, which the counter loads. The five constants and the 6-bit
// width are the design's; they are parameters so that a testbench or a
// variant can shorten them. Unused codes 5..7 select the 3 s interval, a
// choice of this implementation so that the counter never loads zero.
module tlc_timer_sel
  import tlc_pkg::*;
#(
  parameter logic [TW-1:0] T40 = TW'(40),
  parameter logic [TW-1:0] T30 = TW'(30),
  parameter logic [TW-1:0] T20 = TW'(20),
  parameter logic [TW-1:0] T10 = TW'(10),
  parameter logic [TW-1:0] T3  = TW'(3)
) (
  input  tsel_t         tsel,
  output logic [TW-1:0] tval
);

  always_comb begin
    unique case (tsel)
      TSEL_40S: tval = T40;
      TSEL_30S: tval = T30;
      TSEL_20S: tval = T20;
      TSEL_10S: tval = T10;
      default:  tval = T3;
    endcase
  end

endmodule
