// tb_tlc_s3_encoder: exhaustive check of the L5 congestion encoder. All
// eight patterns of the three queue sensors are applied; the expected level
// is the index (1..3) of the farthest active sensor, 0 when none is active.
module tb_tlc_s3_encoder;
  import tlc_pkg::*;

  logic [2:0] s3_raw;
  level_t     s3;
  int         checks = 0, failures = 0;

  tlc_s3_encoder dut (.s3_raw(s3_raw), .s3(s3));

  function automatic int farthest(input logic [2:0] r);
    int f = 0;
    for (int i = 0; i < 3; i++) if (r[i]) f = i + 1;
    return f;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 8; p++) begin
      s3_raw = p[2:0];
      #1;
      checks++;
      if (int'(s3) != farthest(s3_raw)) begin
        failures++;
        $display("sensors=%b: got level %0d, want %0d", s3_raw, s3, farthest(s3_raw));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
