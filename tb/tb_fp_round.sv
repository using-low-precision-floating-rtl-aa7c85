// tb_fp_round: checks register-to-memory rounding against a real-number
// reference: random register floats over the whole exponent range (so that
// saturation and flushing occur), plus mantissas just below and at the
// rounding tie.
module tb_fp_round;
  import fp_ref_pkg::*;
  logic [22:0] a;
  logic [15:0] y, exp_y;
  int checks = 0, failures = 0, nsat = 0, nflush = 0;
  fp_round dut (.a(a), .y(y));
  initial begin
    for (int i = 0; i < 40000; i++) begin
      a = rnd_r(-32, 31);
      if (i % 4 == 1) a[5:0] = 6'b100000;     // exact tie
      if (i % 4 == 2) a[15:0] = 16'hFFE0;     // rounds up with carry
      #1;
      exp_y = real2m(r2real(a));
      checks++;
      if ($signed(a[21:16]) > 15) nsat++;
      if ($signed(a[21:16]) < -15) nflush++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h y=%h exp=%h", a, y, exp_y);
      end
    end
    checks++; if (nsat == 0 || nflush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
