// tb_fp_to_int: checks float-to-integer conversion against real rounding
// with saturation, over the exponents where the result changes (-2..31) and
// at exact half-integers.
module tb_fp_to_int;
  import fp_ref_pkg::*;
  logic [22:0] a;
  logic [15:0] y, exp_y;
  int checks = 0, failures = 0;
  fp_to_int dut (.a(a), .y(y));
  initial begin
    for (int i = 0; i < 40000; i++) begin
      a = (i % 2) ? rnd_r(-32, 31) : rnd_r(8, 27);
      if (i % 5 == 0) a = real2r(real'(int'($urandom_range(2000)) - 1000) + 0.5);
      if (i == 1) a = real2r(32767.5);
      if (i == 3) a = real2r(-32768.4);
      if (i == 5) a = real2r(32767.4);
      #1;
      exp_y = real2int(r2real(a));
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h y=%h exp=%h", a, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
