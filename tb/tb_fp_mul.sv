// tb_fp_mul: checks the register float multiplier against real arithmetic
// rounded to nearest (ties away) with saturation and flush to zero.
// Operands are random over the full range, over a middle range, and zero.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [22:0] a, b, y, exp_y;
  int checks = 0, failures = 0;
  fp_mul dut (.a(a), .b(b), .y(y));
  initial begin
    for (int i = 0; i < 60000; i++) begin
      if (i % 3 == 0) begin a = rnd_r(-32, 31); b = rnd_r(-32, 31); end
      else begin a = rnd_r(-10, 20); b = rnd_r(-10, 10); end
      if (i % 97 == 5) b = {1'b0, 6'b100000, 16'h0};
      #1;
      exp_y = real2r(r2real(a) * r2real(b));
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h y=%h exp=%h", a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
