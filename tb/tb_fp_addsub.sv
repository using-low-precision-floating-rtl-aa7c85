// tb_fp_addsub: checks the register float adder/subtractor against real
// arithmetic rounded to nearest (ties away). Operand pairs are drawn with
// near-equal exponents (cancellation), small and large exponent gaps, zero
// operands, and over the full range (saturation and underflow).
module tb_fp_addsub;
  import fp_ref_pkg::*;
  logic [22:0] a, b, y, exp_y;
  logic        sub;
  int checks = 0, failures = 0, ncancel = 0;
  fp_addsub dut (.a(a), .b(b), .sub(sub), .y(y));
  initial begin
    for (int i = 0; i < 80000; i++) begin
      sub = 1'($urandom);
      case (i % 4)
        0: begin a = rnd_r(-32, 31); b = rnd_r(-32, 31); end
        1: begin a = rnd_r(0, 3); b = rnd_r(0, 3); end
        2: begin a = rnd_r(-5, 20); b = rnd_r(-5, 20); end
        default: begin a = rnd_r(5, 6); b = a; b[3:0] = 4'($urandom); end
      endcase
      if (i % 101 == 7) a = {1'b0, 6'b100000, 16'h0};
      if (i % 103 == 9) b = {1'b1, 6'b100000, 16'h0};
      #1;
      exp_y = real2r(sub ? r2real(a) - r2real(b) : r2real(a) + r2real(b));
      if (y[21:16] < a[21:16] - 6'd4 && a[21:16] != 6'b100000) ncancel++;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h sub=%b y=%h exp=%h", a, b, sub, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
