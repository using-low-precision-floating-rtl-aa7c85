// tb_fp_expand: checks the memory-to-register float expansion on every one
// of the 65536 memory words: the register value must equal the memory value
// exactly, and the zero code must map to the register zero code.
module tb_fp_expand;
  import fp_ref_pkg::*;
  logic [15:0] a;
  logic [22:0] y;
  int checks = 0, failures = 0;
  fp_expand dut (.a(a), .y(y));
  initial begin
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i);
      #1;
      checks++;
      if (r2real(y) != m2real(a) || (a[14:10] == 5'b10000 && y != {1'b0, 6'b100000, 16'h0})) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
