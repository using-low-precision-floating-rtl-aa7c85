// tb_int_alu: every ALU operation on random operands and on edge values
// (zero, all ones, sign bit set) against values computed here.
module tb_int_alu;
  import dsp_pkg::*;
  alu_op_e op;
  logic [15:0] a, b, y, e;
  int checks = 0, failures = 0;
  int_alu dut (.*);
  initial begin
    for (int t = 0; t < 20000; t++) begin
      op = alu_op_e'($urandom_range(8));
      a = (t % 7 == 0) ? 16'h8000 : 16'($urandom);
      b = (t % 11 == 0) ? 16'hFFFF : 16'($urandom);
      #1;
      case (op)
        ALU_ADD: e = 16'(int'(a) + int'(b));
        ALU_SUB: e = 16'(int'(a) - int'(b));
        ALU_AND: e = a & b;
        ALU_OR:  e = a | b;
        ALU_XOR: e = a ^ b;
        ALU_SHL: e = 16'(int'(a) * (1 << b[3:0]));
        ALU_SHR: e = 16'(int'(a) / (1 << b[3:0]));
        ALU_SRA: e = 16'($floor(real'(int'($signed(a))) / real'(1 << b[3:0])));
        default: e = b;
      endcase
      checks++;
      if (y !== e) begin failures++; if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
