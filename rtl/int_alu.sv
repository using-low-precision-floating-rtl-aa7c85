// int_alu: the 16-bit integer unit of the integer pipeline (EX stage):
// add, subtract, and, or, xor, shift left, logical and arithmetic shift
// right (by b[3:0]) and move. Combinational.
// The document only says there are register to register integer operations;
// the operation set and its encoding (dsp_pkg::alu_op_e) are this design's.
module int_alu
  import dsp_pkg::*;
(
  input  alu_op_e     op,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_SHL:  y = a << b[3:0];
      ALU_SHR:  y = a >> b[3:0];
      ALU_SRA:  y = 16'($signed(a) >>> b[3:0]);
      ALU_MOVB: y = b;
      default:  y = a;
    endcase
  end
endmodule
