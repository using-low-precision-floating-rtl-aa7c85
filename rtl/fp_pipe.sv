// fp_pipe: the three execution stages of the floating point pipeline, after
// the shared fetch, decode, EX and MEM stages and before the shared
// write-back:
//   F1  multiply a * b                       (FMUL, FMAC, FMACA)
//   F2  add/subtract: a +/- b, or c + a*b    (FADD, FSUB, FMAC, FMACA)
//   F3  round to the memory float or convert to integer (FRND, FINT)
// Every instruction passes all three stages: inputs presented in the MEM
// cycle are registered into F1, F2 and F3, and out_valid/out_rd/out_data are
// the registered write-back values four clock edges later.
// The pipeline does not stall. Operands come from the register file (a, b,
// accumulator c) or, for FMACA, b is the expanded data memory word.
// The eight-stage length and the operation set are the document's; the
// split of work across F1..F3 is this design's choice.
module fp_pipe
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  fpu_op_e     in_op,
  input  logic [3:0]  in_rd,
  input  logic [22:0] in_a,
  input  logic [22:0] in_b,
  input  logic [22:0] in_c,
  output logic        out_valid,
  output logic [3:0]  out_rd,
  output logic [22:0] out_data
);
  typedef struct packed {
    logic        valid;
    fpu_op_e     op;
    logic [3:0]  rd;
    logic [22:0] a, b, c;
  } fstage_t;

  fstage_t s1, s2;                 // registered F1 and F2 inputs
  logic [22:0] s2_p;               // F1 product, registered into F2
  logic        s3_valid;
  fpu_op_e     s3_op;
  logic [3:0]  s3_rd;
  logic [22:0] s3_x;               // F2 result, registered into F3

  logic [22:0] prod, addr_a, addr_b, sum, f3_y;
  logic        addr_sub;
  logic [15:0] rnd16, int16;

  fp_mul    u_mul (.a(s1.a), .b(s1.b), .y(prod));
  fp_addsub u_add (.a(addr_a), .b(addr_b), .sub(addr_sub), .y(sum));
  fp_round  u_rnd (.a(s3_x), .y(rnd16));
  fp_to_int u_int (.a(s3_x), .y(int16));

  always_comb begin
    addr_a   = s2.a;
    addr_b   = s2.b;
    addr_sub = (s2.op == FPU_SUB);
    if (s2.op == FPU_MAC || s2.op == FPU_MACA) begin
      addr_a = s2.c;
      addr_b = s2_p;
    end
  end

  always_comb begin
    unique case (s3_op)
      FPU_RND: f3_y = {7'd0, rnd16};
      FPU_INT: f3_y = {7'd0, int16};
      default: f3_y = s3_x;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s2_p <= '0;
      s3_valid <= 1'b0; s3_op <= FPU_ADD; s3_rd <= '0; s3_x <= '0;
      out_valid <= 1'b0; out_rd <= '0; out_data <= '0;
    end else begin
      s1 <= '{valid: in_valid, op: in_op, rd: in_rd, a: in_a, b: in_b, c: in_c};
      s2   <= s1;
      s2_p <= prod;
      s3_valid <= s2.valid;
      s3_op    <= s2.op;
      s3_rd    <= s2.rd;
      unique case (s2.op)
        FPU_ADD, FPU_SUB, FPU_MAC, FPU_MACA: s3_x <= sum;
        FPU_MUL:                             s3_x <= s2_p;
        default:                             s3_x <= s2.a;
      endcase
      out_valid <= s3_valid;
      out_rd    <= s3_rd;
      out_data  <= f3_y;
    end
  end
endmodule
