// tb_fp_pipe: issues a random floating point operation every cycle (with
// gaps) and checks that each leaves the pipeline exactly four cycles
// later (F1, F2, F3, write-back) with the right destination and a value computed by the real-number
// reference: a+b, a-b, a*b, c+a*b (product rounded first), round to the
// memory float, and conversion to integer.
module tb_fp_pipe;
  import dsp_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  fpu_op_e in_op;
  logic [3:0] in_rd, out_rd;
  logic [22:0] in_a, in_b, in_c, out_data;
  logic [27:0] expq [$];   // {valid, rd, data}
  int checks = 0, failures = 0, cyc = 0;
  fp_pipe dut (.*);
  always #5 clk = ~clk;

  function automatic logic [22:0] ref_op(fpu_op_e op, logic [22:0] a, logic [22:0] b, logic [22:0] c);
    case (op)
      FPU_ADD: return real2r(r2real(a) + r2real(b));
      FPU_SUB: return real2r(r2real(a) - r2real(b));
      FPU_MUL: return real2r(r2real(a) * r2real(b));
      FPU_MAC, FPU_MACA: return real2r(r2real(c) + r2real(real2r(r2real(a) * r2real(b))));
      FPU_RND: return {7'd0, real2m(r2real(a))};
      FPU_INT: return {7'd0, real2int(r2real(a))};
      default: return a;
    endcase
  endfunction

  initial begin
    in_valid = 0; in_op = FPU_ADD; in_rd = 0; in_a = 0; in_b = 0; in_c = 0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      in_op = fpu_op_e'($urandom_range(6));
      in_rd = 4'($urandom);
      in_a = rnd_r(-8, 20); in_b = rnd_r(-8, 8); in_c = rnd_r(-8, 20);
      expq.push_back({in_valid, in_rd, ref_op(in_op, in_a, in_b, in_c)});
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // an operation presented in one cycle is written back four cycles later
  always @(posedge clk) if (rst_n) begin
    cyc++;
    #1;
    if (cyc >= 5 && cyc - 5 < expq.size()) begin
      logic [27:0] e;
      e = expq[cyc - 5];
      checks++;
      if (out_valid !== e[27] || (e[27] && (out_rd !== e[26:23] || out_data !== e[22:0]))) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: got %b %h %h exp %b %h %h", cyc, out_valid, out_rd, out_data, e[27], e[26:23], e[22:0]);
      end
    end
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
