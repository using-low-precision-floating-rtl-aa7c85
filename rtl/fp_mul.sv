// fp_mul: multiplies two 23-bit register floats. The 17-bit significands
// (hidden one plus 16-bit mantissa) give a 34-bit product in [1,4) scaled by
// 2^32; a product of 2 or more is normalised by one place. The mantissa is
// rounded to nearest, ties away from zero. The result exponent is
// ea + eb - 11 (+1 when normalised, +1 on a rounding carry), because of the
// bias of 11 in x = 2^(e-11)(1+m/65536). Results above exponent 31 saturate
// to the largest magnitude; below -31 they flush to zero.
// Combinational: a, b -> y. The operation and format are the document's; the
// rounding, saturation and flushing rules are this design's choices.
module fp_mul
  import dsp_pkg::*;
(
  input  logic [22:0] a,
  input  logic [22:0] b,
  output logic [22:0] y
);
  rfloat_t fa, fb;
  assign fa = rfloat_t'(a);
  assign fb = rfloat_t'(b);

  logic [33:0]       p;    // ties go away from zero, so bits below the round bit are not needed
  logic [16:0]       mr;   // rounded mantissa with carry
  logic signed [8:0] e;
  logic              s;

  always_comb begin
    s = fa.sign ^ fb.sign;
    p = {1'b1, fa.man} * {1'b1, fb.man};
    e = 9'(signed'(fa.exp)) + 9'(signed'(fb.exp)) - 9'sd11;
    if (p[33]) begin
      mr = {1'b0, p[32:17]} + {16'd0, p[16]};
      e  = e + 9'sd1;
    end else begin
      mr = {1'b0, p[31:16]} + {16'd0, p[15]};
    end
    if (mr[16]) e = e + 9'sd1;
    if (fa.exp == REXP_ZERO || fb.exp == REXP_ZERO || e < -9'sd31) y = RZERO;
    else if (e > 9'sd31) y = {s, 6'd31, 16'hFFFF};
    else                 y = {s, e[5:0], mr[15:0]};
  end
endmodule
