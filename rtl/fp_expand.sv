// fp_expand: widens a 16-bit memory float to a 23-bit register float (the
// floating point load). Both formats share one exponent bias, so the 5-bit
// exponent is sign-extended to 6 bits and the 10-bit mantissa is padded with
// six zero bits below. The memory zero code (exponent -16) becomes the
// register zero code (exponent -32). The conversion is exact.
// Purely combinational: a (memory float) -> y (register float).
// The formats are the document's; the padding rule follows from them.
module fp_expand
  import dsp_pkg::*;
(
  input  logic [15:0] a,
  output logic [22:0] y
);
  mfloat_t m;
  assign m = mfloat_t'(a);

  always_comb begin
    if (m.exp == MEXP_ZERO) y = RZERO;
    else                    y = {m.sign, m.exp[4], m.exp, m.man, 6'b000000};
  end
endmodule
