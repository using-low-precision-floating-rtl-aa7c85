// fp_round: rounds a 23-bit register float to the 16-bit memory float, the
// step before a floating point value is stored. The 16-bit mantissa is cut
// to 10 bits and rounded to nearest, ties away from zero (bit 5 decides); a
// mantissa carry raises the exponent. Exponents above 15 saturate to the
// largest memory magnitude, exponents below -15 (and the register zero)
// become the memory zero code (exponent -16).
// Combinational: a (register float) -> y (memory float).
// The formats are the document's; rounding mode, saturation and flushing are
// this design's choices (the document does not give them).
module fp_round
  import dsp_pkg::*;
(
  input  logic [22:0] a,
  output logic [15:0] y
);
  rfloat_t r;
  assign r = rfloat_t'(a);

  logic [10:0]       mr;   // rounded mantissa with carry
  logic signed [7:0] e;

  always_comb begin
    mr = {1'b0, r.man[15:6]} + {10'd0, r.man[5]};
    e  = 8'(signed'(r.exp)) + (mr[10] ? 8'sd1 : 8'sd0);
    if (r.exp == REXP_ZERO || e < -8'sd15) y = MZERO;
    else if (e > 8'sd15)                   y = {r.sign, 5'd15, 10'h3FF};
    else                                   y = {r.sign, e[4:0], mr[9:0]};
  end
endmodule
