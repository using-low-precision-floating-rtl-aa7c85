// fp_addsub: adds or subtracts two 23-bit register floats (y = a + b, or
// a - b when sub is set). The operand of larger magnitude keeps its place;
// the other significand is shifted right by the exponent difference into a
// 38-bit field (17 significand bits, 20 extension bits and a sticky bit that
// collects everything shifted further out). The two are added or subtracted,
// the result is normalised by a leading-one search, and the 16-bit mantissa
// is rounded to nearest, ties away from zero, from the first dropped bit.
// The sticky bit makes that bit exact for subtraction too. Results above
// exponent 31 saturate to the largest magnitude; results below -31 and exact
// cancellation give zero (exponent -32, sign 0).
// Combinational: a, b, sub -> y. Operation and format are the document's;
// rounding, saturation and flushing are this design's choices.
module fp_addsub
  import dsp_pkg::*;
(
  input  logic [22:0] a,
  input  logic [22:0] b,
  input  logic        sub,
  output logic [22:0] y
);
  rfloat_t fa, fb, big, sml;
  assign fa = rfloat_t'(a);
  assign fb = rfloat_t'({b[22] ^ sub, b[21:0]});

  logic [5:0]        ub, us;       // offset-binary exponents (0 = zero code)
  logic [5:0]        d;
  logic [37:0]       wb, ws, wsh;  // significand at [37:21], sticky at [0]
  logic              sticky;
  logic [38:0]       sum;
  int unsigned       lead;
  logic [37:0]       nrm;   // normalised sum: [37] is the leading one, [20] the round bit; lower bits are dropped (ties away)
  logic [16:0]       mr;
  logic signed [8:0] e;

  always_comb begin
    // order by magnitude: {offset exponent, mantissa} compares as unsigned
    if ({fa.exp ^ 6'h20, fa.man} >= {fb.exp ^ 6'h20, fb.man}) begin
      big = fa; sml = fb;
    end else begin
      big = fb; sml = fa;
    end
    ub  = big.exp ^ 6'h20;
    us  = sml.exp ^ 6'h20;
    d   = ub - us;
    wb  = {1'b1, big.man, 21'd0};
    ws  = {1'b1, sml.man, 21'd0};
    wsh = ws >> d;
    sticky = |(ws & ~({38{1'b1}} << d));
    wsh[0] = wsh[0] | sticky;
    if (big.sign ^ sml.sign) sum = {1'b0, wb} - {1'b0, wsh};
    else                     sum = {1'b0, wb} + {1'b0, wsh};

    lead = 0;
    for (int i = 0; i <= 38; i++) if (sum[i]) lead = i;

    e = 9'(signed'(big.exp));
    if (lead == 38) begin
      nrm = sum[38:1];
      e   = e + 9'sd1;
    end else begin
      nrm = sum[37:0] << (37 - lead);
      e   = e - 9'(37 - lead);
    end
    mr = {1'b0, nrm[36:21]} + {16'd0, nrm[20]};
    if (mr[16]) e = e + 9'sd1;

    if (sml.exp == REXP_ZERO)       y = big;   // x + 0 (big is never the zero code here unless both are)
    else if (sum == '0 || e < -9'sd31) y = RZERO;
    else if (e > 9'sd31)            y = {big.sign, 6'd31, 16'hFFFF};
    else                            y = {big.sign, e[5:0], mr[15:0]};
    if (big.exp == REXP_ZERO)       y = RZERO; // both operands zero
  end
endmodule
