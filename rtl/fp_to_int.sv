// fp_to_int: converts a 23-bit register float to a 16-bit two's complement
// integer, rounding to nearest with ties away from zero and saturating to
// -32768..32767. The significand {1,m} is worth S * 2^(e-27); for e >= 26
// the magnitude is at least 32768 and saturates, otherwise S is shifted
// right by 27-e after adding half of the last kept place.
// Combinational: a -> y. The operation is the document's; rounding and
// saturation are this design's choices.
module fp_to_int
  import dsp_pkg::*;
(
  input  logic [22:0] a,
  output logic [15:0] y
);
  rfloat_t f;
  assign f = rfloat_t'(a);

  logic signed [7:0] e;
  logic [7:0]        sh;
  logic [17:0]       mag;

  always_comb begin
    e   = 8'(signed'(f.exp));
    sh  = 8'(8'sd27 - e);
    mag = '0;
    if (f.exp == REXP_ZERO) begin
      y = 16'h0000;
    end else if (e >= 8'sd26) begin
      y = f.sign ? 16'h8000 : 16'h7FFF;
    end else if (sh > 8'd18) begin
      y = 16'h0000;
    end else begin
      mag = ({1'b0, 1'b1, f.man} + (18'd1 << (sh - 8'd1))) >> sh;
      if (!f.sign) y = (mag > 18'd32767) ? 16'h7FFF : mag[15:0];
      else         y = 16'(-mag);
    end
  end
endmodule
