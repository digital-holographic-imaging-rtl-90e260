// equalizer: aligns the exponents of two hybrid floating point complex values
// so that an ordinary fixed-point butterfly can add and subtract them.
//
// Each input is a complex mantissa (re, im, W bits signed) with one shared
// signed exponent: value = (re + j*im) * 2**exp. The output exponent is the
// larger of the two; the mantissas of the value with the smaller exponent are
// shifted right arithmetically by the difference (bits shifted out are
// dropped, i.e. rounded towards minus infinity). The value with the larger
// exponent passes unchanged. Purely combinational.
//
// Aligning to the larger exponent, so that nothing can overflow, and
// truncating the shifted-out bits are this implementation's choices.
module equalizer #(
  parameter int unsigned W  = 11,
  parameter int unsigned EW = 5
) (
  input  logic signed [W-1:0]  a_re, a_im,
  input  logic signed [EW-1:0] a_exp,
  input  logic signed [W-1:0]  b_re, b_im,
  input  logic signed [EW-1:0] b_exp,
  output logic signed [W-1:0]  ya_re, ya_im,
  output logic signed [W-1:0]  yb_re, yb_im,
  output logic signed [EW-1:0] y_exp
);

  logic signed [EW:0] diff;      // a_exp - b_exp, one bit wider: cannot overflow
  logic        [EW:0] sh;        // magnitude of the difference

  always_comb begin
    diff = (EW+1)'(a_exp) - (EW+1)'(b_exp);
    ya_re = a_re;
    ya_im = a_im;
    yb_re = b_re;
    yb_im = b_im;
    if (diff < 0) begin
      sh    = (EW+1)'(-diff);
      y_exp = b_exp;
      ya_re = a_re >>> sh;
      ya_im = a_im >>> sh;
    end else begin
      sh    = (EW+1)'(diff);
      y_exp = a_exp;
      yb_re = b_re >>> sh;
      yb_im = b_im >>> sh;
    end
  end

endmodule
