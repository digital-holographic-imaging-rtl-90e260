// cmul: full-precision complex multiplier, (a_re + j a_im) * (b_re + j b_im).
//
// Four signed products and two adders; the result keeps every bit
// (AW + BW + 1 bits per part), so it never overflows and rounds nothing: the
// normalizer that follows decides what to keep. Purely combinational; the
// enclosing unit registers the result. The design asks only for an ordinary
// complex multiplier; the four-multiplier form is this implementation's choice.
module cmul #(
  parameter int unsigned AW = 12,
  parameter int unsigned BW = 12,
  localparam int unsigned PW = AW + BW + 1
) (
  input  logic signed [AW-1:0] a_re, a_im,
  input  logic signed [BW-1:0] b_re, b_im,
  output logic signed [PW-1:0] p_re, p_im
);

  logic signed [PW-1:0] rr, ii, ri, ir;  // partial products, sign-extended

  always_comb begin
    rr   = PW'(a_re) * PW'(b_re);
    ii   = PW'(a_im) * PW'(b_im);
    ri   = PW'(a_re) * PW'(b_im);
    ir   = PW'(a_im) * PW'(b_re);
    p_re = rr - ii;
    p_im = ri + ir;
  end

endmodule
