// normalizer: turns a wide complex value into the pipeline's hybrid floating
// point format, an OW-bit mantissa pair with one shared exponent, keeping as
// many significant bits as OW allows.
//
// Input: re, im (IW bits signed) and an exponent exp_in (EW bits signed); the
// value is (re + j*im) * 2**(exp_in + EXP_OFS). EXP_OFS is a constant, used
// by the twiddle multiplier to remove the fractional bits of the twiddle
// factors. The redundant sign bits common to re and im are counted (k); both
// are shifted left by k and their top OW bits kept, so the larger of the two
// parts uses the full mantissa range. The output exponent is
// exp_in + EXP_OFS + (IW - OW) - k. The kept bits are rounded to nearest
// (a positive value that would round past the largest mantissa saturates). k is limited so that the exponent stays
// at or above its smallest value; an exponent above its largest value is
// clamped (it cannot happen at the default sizes). Purely combinational.
//
// One exponent for re and im and normalizing on the fly follow the design;
// rounding and the exponent limits are this implementation's choices.
module normalizer #(
  parameter int unsigned IW      = 24,
  parameter int unsigned OW      = 10,
  parameter int unsigned EW      = 5,
  parameter int          EXP_OFS = 0
) (
  input  logic signed [IW-1:0] in_re, in_im,
  input  logic signed [EW-1:0] exp_in,
  output logic signed [OW-1:0] out_re, out_im,
  output logic signed [EW-1:0] exp_out
);

  localparam int EMIN = -(2 ** (EW - 1));
  localparam int EMAX = 2 ** (EW - 1) - 1;

  // number of bits below the sign bit that equal it
  function automatic int sign_run(input logic [IW-1:0] v);
    int n;
    n = 0;
    for (int i = IW - 2; i >= 0; i--) begin
      if (v[i] != v[IW-1]) break;
      n++;
    end
    return n;
  endfunction

  // keep the top OW bits of v, rounded to nearest (ties up); a positive
  // value that rounds past the largest mantissa saturates
  function automatic logic signed [OW-1:0] round_top(input logic signed [IW-1:0] v);
    logic signed [IW:0] r;
    r = (IW+1)'(v) + (IW+1)'(2 ** (IW - OW - 1));
    r = r >>> (IW - OW);
    if (r > (IW+1)'(2 ** (OW - 1) - 1)) return {1'b0, {(OW-1){1'b1}}};
    return OW'(r);
  endfunction

  int k, kmax, e;
  logic signed [IW-1:0] sh_re, sh_im;

  always_comb begin
    k    = (sign_run(in_re) < sign_run(in_im)) ? sign_run(in_re) : sign_run(in_im);
    kmax = int'(exp_in) + EXP_OFS + int'(IW) - int'(OW) - EMIN;
    if (kmax < 0) kmax = 0;
    if (k > kmax) k = kmax;
    e     = int'(exp_in) + EXP_OFS + int'(IW) - int'(OW) - k;
    sh_re = in_re << k;
    sh_im = in_im << k;
    out_re  = round_top(sh_re);
    out_im  = round_top(sh_im);
    exp_out = (e > EMAX) ? EW'(EMAX) : EW'(e);
  end

endmodule
