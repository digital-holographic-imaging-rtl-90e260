// tb_normalizer: self-checking testbench of the normalizer.
// Random wide complex values of every magnitude (random number of leading
// sign bits), random input exponents. The reference, in real arithmetic:
// the output exponent is the smallest one (not below the format's minimum)
// at which both parts, truncated, fit OW signed bits; the mantissas are the
// parts rounded to nearest at that exponent, saturated at the largest
// positive mantissa. A zero input must give zero mantissas.
module tb_normalizer;
  localparam int unsigned IW = 20, OW = 10, EW = 5;
  localparam int EXP_OFS = -10;
  localparam int EMIN = -(2 ** (EW - 1));

  logic signed [IW-1:0] in_re, in_im;
  logic signed [EW-1:0] exp_in;
  logic signed [OW-1:0] out_re, out_im;
  logic signed [EW-1:0] exp_out;
  int checks = 0, failures = 0;

  normalizer #(.IW(IW), .OW(OW), .EW(EW), .EXP_OFS(EXP_OFS)) u_dut (
    .in_re(in_re), .in_im(in_im), .exp_in(exp_in),
    .out_re(out_re), .out_im(out_im), .exp_out(exp_out)
  );

  function automatic bit fits(input real v, input int sh);
    real t;
    t = $floor(v / (2.0 ** sh));
    return (t >= -(2.0 ** (OW - 1))) && (t <= (2.0 ** (OW - 1)) - 1.0);
  endfunction

  function automatic int rnd(input real v, input int sh);
    real t;
    t = $floor(v / (2.0 ** sh) + 0.5);
    if (t > (2.0 ** (OW - 1)) - 1.0) t = (2.0 ** (OW - 1)) - 1.0;
    return int'(t);
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int e0, e, sr, si, xr, xi;
      sr = int'($urandom_range(IW - 1));
      si = int'($urandom_range(IW - 1));
      in_re = IW'($signed(IW'($urandom)) >>> sr);
      in_im = IW'($signed(IW'($urandom)) >>> si);
      if (t == 0) begin in_re = '0; in_im = '0; end
      if (t == 1) begin in_re = {1'b0, {(IW-1){1'b1}}}; in_im = {1'b1, {(IW-1){1'b0}}}; end
      exp_in = EW'(int'($urandom_range(17)) - 12);
      #1;
      e0 = int'(exp_in) + EXP_OFS;
      checks++;
      if (in_re == 0 && in_im == 0) begin
        if (out_re != 0 || out_im != 0) begin
          failures++;
          $display("FAIL: zero input gave (%0d,%0d)", out_re, out_im);
        end
        continue;
      end
      e = EMIN;
      while (!(fits(real'(in_re), e - e0) && fits(real'(in_im), e - e0))) e++;
      xr = rnd(real'(in_re), e - e0);
      xi = rnd(real'(in_im), e - e0);
      if (int'(exp_out) != e || int'(out_re) != xr || int'(out_im) != xi) begin
        failures++;
        if (failures < 10)
          $display("FAIL: (%0d,%0d)e%0d -> (%0d,%0d)e%0d, expected (%0d,%0d)e%0d",
                   in_re, in_im, e0, out_re, out_im, exp_out, xr, xi, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
