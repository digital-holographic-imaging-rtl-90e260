// tb_equalizer: self-checking testbench of the exponent equalizer.
// Random complex mantissas and exponents (including equal exponents and
// differences larger than the mantissa width). Expected: the common exponent
// is the larger one, the other value's mantissas are floor(m / 2**diff)
// computed in real arithmetic, the larger-exponent value passes unchanged.
module tb_equalizer;
  localparam int unsigned W = 11, EW = 5;

  logic signed [W-1:0]  a_re, a_im, b_re, b_im;
  logic signed [EW-1:0] a_exp, b_exp;
  logic signed [W-1:0]  ya_re, ya_im, yb_re, yb_im;
  logic signed [EW-1:0] y_exp;
  int checks = 0, failures = 0;

  equalizer #(.W(W), .EW(EW)) u_dut (
    .a_re(a_re), .a_im(a_im), .a_exp(a_exp), .b_re(b_re), .b_im(b_im), .b_exp(b_exp),
    .ya_re(ya_re), .ya_im(ya_im), .yb_re(yb_re), .yb_im(yb_im), .y_exp(y_exp)
  );

  function automatic int fl(input int m, input int d);
    return int'($floor(real'(m) / (2.0 ** d)));
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int ea, eb, e, xar, xai, xbr, xbi;
      a_re = W'($urandom); a_im = W'($urandom);
      b_re = W'($urandom); b_im = W'($urandom);
      a_exp = EW'($urandom);
      b_exp = (t % 5 == 0) ? a_exp : EW'($urandom);
      #1;
      ea = int'(a_exp); eb = int'(b_exp);
      e = (ea > eb) ? ea : eb;
      xar = fl(int'(a_re), e - ea); xai = fl(int'(a_im), e - ea);
      xbr = fl(int'(b_re), e - eb); xbi = fl(int'(b_im), e - eb);
      checks++;
      if (int'(y_exp) != e || int'(ya_re) != xar || int'(ya_im) != xai ||
          int'(yb_re) != xbr || int'(yb_im) != xbi) begin
        failures++;
        if (failures < 10)
          $display("FAIL: a=(%0d,%0d)e%0d b=(%0d,%0d)e%0d -> a=(%0d,%0d) b=(%0d,%0d) e%0d",
                   a_re, a_im, ea, b_re, b_im, eb, ya_re, ya_im, yb_re, yb_im, y_exp);
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
