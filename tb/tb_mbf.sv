// tb_mbf: self-checking testbench of the radix-2^2 modified butterfly unit
// (two equalizing butterflies with the -j rotation between them).
// L = 16 (LOG2L 4). Every input sample gets a random mantissa and its own
// random exponent, so the equalizers have to align operands. The expected
// output stream, (L/2 + 1) + (L/4 + 1) steps after the input, is computed in
// real arithmetic from the radix-2^2 decomposition: for output position
// p = k1*L/2 + k2*L/4 + n of a block,
//   B(n')  = x[n'] + (-1)^k1 x[n' + L/2]
//   H      = B(n) + (-1)^k2 (-j)^k1 B(n + L/4).
// Each output value (mantissa * 2**exponent) must be within 3 LSBs of its
// exponent of H (the equalizers drop shifted-out bits). Counted: samples
// whose operands had different exponents.
module tb_mbf;
  localparam int unsigned LOG2L = 4, L = 16, IW = 10, EW = 5;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [LOG2L-1:0] idx = '0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic signed [EW-1:0] in_exp = '0;
  logic signed [IW+1:0] out_re, out_im;
  logic signed [EW-1:0] out_exp;
  int checks = 0, failures = 0, n_unequal = 0;

  always #5 clk = ~clk;

  mbf #(.LOG2L(LOG2L), .IW(IW), .EW(EW)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .idx(idx),
    .in_re(in_re), .in_im(in_im), .in_exp(in_exp),
    .out_re(out_re), .out_im(out_im), .out_exp(out_exp)
  );

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real xr [$], xi [$];
  int  xe [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    s = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      en = ($urandom_range(99) < 85);
      in_re = IW'($urandom);
      in_im = IW'($urandom);
      in_exp = EW'(int'($urandom_range(6)) - 3);
      idx = LOG2L'(s);
      if (en) begin
        int v;
        xr.push_back(real'(in_re) * 2.0 ** real'(in_exp));
        xi.push_back(real'(in_im) * 2.0 ** real'(in_exp));
        xe.push_back(int'(in_exp));
        v = s - (L / 2 + 1) - (L / 4 + 1);
        if (v >= 0) begin
          int b, p, k1, k2, n;
          real b0r, b0i, b1r, b1i, tr, ti, hr, hi, lsb;
          b  = (v / L) * L;
          p  = v % L;
          k1 = p / (L / 2);
          k2 = (p / (L / 4)) % 2;
          n  = p % (L / 4);
          b0r = xr[b + n]         + (k1 ? -1.0 : 1.0) * xr[b + n + L / 2];
          b0i = xi[b + n]         + (k1 ? -1.0 : 1.0) * xi[b + n + L / 2];
          b1r = xr[b + n + L / 4] + (k1 ? -1.0 : 1.0) * xr[b + n + 3 * L / 4];
          b1i = xi[b + n + L / 4] + (k1 ? -1.0 : 1.0) * xi[b + n + 3 * L / 4];
          if (k1) begin  // multiply by -j
            tr = b1i; ti = -b1r;
          end else begin
            tr = b1r; ti = b1i;
          end
          hr = b0r + (k2 ? -1.0 : 1.0) * tr;
          hi = b0i + (k2 ? -1.0 : 1.0) * ti;
          if (xe[b + n] != xe[b + n + L / 2] || xe[b + n + L / 4] != xe[b + n + 3 * L / 4]) n_unequal++;
          lsb = 2.0 ** real'(out_exp);
          checks++;
          if (fabs(real'(out_re) * lsb - hr) > 3.0 * lsb || fabs(real'(out_im) * lsb - hi) > 3.0 * lsb) begin
            failures++;
            if (failures < 10) $display("FAIL: output %0d = (%0d,%0d)e%0d, expected (%0.2f,%0.2f)",
                                        v, out_re, out_im, out_exp, hr, hi);
          end
        end
        s++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_unequal == 0) begin
      failures++;
      $display("FAIL: no operands with different exponents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
