// tb_mul_unit: self-checking testbench of the MUL block (twiddle ROM,
// complex multiplier, normalizer). Two instances with L = 64: one after a
// radix-2 butterfly (twiddle W_L^(n*k1)) and one after a radix-2^2 pair
// (twiddle W_L^(n*(k1+2*k2))). Random positions, mantissas and exponents are
// applied with random enable gaps. The expected output, two enabled steps
// later, is x * exp(-j*2*pi*m/L) in double precision, with m worked out here
// from the position. Each part must be within one output LSB plus the
// twiddle quantization error of it, and every non-zero output must be
// normalized (larger part at least half of full scale).
module tb_mul_unit;
  localparam int unsigned LOG2L = 6, L = 64, IW = 12, OW = 10, EW = 5, TW_W = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [LOG2L-1:0] idx = '0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic signed [EW-1:0] in_exp = '0;
  logic signed [OW-1:0] o2_re, o2_im, o4_re, o4_im;
  logic signed [EW-1:0] o2_exp, o4_exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_unit #(.LOG2L(LOG2L), .RADIX2(1'b1), .IW(IW), .OW(OW), .EW(EW), .TW_W(TW_W)) u_r2 (
    .clk(clk), .rst_n(rst_n), .en(en), .idx(idx), .in_re(in_re), .in_im(in_im), .in_exp(in_exp),
    .out_re(o2_re), .out_im(o2_im), .out_exp(o2_exp)
  );
  mul_unit #(.LOG2L(LOG2L), .RADIX2(1'b0), .IW(IW), .OW(OW), .EW(EW), .TW_W(TW_W)) u_r22 (
    .clk(clk), .rst_n(rst_n), .en(en), .idx(idx), .in_re(in_re), .in_im(in_im), .in_exp(in_exp),
    .out_re(o4_re), .out_im(o4_im), .out_exp(o4_exp)
  );

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real e2r [$], e2i [$], e4r [$], e4i [$], mag [$];

  task automatic check(input string name, input logic signed [OW-1:0] gr, gi,
                       input logic signed [EW-1:0] ge, input real er, ei, m);
    real lsb, tol;
    lsb = 2.0 ** real'(ge);
    tol = lsb + m * (2.0 ** (-real'(TW_W - 2)));
    checks++;
    if (fabs(real'(gr) * lsb - er) > tol || fabs(real'(gi) * lsb - ei) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (%0d,%0d)e%0d expected (%0.3f,%0.3f)", name, gr, gi, ge, er, ei);
    end
    checks++;
    if ((gr != 0 || gi != 0) && int'(ge) > -(2 ** (EW - 1)) &&
        !(gr >= 2 ** (OW - 2) || gr <= -(2 ** (OW - 2)) || gi >= 2 ** (OW - 2) || gi <= -(2 ** (OW - 2)))) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (%0d,%0d)e%0d not normalized", name, gr, gi, ge);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      en = ($urandom_range(99) < 85);
      idx = LOG2L'($urandom);
      in_re = IW'($signed(IW'($urandom)) >>> $urandom_range(8));
      in_im = IW'($signed(IW'($urandom)) >>> $urandom_range(8));
      in_exp = EW'(int'($urandom_range(8)) - 4);
      if (en) begin
        int k1, k2, n2, n4, m2, m4;
        real xr, xi, a2, a4;
        if (e2r.size() == 2) begin
          check("radix-2", o2_re, o2_im, o2_exp, e2r.pop_front(), e2i.pop_front(), mag[0]);
          check("radix-2^2", o4_re, o4_im, o4_exp, e4r.pop_front(), e4i.pop_front(), mag.pop_front());
        end
        xr = real'(in_re) * 2.0 ** real'(in_exp);
        xi = real'(in_im) * 2.0 ** real'(in_exp);
        k1 = int'(idx) / (L / 2);
        k2 = (int'(idx) / (L / 4)) % 2;
        n2 = int'(idx) % (L / 2);
        n4 = int'(idx) % (L / 4);
        m2 = n2 * k1;
        m4 = n4 * (k1 + 2 * k2);
        a2 = 2.0 * PI * m2 / L;
        a4 = 2.0 * PI * m4 / L;
        e2r.push_back(xr * $cos(a2) + xi * $sin(a2));
        e2i.push_back(xi * $cos(a2) - xr * $sin(a2));
        e4r.push_back(xr * $cos(a4) + xi * $sin(a4));
        e4i.push_back(xi * $cos(a4) - xr * $sin(a4));
        mag.push_back(fabs(xr) + fabs(xi));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
