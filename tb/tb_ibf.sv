// tb_ibf: self-checking testbench of the radix-2 delay feedback butterfly.
// L = 16 (LOG2L 4). Random fixed-point samples stream in with random enable
// gaps; idx counts the enabled steps mod L. The expected output stream,
// L/2 + 1 steps after the input, is the radix-2 decimation-in-frequency
// butterfly of each block: position p < L/2 gives x[p] + x[p+L/2], position
// p >= L/2 gives x[p-L/2] - x[p]. Exact comparison, which also checks the
// latency.
module tb_ibf;
  localparam int unsigned LOG2L = 4, L = 16, IW = 10;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [LOG2L-1:0] idx = '0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic signed [IW:0] out_re, out_im;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ibf #(.LOG2L(LOG2L), .IW(IW)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .idx(idx),
    .in_re(in_re), .in_im(in_im), .out_re(out_re), .out_im(out_im)
  );

  int xr [$], xi [$];

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
    for (int t = 0; t < 2500; t++) begin
      en = ($urandom_range(99) < 85);
      in_re = IW'($urandom);
      in_im = IW'($urandom);
      if (t % 200 < 8) begin  // full-scale corner values
        in_re = {1'b1, {(IW-1){1'b0}}};
        in_im = {1'b0, {(IW-1){1'b1}}};
      end
      idx = LOG2L'(s);
      if (en) begin
        int u;
        xr.push_back(int'(in_re));
        xi.push_back(int'(in_im));
        u = s - (L / 2 + 1);
        if (u >= 0) begin
          int b, p, er, ei;
          b = (u / L) * L;
          p = u % L;
          if (p < L / 2) begin
            er = xr[b + p] + xr[b + p + L / 2];
            ei = xi[b + p] + xi[b + p + L / 2];
          end else begin
            er = xr[b + p - L / 2] - xr[b + p];
            ei = xi[b + p - L / 2] - xi[b + p];
          end
          checks++;
          if (int'(out_re) != er || int'(out_im) != ei) begin
            failures++;
            if (failures < 10) $display("FAIL: output %0d = (%0d,%0d), expected (%0d,%0d)", u, out_re, out_im, er, ei);
          end
        end
        s++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
