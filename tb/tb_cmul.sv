// tb_cmul: self-checking testbench of the complex multiplier. Random and
// extreme operands; the expected product is computed with 64-bit integers.
module tb_cmul;
  localparam int unsigned AW = 13, BW = 12, PW = AW + BW + 1;

  logic signed [AW-1:0] a_re, a_im;
  logic signed [BW-1:0] b_re, b_im;
  logic signed [PW-1:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmul #(.AW(AW), .BW(BW)) u_dut (.a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .p_re(p_re), .p_im(p_im));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint er, ei;
      if (t < 4) begin
        a_re = (t[0]) ? {1'b1, {(AW-1){1'b0}}} : {1'b0, {(AW-1){1'b1}}};
        a_im = (t[1]) ? {1'b1, {(AW-1){1'b0}}} : {1'b0, {(AW-1){1'b1}}};
        b_re = {1'b1, {(BW-1){1'b0}}};
        b_im = (t[0]) ? {1'b1, {(BW-1){1'b0}}} : {1'b0, {(BW-1){1'b1}}};
      end else begin
        a_re = AW'($urandom); a_im = AW'($urandom);
        b_re = BW'($urandom); b_im = BW'($urandom);
      end
      #1;
      er = longint'(a_re) * longint'(b_re) - longint'(a_im) * longint'(b_im);
      ei = longint'(a_re) * longint'(b_im) + longint'(a_im) * longint'(b_re);
      checks++;
      if (longint'(p_re) != er || longint'(p_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d), expected (%0d,%0d)",
                                    a_re, a_im, b_re, b_im, p_re, p_im, er, ei);
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
