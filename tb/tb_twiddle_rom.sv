// tb_twiddle_rom: self-checking testbench of the twiddle factor table.
// Reads every entry of a 64-point (LOG2L 6) table with 48 entries and of a
// 2048-point table's first 1024 entries, and compares them with cos/sin
// computed in double precision and rounded to TW_W-2 fractional bits
// (at most one LSB apart). An address past the table must give 1.
module tb_twiddle_rom;
  localparam int unsigned TW_W = 12;
  localparam int unsigned FRAC = TW_W - 2;
  localparam real PI = 3.14159265358979323846;

  logic [5:0]  a6;
  logic [9:0]  a11;
  logic signed [TW_W-1:0] r6, i6, r11, i11;
  int checks = 0, failures = 0;

  twiddle_rom #(.LOG2L(6),  .DEPTH(46),   .TW_W(TW_W)) u_t6  (.addr(a6),  .w_re(r6),  .w_im(i6));
  twiddle_rom #(.LOG2L(11), .DEPTH(1024), .TW_W(TW_W)) u_t11 (.addr(a11), .w_re(r11), .w_im(i11));

  task automatic cmp(input int m, input int log2l, input logic signed [TW_W-1:0] gr, gi);
    real er, ei;
    er = $cos(2.0 * PI * m / (2.0 ** log2l)) * (2.0 ** FRAC);
    ei = -$sin(2.0 * PI * m / (2.0 ** log2l)) * (2.0 ** FRAC);
    checks++;
    if ((real'(gr) - er) > 1.0 || (er - real'(gr)) > 1.0 || (real'(gi) - ei) > 1.0 || (ei - real'(gi)) > 1.0) begin
      failures++;
      if (failures < 10) $display("FAIL: L=2^%0d m=%0d got (%0d,%0d) expected (%0.2f,%0.2f)", log2l, m, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int m = 0; m < 46; m++) begin
      a6 = 6'(m); #1;
      cmp(m, 6, r6, i6);
    end
    for (int m = 0; m < 1024; m++) begin
      a11 = 10'(m); #1;
      cmp(m, 11, r11, i11);
    end
    a6 = 6'd50; #1;
    checks++;
    if (r6 != (1 <<< FRAC) || i6 != 0) begin
      failures++;
      $display("FAIL: out-of-range address did not give 1");
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
