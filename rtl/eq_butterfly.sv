// eq_butterfly: one radix-2 single-path delay feedback butterfly working on
// hybrid floating point data: an equalizer in front of a plain fixed-point
// butterfly, and a feedback delay line that stores the exponent next to the
// mantissas. Two of these, with a -j rotation between them, make one MBF
// (radix-2^2 stage).
//
// DEPTH is the delay (half the block the butterfly works on). mode selects
// the operation for the sample now at the input:
//  - mode 0: the input (mantissas sign-extended, exponent) goes into the
//    delay line; the delay line's head goes out;
//  - mode 1: head and input are brought to the larger of their exponents by
//    the equalizer, then added and subtracted; the sum goes out, the
//    difference goes into the delay line, both with the common exponent.
// The output is registered and one bit wider than the input (IW+1), so the
// butterfly never overflows: latency DEPTH + 1 enabled clocks.
module eq_butterfly #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned IW    = 10,
  parameter int unsigned EW    = 5,
  localparam int unsigned OW   = IW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 mode,
  input  logic signed [IW-1:0] in_re, in_im,
  input  logic signed [EW-1:0] in_exp,
  output logic signed [OW-1:0] out_re, out_im,
  output logic signed [EW-1:0] out_exp
);

  logic signed [OW-1:0] x_re, x_im, f_re, f_im;
  logic signed [EW-1:0] f_exp;
  logic signed [OW-1:0] a_re, a_im, b_re, b_im;
  logic signed [EW-1:0] e_eq;
  logic signed [OW-1:0] fin_re, fin_im, nxt_re, nxt_im;
  logic signed [EW-1:0] fin_exp, nxt_exp;

  assign x_re = OW'(in_re);
  assign x_im = OW'(in_im);

  delay_feedback #(.DEPTH(DEPTH), .WIDTH(2 * OW + EW)) u_fifo (
    .clk(clk), .rst_n(rst_n), .en(en),
    .din({fin_re, fin_im, fin_exp}), .dout({f_re, f_im, f_exp})
  );

  equalizer #(.W(OW), .EW(EW)) u_eq (
    .a_re(f_re), .a_im(f_im), .a_exp(f_exp),
    .b_re(x_re), .b_im(x_im), .b_exp(in_exp),
    .ya_re(a_re), .ya_im(a_im), .yb_re(b_re), .yb_im(b_im), .y_exp(e_eq)
  );

  always_comb begin
    if (mode) begin
      nxt_re  = a_re + b_re;
      nxt_im  = a_im + b_im;
      nxt_exp = e_eq;
      fin_re  = a_re - b_re;
      fin_im  = a_im - b_im;
      fin_exp = e_eq;
    end else begin
      nxt_re  = f_re;
      nxt_im  = f_im;
      nxt_exp = f_exp;
      fin_re  = x_re;
      fin_im  = x_im;
      fin_exp = in_exp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re  <= '0;
      out_im  <= '0;
      out_exp <= '0;
    end else if (en) begin
      out_re  <= nxt_re;
      out_im  <= nxt_im;
      out_exp <= nxt_exp;
    end
  end

endmodule
