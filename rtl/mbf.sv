// mbf: modified butterfly unit, the radix-2^2 single-path delay feedback
// stage of the hybrid floating point pipeline.
//
// L = 2**LOG2L samples make one block; idx is the position (0..L-1) within
// the block of the sample now at the input. Two equalizing butterflies
// (eq_butterfly) follow each other:
//   BF I  delay L/2, butterfly in the second half of the block (idx[LOG2L-1]);
//   -j    the samples in the last quarter of BF I's output block are
//         multiplied by -j (re' = im, im' = -re), the trivial twiddle of the
//         radix-2^2 algorithm;
//   BF II delay L/4, butterfly in the second quarter of each half block.
// Each butterfly has its own equalizer, so each adds its operands at a common
// exponent, and each adds one mantissa bit: output mantissas are IW+2 bits
// wide. Latency: (L/2 + 1) + (L/4 + 1) enabled clocks.
// The structure follows the radix-2^2 decimation-in-frequency algorithm with
// equalizers in front of the butterflies. Negating the most negative
// mantissa in the -j rotation saturates (own choice).
module mbf #(
  parameter int unsigned LOG2L = 10,
  parameter int unsigned IW    = 10,
  parameter int unsigned EW    = 5,
  localparam int unsigned OW   = IW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [LOG2L-1:0]     idx,
  input  logic signed [IW-1:0] in_re, in_im,
  input  logic signed [EW-1:0] in_exp,
  output logic signed [OW-1:0] out_re, out_im,
  output logic signed [EW-1:0] out_exp
);

  localparam int unsigned L  = 2 ** LOG2L;
  localparam int unsigned MW = IW + 1;  // between the two butterflies

  logic signed [MW-1:0] s1_re, s1_im, r_re, r_im;
  logic signed [EW-1:0] s1_exp;
  logic [LOG2L-1:0]     u;              // position of BF I's output sample
  logic                 rot;

  eq_butterfly #(.DEPTH(L / 2), .IW(IW), .EW(EW)) u_bf1 (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(idx[LOG2L-1]),
    .in_re(in_re), .in_im(in_im), .in_exp(in_exp),
    .out_re(s1_re), .out_im(s1_im), .out_exp(s1_exp)
  );

  assign u   = idx - LOG2L'(L / 2 + 1);
  assign rot = u[LOG2L-1] & u[LOG2L-2];

  function automatic logic signed [MW-1:0] neg_sat(input logic signed [MW-1:0] v);
    if (v == {1'b1, {(MW-1){1'b0}}}) return {1'b0, {(MW-1){1'b1}}};
    return -v;
  endfunction

  always_comb begin
    if (rot) begin
      r_re = s1_im;
      r_im = neg_sat(s1_re);
    end else begin
      r_re = s1_re;
      r_im = s1_im;
    end
  end

  eq_butterfly #(.DEPTH(L / 4), .IW(MW), .EW(EW)) u_bf2 (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(u[LOG2L-2]),
    .in_re(r_re), .in_im(r_im), .in_exp(s1_exp),
    .out_re(out_re), .out_im(out_im), .out_exp(out_exp)
  );

endmodule
