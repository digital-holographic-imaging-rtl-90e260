// mul_unit: the MUL block between two butterfly stages of the pipelined FFT:
// twiddle factor ROM, complex multiplier and normalizer.
//
// idx is the position (0..L-1) of the sample now at the input within the
// block of L samples the preceding butterfly stage produced, L = 2**LOG2L.
//  - after a radix-2 butterfly (RADIX2 = 1) the twiddle is W_L^(n*k1), with
//    k1 = idx[LOG2L-1] and n = idx[LOG2L-2:0];
//  - after a radix-2^2 butterfly pair (RADIX2 = 0) it is W_L^(n*(k1+2*k2)),
//    with k1 = idx[LOG2L-1], k2 = idx[LOG2L-2] and n = idx[LOG2L-3:0].
// The full-precision product is registered, then normalized to an OW-bit
// mantissa pair with a shared exponent and registered again: latency is two
// enabled clocks (en is the pipeline's step enable).
// The twiddle indexing is that of the radix-2^2 decimation-in-frequency
// algorithm; the pipeline registers are this implementation's choice.
module mul_unit #(
  parameter int unsigned LOG2L  = 6,
  parameter bit          RADIX2 = 1'b0,
  parameter int unsigned IW     = 12,
  parameter int unsigned OW     = 10,
  parameter int unsigned EW     = 5,
  parameter int unsigned TW_W   = 12
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

  localparam int unsigned L     = 2 ** LOG2L;
  localparam int unsigned DEPTH = RADIX2 ? L / 2 : 3 * (L / 4 - 1) + 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PW    = IW + TW_W + 1;

  logic [AW-1:0]          m;
  logic signed [TW_W-1:0] w_re, w_im;
  logic signed [PW-1:0]   p_re, p_im;
  logic signed [PW-1:0]   p_re_q, p_im_q;
  logic signed [EW-1:0]   p_exp_q;
  logic signed [OW-1:0]   n_re, n_im;
  logic signed [EW-1:0]   n_exp;

  // twiddle exponent m from the sample position
  if (RADIX2) begin : g_r2
    assign m = idx[LOG2L-1] ? AW'(idx[LOG2L-2:0]) : '0;
  end else begin : g_r22
    logic [LOG2L-3:0] n;
    logic [1:0]       kk;
    assign n  = idx[LOG2L-3:0];
    assign kk = {idx[LOG2L-2], idx[LOG2L-1]};  // k1 + 2*k2
    assign m  = AW'(n * kk);
  end

  twiddle_rom #(.LOG2L(LOG2L), .DEPTH(DEPTH), .TW_W(TW_W)) u_rom (
    .addr(m), .w_re(w_re), .w_im(w_im)
  );

  cmul #(.AW(IW), .BW(TW_W)) u_cmul (
    .a_re(in_re), .a_im(in_im), .b_re(w_re), .b_im(w_im), .p_re(p_re), .p_im(p_im)
  );

  normalizer #(.IW(PW), .OW(OW), .EW(EW), .EXP_OFS(-int'(TW_W - 2))) u_norm (
    .in_re(p_re_q), .in_im(p_im_q), .exp_in(p_exp_q),
    .out_re(n_re), .out_im(n_im), .exp_out(n_exp)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_re_q  <= '0;
      p_im_q  <= '0;
      p_exp_q <= '0;
      out_re  <= '0;
      out_im  <= '0;
      out_exp <= '0;
    end else if (en) begin
      p_re_q  <= p_re;
      p_im_q  <= p_im;
      p_exp_q <= in_exp;
      out_re  <= n_re;
      out_im  <= n_im;
      out_exp <= n_exp;
    end
  end

endmodule
