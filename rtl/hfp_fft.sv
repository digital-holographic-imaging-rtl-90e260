// hfp_fft: pipelined FFT processor with hybrid floating point data scaling.
//
// Computes N = 2**LOG2N point DFTs, X[k] = sum_n x[n] * exp(-j*2*pi*n*k/N),
// one complex sample per enabled clock, frames back to back. The algorithm
// is radix-2^2 decimation in frequency with single-path delay feedback
// (R2^2SDF). For odd LOG2N (2048 points by default) the pipeline is
//   IBF (radix-2, plain fixed point) -> MUL
//   then (LOG2N-1)/2 stages   MBF (radix-2^2, equalizing) -> MUL
// and the last stage, whose twiddles are all 1, ends in a normalizer instead
// of a MUL. For even LOG2N every stage is an MBF stage.
//
// Data scaling: after the first butterfly every sample carries its own
// exponent, shared by its real and imaginary part. Each MUL normalizes its
// product back to MANT_W-bit mantissas; each butterfly equalizes the two
// exponents it combines. The mantissa width therefore stays MANT_W at every
// stage input while the dynamic range is carried by the exponents.
//
// Interface and timing:
//  - in_valid is the pipeline's step enable: a clock with in_valid high
//    takes one input sample and moves every stage by one sample; a clock
//    with in_valid low stalls the whole pipeline. Input samples are numbered
//    from reset, and sample i is x[i mod N] of frame i / N.
//  - out_valid is high on clocks where in_valid is high and the output
//    sample is real, i.e. from LATENCY steps after reset on. Output sample
//    number i (counted like the inputs, delayed by LATENCY steps) is X[k] of
//    frame i / N with k = bit-reverse(i mod N): the result leaves in
//    bit-reversed order. out_index gives i mod N, out_k gives k.
//  - An output value is (out_re + j*out_im) * 2**out_exp.
//  - LATENCY = (N - 1) feedback delay steps + 1 register step per butterfly
//    + 2 per MUL + 1 for the output normalizer: 2069 steps with the
//    defaults. The last frame is pushed out by further input steps.
// Mantissa, exponent and twiddle widths, rounding (truncation), bit-reversed
// output order and the stall-by-enable interface are this implementation's
// choices.
module hfp_fft #(
  parameter int unsigned LOG2N  = hfp_pkg::LOG2N_DEF,
  parameter int unsigned MANT_W = hfp_pkg::MANT_W_DEF,
  parameter int unsigned EXP_W  = hfp_pkg::EXP_W_DEF,
  parameter int unsigned TW_W   = hfp_pkg::TW_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [MANT_W-1:0] in_re, in_im,
  output logic                     out_valid,
  output logic signed [MANT_W-1:0] out_re, out_im,
  output logic signed [EXP_W-1:0]  out_exp,
  output logic [LOG2N-1:0]         out_index,
  output logic [LOG2N-1:0]         out_k
);

  localparam int unsigned N     = 2 ** LOG2N;
  localparam bit          ODD   = (LOG2N % 2) == 1;
  localparam int unsigned NST   = LOG2N / 2;           // radix-2^2 stages
  localparam int unsigned LAT_R2 = ODD ? (N / 2 + 1) + 2 : 0;

  // log2 of the block length of radix-2^2 stage j
  function automatic int unsigned stage_log2l(input int unsigned j);
    return LOG2N - (ODD ? 1 : 0) - 2 * j;
  endfunction

  // steps from the FFT input to the input of radix-2^2 stage j
  function automatic int unsigned stage_ofs(input int unsigned j);
    int unsigned o, l;
    o = LAT_R2;
    for (int unsigned i = 0; i < j; i++) begin
      l = 2 ** stage_log2l(i);
      o += (l / 2 + 1) + (l / 4 + 1) + 2;
    end
    return o;
  endfunction

  // the last stage has a one-step output normalizer instead of a MUL
  localparam int unsigned LATENCY = stage_ofs(NST - 1) + 3 + 2 + 1;

  initial begin
    assert (LOG2N >= 3) else $error("hfp_fft: LOG2N must be at least 3");
  end

  // sample counter: position of the current input step, mod N
  logic [LOG2N-1:0] cnt;
  logic             filled;
  logic [$clog2(LATENCY+1)-1:0] fill_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      fill_cnt <= '0;
    end else if (in_valid) begin
      cnt <= cnt + 1'b1;
      if (!filled) fill_cnt <= fill_cnt + 1'b1;
    end
  end
  assign filled = (fill_cnt == $bits(fill_cnt)'(LATENCY));

  // stage boundary signals: MANT_W mantissas with an exponent
  logic signed [MANT_W-1:0] st_re  [NST+1];
  logic signed [MANT_W-1:0] st_im  [NST+1];
  logic signed [EXP_W-1:0]  st_exp [NST+1];

  if (ODD) begin : g_first
    logic signed [MANT_W:0] b_re, b_im;
    logic [LOG2N-1:0]       midx;

    ibf #(.LOG2L(LOG2N), .IW(MANT_W)) u_ibf (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .idx(cnt),
      .in_re(in_re), .in_im(in_im), .out_re(b_re), .out_im(b_im)
    );

    assign midx = cnt - LOG2N'(N / 2 + 1);

    mul_unit #(.LOG2L(LOG2N), .RADIX2(1'b1), .IW(MANT_W + 1), .OW(MANT_W),
               .EW(EXP_W), .TW_W(TW_W)) u_mul (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .idx(midx),
      .in_re(b_re), .in_im(b_im), .in_exp('0),
      .out_re(st_re[0]), .out_im(st_im[0]), .out_exp(st_exp[0])
    );
  end else begin : g_first
    assign st_re[0]  = in_re;
    assign st_im[0]  = in_im;
    assign st_exp[0] = '0;
  end

  for (genvar j = 0; j < NST; j++) begin : g_stage
    localparam int unsigned LG  = stage_log2l(j);
    localparam int unsigned L   = 2 ** LG;
    localparam int unsigned OFS = stage_ofs(j);

    logic [LG-1:0]              sidx;
    logic signed [MANT_W+1:0]   b_re, b_im;
    logic signed [EXP_W-1:0]    b_exp;

    assign sidx = LG'(cnt - LOG2N'(OFS));

    mbf #(.LOG2L(LG), .IW(MANT_W), .EW(EXP_W)) u_mbf (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .idx(sidx),
      .in_re(st_re[j]), .in_im(st_im[j]), .in_exp(st_exp[j]),
      .out_re(b_re), .out_im(b_im), .out_exp(b_exp)
    );

    if (j < NST - 1) begin : g_mul
      logic [LG-1:0] midx;  // position of the sample at the MUL input
      assign midx = sidx - LG'(L / 2 + 1 + L / 4 + 1);

      mul_unit #(.LOG2L(LG), .RADIX2(1'b0), .IW(MANT_W + 2), .OW(MANT_W),
                 .EW(EXP_W), .TW_W(TW_W)) u_mul (
        .clk(clk), .rst_n(rst_n), .en(in_valid), .idx(midx),
        .in_re(b_re), .in_im(b_im), .in_exp(b_exp),
        .out_re(st_re[j+1]), .out_im(st_im[j+1]), .out_exp(st_exp[j+1])
      );
    end else begin : g_norm
      logic signed [MANT_W-1:0] n_re, n_im;
      logic signed [EXP_W-1:0]  n_exp;

      normalizer #(.IW(MANT_W + 2), .OW(MANT_W), .EW(EXP_W), .EXP_OFS(0)) u_norm (
        .in_re(b_re), .in_im(b_im), .exp_in(b_exp),
        .out_re(n_re), .out_im(n_im), .exp_out(n_exp)
      );

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          st_re[j+1]  <= '0;
          st_im[j+1]  <= '0;
          st_exp[j+1] <= '0;
        end else if (in_valid) begin
          st_re[j+1]  <= n_re;
          st_im[j+1]  <= n_im;
          st_exp[j+1] <= n_exp;
        end
      end
    end
  end

  assign out_re    = st_re[NST];
  assign out_im    = st_im[NST];
  assign out_exp   = st_exp[NST];
  assign out_valid = in_valid & filled;
  assign out_index = cnt - LOG2N'(LATENCY);
  assign out_k     = LOG2N'(hfp_pkg::bitrev(int'(out_index), LOG2N));

endmodule
