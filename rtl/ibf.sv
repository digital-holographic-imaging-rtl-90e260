// ibf: the normal radix-2 single-path delay feedback butterfly unit of the
// first pipeline stage, working on plain fixed-point input (no exponent).
//
// L = 2**LOG2L samples make one block; idx is the position (0..L-1) within
// the block of the sample now at the input. The feedback delay line holds
// L/2 samples.
//  - first half of the block (idx < L/2): the input goes into the delay line
//    and the delay line's head (the difference from the previous block) goes
//    out;
//  - second half: the head x[n] and the input x[n+L/2] are added and
//    subtracted; the sum goes out, the difference goes into the delay line.
// The output is registered and one bit wider than the input (IW+1), so the
// butterfly never overflows. Output sample u = x-position - L/2 appears
// L/2 + 1 enabled clocks after its x[n+L/2] input: latency L/2 + 1 steps.
// en advances the whole unit by one sample.
module ibf #(
  parameter int unsigned LOG2L = 11,
  parameter int unsigned IW    = 10,
  localparam int unsigned OW   = IW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [LOG2L-1:0]     idx,
  input  logic signed [IW-1:0] in_re, in_im,
  output logic signed [OW-1:0] out_re, out_im
);

  localparam int unsigned DEPTH = 2 ** (LOG2L - 1);

  logic                 mode;   // 1: butterfly, 0: fill/drain
  logic signed [OW-1:0] x_re, x_im, f_re, f_im;
  logic signed [OW-1:0] fin_re, fin_im, nxt_re, nxt_im;

  assign mode = idx[LOG2L-1];
  assign x_re = OW'(in_re);
  assign x_im = OW'(in_im);

  delay_feedback #(.DEPTH(DEPTH), .WIDTH(2 * OW)) u_fifo (
    .clk(clk), .rst_n(rst_n), .en(en),
    .din({fin_re, fin_im}), .dout({f_re, f_im})
  );

  always_comb begin
    if (mode) begin
      nxt_re = f_re + x_re;
      nxt_im = f_im + x_im;
      fin_re = f_re - x_re;
      fin_im = f_im - x_im;
    end else begin
      nxt_re = f_re;
      nxt_im = f_im;
      fin_re = x_re;
      fin_im = x_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      out_re <= nxt_re;
      out_im <= nxt_im;
    end
  end

endmodule
