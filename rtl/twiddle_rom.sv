// twiddle_rom: twiddle factor table W_L^m = exp(-j*2*pi*m/L), m = 0..DEPTH-1,
// for one multiplier of the pipelined FFT (L = 2**LOG2L).
//
// Each entry holds the real and imaginary part as TW_W-bit signed integers
// with TW_W-2 fractional bits, so +1.0 and -1.0 are both exact. The table is
// computed at elaboration time (integer Taylor series in hfp_pkg::twiddle),
// not read from a file. Read is combinational: w_re/w_im follow addr.
// An address at or above DEPTH returns W^0 = 1.
// The design names a twiddle factor ROM; its format, one table per
// multiplier and the unfolded layout are this implementation's choices.
module twiddle_rom #(
  parameter int unsigned LOG2L = 6,
  parameter int unsigned DEPTH = 46,
  parameter int unsigned TW_W  = 12,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [AW-1:0]          addr,
  output logic signed [TW_W-1:0] w_re, w_im
);

  localparam int unsigned FRAC = TW_W - 2;

  logic [2*TW_W-1:0] tab [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_entry
    localparam logic [63:0] T = hfp_pkg::twiddle(i, LOG2L, FRAC);
    assign tab[i] = {T[32 +: TW_W], T[0 +: TW_W]};
  end

  always_comb begin
    if (int'(addr) < DEPTH) {w_re, w_im} = tab[addr];
    else begin
      w_re = TW_W'(1) <<< FRAC;
      w_im = '0;
    end
  end

endmodule
