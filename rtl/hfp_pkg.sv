// hfp_pkg: shared constants and helper functions of the hybrid floating point
// (HFP) pipelined FFT.
//
// A data sample inside the pipeline is a complex value whose real and
// imaginary parts are signed integer mantissas sharing one signed exponent:
//   value = (re + j*im) * 2**exp.
// The defaults below give a 2048-point transform (the size the design is
// built for) with 10-bit mantissas, a 5-bit exponent and 12-bit twiddle
// factors. The transform size follows the design target; the three word
// lengths are this implementation's own choice.
package hfp_pkg;

  parameter int unsigned LOG2N_DEF  = 11;  // 2048-point transform
  parameter int unsigned MANT_W_DEF = 10;  // mantissa bits of re and im
  parameter int unsigned EXP_W_DEF  = 5;   // signed shared exponent bits
  parameter int unsigned TW_W_DEF   = 12;  // twiddle factor bits (re and im)

  // 2*pi in Q30 fixed point, used to build the twiddle tables.
  localparam longint TWO_PI_Q30 = 64'sd6746518852;

  // sin (odd = 1) or cos (odd = 0) of phi by Taylor series; phi and the
  // result are Q30, 0 <= phi < pi/2.
  function automatic longint taylor_q30(input longint phi, input bit odd);
    longint p2, t, acc;
    p2  = (phi * phi) >>> 30;
    t   = odd ? phi : (64'sd1 <<< 30);
    acc = 0;
    for (int k = 0; k < 14; k++) begin
      acc = acc + t;
      if (odd) t = -((t * p2) >>> 30) / longint'((2 * k + 2) * (2 * k + 3));
      else     t = -((t * p2) >>> 30) / longint'((2 * k + 1) * (2 * k + 2));
    end
    return acc;
  endfunction

  // Twiddle factor W_L^m = exp(-j*2*pi*m/L), each part rounded to a signed
  // integer with FRAC fractional bits. Returns {re, im}, each 32 bits.
  function automatic logic [63:0] twiddle(input int unsigned m, input int unsigned log2l,
                                          input int unsigned frac);
    longint l, mm, quad, r, phi, s, c, wr, wi, half;
    l    = longint'(1) <<< log2l;
    mm   = longint'(m) % l;
    quad = (mm * 4) / l;
    r    = mm - quad * (l / 4);
    phi  = (TWO_PI_Q30 * r) / l;
    s    = taylor_q30(phi, 1'b1);
    c    = taylor_q30(phi, 1'b0);
    // exp(-j(phi + quad*pi/2)) = cos - j sin of the full angle
    case (quad)
      0:       begin wr =  c; wi = -s; end
      1:       begin wr = -s; wi = -c; end
      2:       begin wr = -c; wi =  s; end
      default: begin wr =  s; wi =  c; end
    endcase
    half = longint'(1) <<< (29 - frac);
    wr = (wr + half) >>> (30 - frac);
    wi = (wi + half) >>> (30 - frac);
    return {wr[31:0], wi[31:0]};
  endfunction

  // Reverse the lowest n bits of v.
  function automatic int unsigned bitrev(input int unsigned v, input int unsigned n);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 32; i++) if (i < n) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

endpackage
