// cmult: full-precision complex multiplier, a * w.
// Four 16x16 signed multiplies and two adders, purely combinational. Both
// parts of the result are 32 bits wide. This is exact as long as the twiddle
// parts stay within +-32767, as every entry of the Q1.15 twiddle table does:
// then |ar*wr - ai*wi| and |ar*wi + ai*wr| are at most 2*32768*32767 < 2^31.
// (Only w = (-32768, -32768) times a = (-32768, -32768) would need 33 bits.)
// Keeping the products at 32 bits and rounding only after the additions
// follows the document; operand order and the lack of pipelining are this
// design's choice.
module cmult
  import fft_pkg::*;
(
  input  cplx_t  a,
  input  cplx_t  w,
  output cprod_t p
);

  sprod_t rr, ii, ri, ir;

  always_comb begin
    rr = sprod_t'(a.re) * sprod_t'(w.re);
    ii = sprod_t'(a.im) * sprod_t'(w.im);
    ri = sprod_t'(a.re) * sprod_t'(w.im);
    ir = sprod_t'(a.im) * sprod_t'(w.re);
    p.re = rr - ii;
    p.im = ri + ir;
  end

endmodule
