// r4_butterfly: radix-4 decimation-in-time butterfly with its three complex
// multipliers, which can also work as a radix-2 butterfly.
//   y0 = A +   B' + C' +   D'        y2 = A -   B' + C' -   D'
//   y1 = A - j*B' - C' + j*D'        y3 = A + j*B' - C' - j*D'
// with B' = B*Wb, C' = C*Wc, D' = D*Wd. The products keep 32 bits per part;
// A is aligned to the same binary point (A << 15). The four-term sums are 34
// bits long and are rounded back to their 16 most significant bits by adding
// half an LSB of the result and truncating, so every output is the exact sum
// scaled by 1/8 (Q1.15 in, Q1.15 out, no overflow possible).
// radix2 = 1 ties B and D to zero: y0 = y2 = A + C', y1 = y3 = A - C', rounded
// in the same way. Purely combinational.
// The output equations, the 32-bit products, the 34-bit sums, the rounding
// rule and the radix-2 mode follow the document; the output numbering and
// the fixed-point alignment of A are this design's reading of it.
module r4_butterfly
  import fft_pkg::*;
(
  input  logic  radix2,
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t c,
  input  cplx_t d,
  input  cplx_t wb,
  input  cplx_t wc,
  input  cplx_t wd,
  output cplx_t y [4]
);

  typedef logic signed [PW+1:0] s34_t;

  cplx_t  bz, dz;
  cprod_t pb, pc, pd;

  assign bz = radix2 ? '0 : b;
  assign dz = radix2 ? '0 : d;

  cmult u_mb (.a(bz), .w(wb), .p(pb));
  cmult u_mc (.a(c),  .w(wc), .p(pc));
  cmult u_md (.a(dz), .w(wd), .p(pd));

  always_comb begin
    s34_t ar, ai, br, bi, cr, ci, dr, di;
    ar = s34_t'(a.re) <<< 15;
    ai = s34_t'(a.im) <<< 15;
    br = s34_t'(pb.re); bi = s34_t'(pb.im);
    cr = s34_t'(pc.re); ci = s34_t'(pc.im);
    dr = s34_t'(pd.re); di = s34_t'(pd.im);
    y[0].re = round_sat(ar + br + cr + dr, 18);
    y[0].im = round_sat(ai + bi + ci + di, 18);
    y[1].re = round_sat(ar + bi - cr - di, 18);
    y[1].im = round_sat(ai - br - ci + dr, 18);
    y[2].re = round_sat(ar - br + cr - dr, 18);
    y[2].im = round_sat(ai - bi + ci - di, 18);
    y[3].re = round_sat(ar - bi - cr + di, 18);
    y[3].im = round_sat(ai + br - ci - dr, 18);
  end

endmodule
