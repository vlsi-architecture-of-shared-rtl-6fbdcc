// bu_r4: the first-stage butterfly unit, a radix-4 DFT of the four aligned
// streams A..D (samples n2, n2+64, n2+128, n2+192 of the 256-point input):
//   y0 = A + B + C + D        y1 = A - jB - C + jD
//   y2 = A - B + C - D        y3 = A + jB - C - jD
// Multiplications by +-j are swaps of real and imaginary parts, so the unit
// has adders only. The published design's unit can also run as two radix-2
// butterflies for a 128-point core; in this design every size runs on the
// 256-point core, so only the radix-4 mode is built.
//
// Interface: combinational; IW-bit complex words in and out (no growth is
// needed, see smss_pkg).
module bu_r4
  import smss_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t c,
  input  cplx_t d,
  output cplx_t y [4]
);
  cplx_t s_ac, d_ac, s_bd, d_bd;

  always_comb begin
    s_ac.re = a.re + c.re;  s_ac.im = a.im + c.im;
    d_ac.re = a.re - c.re;  d_ac.im = a.im - c.im;
    s_bd.re = b.re + d.re;  s_bd.im = b.im + d.im;
    d_bd.re = b.re - d.re;  d_bd.im = b.im - d.im;
    // y0 = (A+C) + (B+D)
    y[0].re = s_ac.re + s_bd.re;  y[0].im = s_ac.im + s_bd.im;
    // y2 = (A+C) - (B+D)
    y[2].re = s_ac.re - s_bd.re;  y[2].im = s_ac.im - s_bd.im;
    // y1 = (A-C) - j(B-D)
    y[1].re = d_ac.re + d_bd.im;  y[1].im = d_ac.im - d_bd.re;
    // y3 = (A-C) + j(B-D)
    y[3].re = d_ac.re - d_bd.im;  y[3].im = d_ac.im + d_bd.re;
  end
endmodule
