// bu_r8: the modified radix-8 butterfly without multiplier, used by the
// second and the third stage of the core (one row of eight words per clock).
//
// Y(k) = sum_{i=0..7} X(i) W_8^(ik) is computed as radix-2 x radix-4:
//   a_i = X(i) + X(i+4),  b_i = (X(i) - X(i+4)) W_8^i   (i = 0..3)
//   Y(2k) = DFT4(a)(k),   Y(2k+1) = DFT4(b)(k)
// W_8^2 = -j is a swap of real and imaginary parts; W_8^1 = (1-j)/sqrt2 and
// W_8^3 = -(1+j)/sqrt2 need the constant 1/sqrt2, which is formed without a
// multiplier as (46341 v + 2^15) >> 16 with
// 46341 v = 2^15 v + 2^13 v + 2^12 v + 2^10 v + 2^8 v + 2^2 v + v
// (46341/2^16 = 0.7071075, relative error 1e-6). The published description
// states that this butterfly has no multiplier; the shift-add constant and
// its precision are this design's.
//
// Interface: x[i] in; y[k] and tag_out registered, one clock later.
module bu_r8
  import smss_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  cplx_t x [8],
  input  tag_t  tag_in,
  output cplx_t y [8],
  output tag_t  tag_out
);
  localparam int unsigned XW = IW + 4;
  typedef logic signed [XW-1:0] xw_t;

  function automatic xw_t mul_isqrt2(input xw_t v);
    logic signed [XW+16:0] s, e;
    e = (XW+17)'(v);
    s = (e <<< 15) + (e <<< 13) + (e <<< 12) + (e <<< 10) + (e <<< 8)
      + (e <<< 2) + e + (XW+17)'(32768);
    return xw_t'(s >>> 16);
  endfunction

  xw_t ar [4], ai [4], br [4], bi [4], d1r, d1i, d3r, d3i;
  xw_t yr [8], yi [8];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      ar[i] = xw_t'(x[i].re) + xw_t'(x[i+4].re);
      ai[i] = xw_t'(x[i].im) + xw_t'(x[i+4].im);
    end
    // b_0 = d_0
    br[0] = xw_t'(x[0].re) - xw_t'(x[4].re);
    bi[0] = xw_t'(x[0].im) - xw_t'(x[4].im);
    // b_1 = d_1 (1-j)/sqrt2 = ((dr+di) + j(di-dr))/sqrt2
    d1r = xw_t'(x[1].re) - xw_t'(x[5].re);
    d1i = xw_t'(x[1].im) - xw_t'(x[5].im);
    br[1] = mul_isqrt2(d1r + d1i);
    bi[1] = mul_isqrt2(d1i - d1r);
    // b_2 = d_2 (-j) = di - j dr
    br[2] = xw_t'(x[2].im) - xw_t'(x[6].im);
    bi[2] = xw_t'(x[6].re) - xw_t'(x[2].re);
    // b_3 = d_3 (-1-j)/sqrt2 = ((di-dr) - j(dr+di))/sqrt2
    d3r = xw_t'(x[3].re) - xw_t'(x[7].re);
    d3i = xw_t'(x[3].im) - xw_t'(x[7].im);
    br[3] = mul_isqrt2(d3i - d3r);
    bi[3] = -mul_isqrt2(d3r + d3i);
    // radix-4 on the even (a) and odd (b) halves
    yr[0] = ar[0] + ar[1] + ar[2] + ar[3];
    yi[0] = ai[0] + ai[1] + ai[2] + ai[3];
    yr[2] = ar[0] + ai[1] - ar[2] - ai[3];
    yi[2] = ai[0] - ar[1] - ai[2] + ar[3];
    yr[4] = ar[0] - ar[1] + ar[2] - ar[3];
    yi[4] = ai[0] - ai[1] + ai[2] - ai[3];
    yr[6] = ar[0] - ai[1] - ar[2] + ai[3];
    yi[6] = ai[0] + ar[1] - ai[2] - ar[3];
    yr[1] = br[0] + br[1] + br[2] + br[3];
    yi[1] = bi[0] + bi[1] + bi[2] + bi[3];
    yr[3] = br[0] + bi[1] - br[2] - bi[3];
    yi[3] = bi[0] - br[1] - bi[2] + br[3];
    yr[5] = br[0] - br[1] + br[2] - br[3];
    yi[5] = bi[0] - bi[1] + bi[2] - bi[3];
    yr[7] = br[0] - bi[1] - br[2] + bi[3];
    yi[7] = bi[0] + br[1] - bi[2] - br[3];
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 8; k++) begin
      y[k].re <= word_t'(yr[k]);
      y[k].im <= word_t'(yi[k]);
    end
    if (rst) tag_out <= '0;
    else     tag_out <= tag_in;
  end
endmodule
