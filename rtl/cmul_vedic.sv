// cmul_vedic: complex multiplication of a data word by a twiddle factor,
// built from four signed Vedic multipliers (this is the arithmetic unit of the
// shared multipliers and of the third-stage twiddle multipliers).
//
// y = x * w, with w scaled by 2^TW_FRAC; the four real products are formed on
// magnitudes by vedic_mult and given back their sign, then combined as
//   y.re = x.re*w.re - x.im*w.im,   y.im = x.re*w.im + x.im*w.re
// and rounded (add half, shift right by TW_FRAC). Because |w| <= 1 the result
// always fits the IW-bit word. Rounding to nearest is this design's choice.
//
// Interface: x, w in; y out one clock after (registered output).
module cmul_vedic
  import smss_pkg::*;
(
  input  logic  clk,
  input  cplx_t x,
  input  twid_t w,
  output cplx_t y
);
  localparam int unsigned PW = IW + TW;

  // signed a*b through an unsigned Vedic core
  logic signed [PW-1:0] prod [4];
  word_t opa [4];
  coef_t opb [4];

  assign opa[0] = x.re; assign opb[0] = w.re;
  assign opa[1] = x.im; assign opb[1] = w.im;
  assign opa[2] = x.re; assign opb[2] = w.im;
  assign opa[3] = x.im; assign opb[3] = w.re;

  for (genvar g = 0; g < 4; g++) begin : g_mul
    logic [IW-1:0] ma;
    logic [TW-1:0] mb;
    logic [PW-1:0] mp;
    logic          neg;
    assign ma  = opa[g][IW-1] ? IW'(-opa[g]) : IW'(opa[g]);
    assign mb  = opb[g][TW-1] ? TW'(-opb[g]) : TW'(opb[g]);
    assign neg = opa[g][IW-1] ^ opb[g][TW-1];
    vedic_mult #(.AW(IW), .BW(TW)) u_vm (.a(ma), .b(mb), .p(mp));
    assign prod[g] = neg ? -$signed(mp) : $signed(mp);
  end

  logic signed [PW:0] sre, sim;
  assign sre = (PW+1)'(prod[0]) - (PW+1)'(prod[1]) + (PW+1)'(1 << (TW_FRAC - 1));
  assign sim = (PW+1)'(prod[2]) + (PW+1)'(prod[3]) + (PW+1)'(1 << (TW_FRAC - 1));

  always_ff @(posedge clk) begin
    y.re <= word_t'(sre >>> TW_FRAC);
    y.im <= word_t'(sim >>> TW_FRAC);
  end
endmodule
