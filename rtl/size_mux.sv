// size_mux: the reconfiguration multiplexer in front of the SMSS FFT core.
//
// The core always evaluates a 256-point transform. An N-point transform
// (N = 2, 4, ..., 256, chosen by the size-select lines) is obtained by
// spreading the N input samples over the 256 core inputs with stride
// S = 256/N and filling the gaps with zeros: x'(n) = x(n/S) when S divides
// n, else 0. The 256-point DFT of x' is then periodic with period N and its
// first N bins are exactly the N-point DFT of x (out_unit keeps those).
// The published description shows this multiplexer, with the size-select lines, between
// the inputs and the 8-bit data path; the stride-spreading rule is this
// design's reading of how one multiplexer can serve every size.
//
// For the inverse transform the inputs are conjugated here (and the results
// conjugated and divided by N in out_unit), as the published description prescribes.
//
// Interface: combinational. sel = {s5, s6, s7, s8}; in_* are the 256 port
// samples; x is the 256-sample frame handed to the core; cfg is the decoded
// configuration (log2 N, direction). Samples enter the core with FRAC
// fraction bits appended (value * 2^FRAC).
module size_mux
  import smss_pkg::*;
(
  input  logic [3:0] sel,
  input  logic       ifft,
  input  sample_t    in_re [NPT],
  input  sample_t    in_im [NPT],
  output cplx_t      x     [NPT],
  output cfg_t       cfg
);
  logic [3:0] log2n;
  logic [3:0] sh;      // log2 of the stride S
  logic [7:0] mask;    // low bits of n that must be zero

  // 0000 -> 256, 0001 -> 128, ..., 0111 -> 2; codes 1xxx select 256
  assign log2n    = sel[3] ? 4'd8 : 4'(4'd8 - {1'b0, sel[2:0]});
  assign sh       = 4'd8 - log2n;
  assign mask     = 8'((9'd1 << sh) - 9'd1);
  assign cfg.log2n = log2n;
  assign cfg.ifft  = ifft;

  always_comb begin
    for (int n = 0; n < NPT; n++) begin
      logic [7:0] src;
      src = 8'(n) >> sh;
      if ((8'(n) & mask) == 8'd0) begin
        x[n].re = word_t'(in_re[src]) <<< FRAC;
        x[n].im = (ifft ? -word_t'(in_im[src]) : word_t'(in_im[src])) <<< FRAC;
      end else begin
        x[n] = '0;
      end
    end
  end
endmodule
