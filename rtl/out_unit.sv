// out_unit: collects the third-stage rows into the 256 parallel output
// ports and applies the size and direction of the frame.
//
// Third-stage row {k1, r} carries on line q the bin k = k1 + 4r + 32q of
// the 256-point transform (the 4 x 8 x 8 index map k = k1 + 4 k2,
// k2 = r + 8q). The rows are stored in natural bin order. One clock after
// the last row the frame is released to the ports:
//   - bins k >= N are forced to zero (for N < 256 the core output repeats
//     with period N, see size_mux);
//   - for an inverse transform the result is conjugated and divided by N
//     (arithmetic shift right by log2 N, rounded to nearest), the IFFT-by-
//     FFT rule given in the published description;
//   - the FRAC internal fraction bits are rounded off and every value is
//     saturated to the DW-bit port width.
// The bin masking, rounding and saturation are this design's choices.
//
// Interface: y/tag_in from the third-stage butterfly; out_re/out_im hold the
// last completed transform, out_valid pulses for one clock when they change.
module out_unit
  import smss_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  cplx_t   y [PATHS],
  input  tag_t    tag_in,
  output sample_t out_re [NPT],
  output sample_t out_im [NPT],
  output logic    out_valid
);
  cplx_t res [NPT];
  logic  done;
  cfg_t  done_cfg;

  function automatic sample_t sat(input logic signed [IW:0] v);
    if (v > (IW+1)'(2**(DW-1) - 1))      return sample_t'(2**(DW-1) - 1);
    else if (v < -(IW+1)'(2**(DW-1)))    return sample_t'(-(2**(DW-1)));
    else                                 return sample_t'(v);
  endfunction

  function automatic int sh(input cfg_t c);
    return c.ifft ? int'(FRAC) + int'(c.log2n) : int'(FRAC);
  endfunction

  function automatic logic signed [IW:0] scale(input word_t v, input cfg_t c,
                                              input logic neg);
    logic signed [IW+1:0] t;
    t = neg ? -(IW+2)'(v) : (IW+2)'(v);
    // remove the FRAC fraction bits, and for IFFT divide by N, in one
    // rounded shift
    t = (t + ((IW+2)'(1) <<< (sh(c) - 1))) >>> sh(c);
    return (IW+1)'(t);
  endfunction

  always_ff @(posedge clk) begin
    if (tag_in.valid)
      for (int q = 0; q < PATHS; q++)
        res[{q[2:0], tag_in.cnt[2:0], tag_in.cnt[4:3]}] <= y[q];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      done      <= 1'b0;
      done_cfg  <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < NPT; k++) begin
        out_re[k] <= '0;
        out_im[k] <= '0;
      end
    end else begin
      done      <= tag_in.valid && tag_in.last;
      done_cfg  <= tag_in.cfg;
      out_valid <= done;
      if (done) begin
        for (int k = 0; k < NPT; k++) begin
          if (9'(k) < (9'd1 << done_cfg.log2n)) begin
            out_re[k] <= sat(scale(res[k].re, done_cfg, 1'b0));
            out_im[k] <= sat(scale(res[k].im, done_cfg, done_cfg.ifft));
          end else begin
            out_re[k] <= '0;
            out_im[k] <= '0;
          end
        end
      end
    end
  end
endmodule
