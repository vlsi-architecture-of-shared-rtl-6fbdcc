// shared_mult: the shared multipliers of one first-stage data path.
//
// In a radix-4 x 8 x 8 decomposition of the 256-point DFT the outputs of the
// radix-4 butterfly must be rotated by W_256^(n2*k1) before the 64-point
// sub-transforms. The SMSS scheme applies these rotations here, in the first
// stage and ahead of the commutator, so that the second-stage butterfly
// needs no multiplier. Output k1 = 0 needs no rotation and is only delayed;
// outputs k1 = 1, 2, 3 each go through a complex Vedic multiplier.
// n2 = 8m + P, where P is this path's index and m the butterfly's position
// inside the computation period. The multipliers work only during the
// computation period (8 of the 32 clocks of a frame); the published design's
// arrangement, which time-multiplexes them further, is not described in
// enough detail to copy, so one multiplier per rotated output is used.
//
// Interface: y from bu_r4, m = butterfly index; z registered, one clock
// after y (the latency of cmul_vedic).
module shared_mult
  import smss_pkg::*;
#(
  parameter int unsigned P = 0
) (
  input  logic       clk,
  input  cplx_t      y [4],
  input  logic [2:0] m,
  output cplx_t      z [4]
);
  logic [7:0] n2;
  assign n2 = {2'b00, m, 3'(P)};

  always_ff @(posedge clk) z[0] <= y[0];

  for (genvar k = 1; k < 4; k++) begin : g_rot
    twid_t w;
    twiddle_rom u_tw (.e(8'(n2 * k)), .w(w));
    cmul_vedic u_cm (.clk(clk), .x(y[k]), .w(w), .y(z[k]));
  end
endmodule
