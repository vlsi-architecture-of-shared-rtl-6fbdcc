// tw64_mult: twiddle multipliers between the second and the third stage.
//
// After the second-stage radix-8 butterfly, row {k1, p} holds on line r the
// partial result for n2 = p + 8m summed over m; before the third-stage
// butterfly sums over p it must be rotated by W_64^(p r) = W_256^(4 p r).
// Line 0 and row p = 0 need no rotation, but every line has a complex Vedic
// multiplier so that the row timing stays uniform (this design's choice).
// The published description moves the multipliers in front of the second stage into the
// first stage; these remaining rotations are the ones the 4 x 8 x 8
// decomposition still needs in front of the third stage.
//
// Interface: x/tag_in a row per clock, p = tag_in.cnt[2:0]; y/tag_out
// registered one clock later.
module tw64_mult
  import smss_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  cplx_t x [PATHS],
  input  tag_t  tag_in,
  output cplx_t y [PATHS],
  output tag_t  tag_out
);
  logic [2:0] p;
  assign p = tag_in.cnt[2:0];

  for (genvar r = 0; r < PATHS; r++) begin : g_line
    twid_t w;
    twiddle_rom u_tw (.e(8'({p, 2'b00} * r)), .w(w));
    cmul_vedic u_cm (.clk(clk), .x(x[r]), .w(w), .y(y[r]));
  end

  always_ff @(posedge clk) begin
    if (rst) tag_out <= '0;
    else     tag_out <= tag_in;
  end
endmodule
