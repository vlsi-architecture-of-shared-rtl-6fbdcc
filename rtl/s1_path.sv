// s1_path: one of the eight first-stage data paths of the SMSS core
// (stream delays -> radix-4 butterfly -> shared multipliers).
//
// Beat t of a frame carries sample 8t + P. stream_delay aligns the four
// streams; in beats t = 24 .. 31 (m = t - 24) bu_r4 forms the radix-4 DFT
// over n1 of x(64 n1 + 8m + P), and shared_mult rotates output k1 by
// W_256^((8m+P) k1). The results are registered twice (butterfly, then
// multiplier) and leave with a tag whose cnt is m and whose
// last flag marks m = 7.
//
// Interface: d/tag_in from frame_feeder; z[k1] and tag_out two clocks after
// the matching input beat; tag_out.valid only in the computation period.
module s1_path
  import smss_pkg::*;
#(
  parameter int unsigned P = 0
) (
  input  logic  clk,
  input  logic  rst,
  input  cplx_t d,
  input  tag_t  tag_in,
  output cplx_t z [4],
  output tag_t  tag_out
);
  cplx_t sa, sb, sc, sd;
  cplx_t y [4];
  cplx_t yq [4];
  tag_t  tag1;

  stream_delay u_dly (.clk(clk), .d(d), .a(sa), .b(sb), .c(sc), .dd(sd));
  bu_r4        u_bu  (.a(sa), .b(sb), .c(sc), .d(sd), .y(y));

  always_ff @(posedge clk) begin
    yq <= y;
    if (rst) begin
      tag1    <= '0;
      tag_out <= '0;
    end else begin
      tag1.valid <= tag_in.valid && (tag_in.cnt[4:3] == 2'd3);
      tag1.last  <= tag_in.valid && tag_in.last;
      tag1.cnt   <= {2'b00, tag_in.cnt[2:0]};
      tag1.cfg   <= tag_in.cfg;
      tag_out    <= tag1;
    end
  end

  shared_mult #(.P(P)) u_sm (.clk(clk), .y(yq), .m(tag1.cnt[2:0]), .z(z));
endmodule
