// smss_fft_top: reconfigurable 2- to 256-point FFT/IFFT processor built on
// the shared multiplier scheduling scheme (SMSS) over an eight-path mixed-
// radix multipath delay commutator (MRMDC) pipeline.
//
// Data flow (one 256-point transform per FRAME = 32 clocks, eight samples
// per clock):
//   size_mux      size-select multiplexer: spreads N inputs over the 256-
//                 point frame, conjugates for IFFT
//   frame_feeder  frame timing; sample 8t+p on data path p at beat t
//   s1_path x 8   first stage: stream delays, radix-4 butterfly, shared
//                 multipliers (rotation by W_256^(n2 k1))
//   commutator    8 x 8 reordering between paths and time slots
//   bu_r8         second stage, radix-8 without multiplier (over m)
//   tw64_mult     rotation by W_64^(p r)
//   commutator    second reordering
//   bu_r8         third stage, radix-8 without multiplier (over p)
//   out_unit      bin ordering, size masking, IFFT scaling, 8-bit ports
// The three-stage radix-4/8/8 split, the eight paths, the first-stage
// shared multipliers, the multiplier-free radix-8 butterflies, the Vedic
// multipliers, the 8-bit ports and the size-select multiplexer follow the
// document; the ping-pong commutators, the frame capture and the internal
// word widths are this design's own.
//
// Interface: the 256 complex inputs are sampled once per frame (the clock
// in which the internal frame counter wraps); s5..s8 choose the size
// (0000 = 256, 0001 = 128, ..., 0111 = 2), ifft the direction. out_re /
// out_im hold the latest result and out_valid pulses when they are
// updated. Latency from the sampling clock to the out_valid pulse is
// LATENCY = 110 clocks; a new result appears every 32 clocks.
// Synchronous active-high reset.
module smss_fft_top
  import smss_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    s5,
  input  logic    s6,
  input  logic    s7,
  input  logic    s8,
  input  logic    ifft,
  input  sample_t in_re  [NPT],
  input  sample_t in_im  [NPT],
  output sample_t out_re [NPT],
  output sample_t out_im [NPT],
  output logic    out_valid
);
  cplx_t x [NPT];
  cfg_t  cfg;
  cplx_t lane [PATHS];
  tag_t  lane_tag;

  size_mux u_mux (.sel({s5, s6, s7, s8}), .ifft(ifft), .in_re(in_re),
                  .in_im(in_im), .x(x), .cfg(cfg));

  frame_feeder u_feed (.clk(clk), .rst(rst), .x(x), .cfg(cfg),
                       .lane(lane), .tag(lane_tag));

  // ---- first stage ----------------------------------------------------------
  cplx_t      s1z   [PATHS][4];
  tag_t       s1tag [PATHS];
  cplx_t      c1din [4][PATHS];
  logic [4:0] c1row [4];

  for (genvar p = 0; p < PATHS; p++) begin : g_path
    s1_path #(.P(p)) u_s1 (.clk(clk), .rst(rst), .d(lane[p]), .tag_in(lane_tag),
                           .z(s1z[p]), .tag_out(s1tag[p]));
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      c1row[k] = {2'(k), s1tag[0].cnt[2:0]};
      for (int p = 0; p < PATHS; p++) c1din[k][p] = s1z[p][k];
    end
  end

  // ---- commutator, second stage, twiddles ---------------------------------
  cplx_t c1out [PATHS];
  tag_t  c1tag;
  cplx_t s2y [PATHS];
  tag_t  s2tag;
  cplx_t twy [PATHS];
  tag_t  twtag;

  commutator #(.WG(4)) u_com1 (.clk(clk), .rst(rst), .wr_tag(s1tag[0]), .wr_row(c1row),
                               .din(c1din), .dout(c1out), .rd_tag(c1tag));
  bu_r8     u_s2  (.clk(clk), .rst(rst), .x(c1out), .tag_in(c1tag), .y(s2y), .tag_out(s2tag));
  tw64_mult u_tw  (.clk(clk), .rst(rst), .x(s2y), .tag_in(s2tag), .y(twy), .tag_out(twtag));

  // ---- second commutator, third stage, output -----------------------------
  cplx_t      c2din [1][PATHS];
  logic [4:0] c2row [1];
  cplx_t      c2out [PATHS];
  tag_t       c2tag;
  cplx_t      s3y [PATHS];
  tag_t       s3tag;

  assign c2din[0] = twy;
  assign c2row[0] = twtag.cnt;

  commutator #(.WG(1)) u_com2 (.clk(clk), .rst(rst), .wr_tag(twtag), .wr_row(c2row),
                               .din(c2din), .dout(c2out), .rd_tag(c2tag));
  bu_r8   u_s3  (.clk(clk), .rst(rst), .x(c2out), .tag_in(c2tag), .y(s3y), .tag_out(s3tag));
  out_unit u_out (.clk(clk), .rst(rst), .y(s3y), .tag_in(s3tag), .out_re(out_re),
                  .out_im(out_im), .out_valid(out_valid));
endmodule
