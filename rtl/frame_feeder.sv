// frame_feeder: frame timing and input distribution onto the eight data
// paths of the SMSS FFT core.
//
// A free-running counter divides time into frames of FRAME = 32 clocks, one
// 256-point transform per frame. In the last clock of a frame (cnt = 0) the
// 256-sample frame from size_mux and its configuration are captured; during
// the next 32 clocks beat t = 0 .. 31 puts samples 8t + p on path p
// (p = 0 .. 7), so path p carries the samples n = p (mod 8), as the published description
// shows for the 0th data path (samples 0, 8, 16, ...). The capture-then-
// stream arrangement is this design's own; the published description shows parallel ports
// and eight data paths but not how one feeds the other.
//
// Interface: x/cfg are sampled once per frame; lane/tag are registered and
// valid continuously from the first complete frame on. tag.cnt = t,
// tag.last marks t = 31. Synchronous active-high reset.
module frame_feeder
  import smss_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  cplx_t x    [NPT],
  input  cfg_t  cfg,
  output cplx_t lane [PATHS],
  output tag_t  tag
);
  logic [4:0] cnt;
  logic       primed;
  cplx_t      hold [NPT];
  cfg_t       hold_cfg;
  logic [4:0] t;

  assign t = cnt - 5'd1;  // beat read from the held frame in this clock

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      primed   <= 1'b0;
      tag      <= '0;
      hold_cfg <= '0;
    end else begin
      cnt <= cnt + 5'd1;
      if (cnt == 5'd0) begin
        hold_cfg <= cfg;
        primed   <= 1'b1;
      end
      tag.valid <= primed;
      tag.last  <= primed && (t == 5'd31);
      tag.cnt   <= t;
      tag.cfg   <= hold_cfg;
    end
  end

  always_ff @(posedge clk) begin
    if (cnt == 5'd0) hold <= x;
    for (int p = 0; p < PATHS; p++) lane[p] <= hold[{t, 3'(p)}];
  end
endmodule
