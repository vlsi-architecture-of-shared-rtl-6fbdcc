// stream_delay: the delay buffers at the head of each first-stage data path
// (D12, D8 and D4 in the published design's 128-point drawing; D24, D16 and D8 here,
// because the stream length of the 256-point frame is 8).
//
// Each path receives its 32 samples of a frame as four consecutive streams
// A, B, C, D of STREAM = 8 samples (samples n, n+64, n+128, n+192 of the
// transform lie in streams A..D at the same position). Delaying the path
// input by 3L, 2L and L clocks (L = STREAM) lines the four streams up, so
// that in the last L clocks of the frame (the computation period) all four
// operands of a radix-4 butterfly are present at once; the first 3L clocks
// are the idle period of the butterfly. One shift register with three taps
// implements the three delay lines.
//
// Interface: d is the path input (one sample per clock); a/b/c/dd are the
// four aligned streams, combinational from the shift register and d.
module stream_delay
  import smss_pkg::*;
#(
  parameter int unsigned L = STREAM
) (
  input  logic  clk,
  input  cplx_t d,
  output cplx_t a,
  output cplx_t b,
  output cplx_t c,
  output cplx_t dd
);
  cplx_t sr [3*L];

  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int i = 1; i < 3 * L; i++) sr[i] <= sr[i-1];
  end

  assign a  = sr[3*L-1];
  assign b  = sr[2*L-1];
  assign c  = sr[L-1];
  assign dd = d;
endmodule
