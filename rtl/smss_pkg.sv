// smss_pkg: types, sizes and twiddle arithmetic shared by the SMSS
// (shared multiplier scheduling scheme) reconfigurable FFT/IFFT processor.
//
// The processor computes a 256-point mixed-radix FFT, N = 4 x 8 x 8, on eight
// parallel data paths. Smaller sizes (2 ... 128) are obtained by a front-end
// multiplexer (see size_mux). Samples at the ports are 8-bit two's complement
// (the 8-bit data path of the published description); inside the pipeline every value is
// IW = 22 bits wide: the 8-bit sample with FRAC = 4 fraction bits appended,
// and room for an unscaled 256-point transform of 8-bit data
// (|Re X|, |Im X| <= 256 * 128 * sqrt(2) < 2^17), so that no stage needs to
// scale or saturate and rounding errors stay well below one port LSB.
// Twiddle factors are TW = 12-bit signed numbers scaled by 2^TW_FRAC = 1024
// (so +1.0 is exactly representable); twiddle_rom generates them.
// The internal widths and the twiddle format are this design's own choice.
package smss_pkg;

  // ---- sizes ---------------------------------------------------------------
  parameter int unsigned NPT     = 256;  // largest transform (document: 256)
  parameter int unsigned PATHS   = 8;    // parallel data paths (document: 8)
  parameter int unsigned FRAME   = NPT / PATHS;  // cycles per transform = 32
  parameter int unsigned STREAM  = FRAME / 4;    // first-stage stream length = 8
  parameter int unsigned DW      = 8;    // port sample width (document: 8)
  parameter int unsigned FRAC    = 4;    // fraction bits inside (assumed)
  parameter int unsigned IW      = 22;   // internal width (assumed)
  parameter int unsigned TW      = 12;   // twiddle width (assumed)
  parameter int unsigned TW_FRAC = 10;   // twiddle fractional bits (assumed)

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [IW-1:0] word_t;
  typedef logic signed [TW-1:0] coef_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  typedef struct packed {
    coef_t re;
    coef_t im;
  } twid_t;

  // Transform configuration that travels with every frame through the
  // pipeline, so that a size or direction change never mixes two settings
  // within one transform.
  typedef struct packed {
    logic [3:0] log2n;  // 1 .. 8, transform size N = 2^log2n
    logic       ifft;   // 1: inverse transform
  } cfg_t;

  // Side band carried next to the data of a frame: valid marks a data beat,
  // last the final beat of a frame, cnt the beat's position in the frame.
  typedef struct packed {
    logic       valid;
    logic       last;
    logic [4:0] cnt;
    cfg_t       cfg;
  } tag_t;

endpackage
