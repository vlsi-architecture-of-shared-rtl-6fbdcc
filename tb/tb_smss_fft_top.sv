// tb_smss_fft_top: end-to-end test of the reconfigurable SMSS FFT/IFFT
// processor at its default (full) size.
//
// Back-to-back frames are applied, one per 32-clock frame, each with its own
// size (all eight sizes), direction (FFT and IFFT) and random input. Every
// result is compared with a floating-point DFT / IDFT of the same input,
// rounded and saturated to 8 bits (tolerance 1 LSB, plus 1/256 of the
// magnitude for twiddle quantisation), bins k >= N must be
// zero, and the out_valid pulse of frame j must come exactly
// 32 j + LATENCY clocks after the first sampling clock. Mechanisms counted
// (each must occur): every size, the inverse mode, output saturation, and a
// change of size between consecutive frames.
module tb_smss_fft_top;
  import smss_pkg::*;

  localparam int LATENCY = 105;
  localparam int NFRAMES = 20;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  logic    s5, s6, s7, s8, ifft;
  sample_t in_re  [NPT];
  sample_t in_im  [NPT];
  sample_t out_re [NPT];
  sample_t out_im [NPT];
  logic    out_valid;

  smss_fft_top dut (.clk(clk), .rst(rst), .s5(s5), .s6(s6), .s7(s7), .s8(s8), .ifft(ifft),
                    .in_re(in_re), .in_im(in_im), .out_re(out_re), .out_im(out_im),
                    .out_valid(out_valid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;            // rising edges since reset release; edge 0 samples frame 0
  int frames_out = 0;
  int size_seen [9];
  int n_ifft = 0, n_sat = 0, n_change = 0;

  // per frame: configuration and inputs
  int      f_log2n [NFRAMES];
  bit      f_ifft  [NFRAMES];
  sample_t f_re    [NFRAMES][NPT];
  sample_t f_im    [NFRAMES][NPT];

  function automatic int satr(input real v);
    int r;
    r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  task automatic check_frame(input int j);
    int  n, l;
    real pi, ang, sr, si, er, ei, tol;
    int  got_r, got_i;
    pi = 3.14159265358979;
    l  = f_log2n[j];
    n  = 1 << l;
    for (int k = 0; k < NPT; k++) begin
      if (k >= n) begin
        checks++;
        if (out_re[k] != 0 || out_im[k] != 0) begin
          failures++;
          $display("frame %0d bin %0d beyond N=%0d not zero", j, k, n);
        end
        continue;
      end
      sr = 0.0; si = 0.0;
      for (int t = 0; t < n; t++) begin
        ang = 2.0 * pi * real'((t * k) % n) / real'(n);
        if (f_ifft[j]) ang = -ang;
        // x * (cos ang - j sin ang)
        sr += real'(f_re[j][t]) * $cos(ang) + real'(f_im[j][t]) * $sin(ang);
        si += real'(f_im[j][t]) * $cos(ang) - real'(f_re[j][t]) * $sin(ang);
      end
      if (f_ifft[j]) begin sr = sr / real'(n); si = si / real'(n); end
      got_r = int'(out_re[k]);
      got_i = int'(out_im[k]);
      er = real'(got_r - satr(sr));
      ei = real'(got_i - satr(si));
      if (satr(sr) != $rtoi(sr) && (satr(sr) == 127 || satr(sr) == -128)) n_sat++;
      checks++;
      // 1 LSB, plus the 12-bit twiddle quantisation for large bins
      tol = 1.0 + ((sr < 0.0 ? -sr : sr) + (si < 0.0 ? -si : si)) / 256.0;
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++;
        if (failures < 20)
          $display("frame %0d N=%0d ifft=%0b bin %0d: got (%0d,%0d) expected (%.2f,%.2f)",
                   j, n, f_ifft[j], k, got_r, got_i, sr, si);
      end
    end
  endtask

  // drive frame j's inputs and configuration
  task automatic apply_frame(input int j);
    logic [3:0] sel;
    sel = 4'(8 - f_log2n[j]);
    {s5, s6, s7, s8} = sel;
    ifft = f_ifft[j];
    in_re = f_re[j];
    in_im = f_im[j];
  endtask

  initial begin
    // frame plan: sizes 256, 128, ..., 2 as FFT, then again as IFFT, then extras
    for (int j = 0; j < NFRAMES; j++) begin
      int amp;
      f_log2n[j] = 8 - (j % 8);
      f_ifft[j]  = (j >= 8 && j < 16);
      if (j == 16) f_log2n[j] = 8;
      if (j == 17) f_log2n[j] = 8;
      // FFT frames use small inputs so most bins stay inside 8 bits; frame
      // 17 uses large ones to force saturation; IFFT frames use the full range
      amp = f_ifft[j] ? 128 : (j == 17 ? 128 : (f_log2n[j] >= 6 ? 4 : 16));
      for (int k = 0; k < NPT; k++) begin
        f_re[j][k] = sample_t'($signed($urandom_range(2 * amp - 1)) - amp);
        f_im[j][k] = sample_t'($signed($urandom_range(2 * amp - 1)) - amp);
      end
    end
    apply_frame(0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
  end

  // after edge 32j (frame j sampled) present frame j+1
  always @(posedge clk) begin
    if (!rst) begin
      if (cyc % 32 == 0 && cyc / 32 + 1 < NFRAMES) begin
        int j;
        j = cyc / 32 + 1;
        #1 apply_frame(j);
        if (f_log2n[j] != f_log2n[j-1]) n_change++;
      end
      cyc <= cyc + 1;
    end
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      int j;
      j = frames_out;
      checks++;
      if (cyc - 1 != 32 * j + LATENCY) begin
        failures++;
        $display("frame %0d out_valid after %0d clocks, expected %0d", j, cyc - 1 - 32 * j, LATENCY);
      end
      if (j < NFRAMES) begin
        check_frame(j);
        size_seen[f_log2n[j]]++;
        if (f_ifft[j]) n_ifft++;
      end
      frames_out++;
      if (frames_out == NFRAMES) begin
        for (int l = 1; l <= 8; l++) begin
          checks++;
          if (size_seen[l] == 0) begin failures++; $display("size %0d never run", 1 << l); end
        end
        checks += 3;
        if (n_ifft == 0)   begin failures++; $display("IFFT never run"); end
        if (n_sat == 0)    begin failures++; $display("saturation never happened"); end
        if (n_change == 0) begin failures++; $display("no size change"); end
        $display("sizes run: %0d %0d %0d %0d %0d %0d %0d %0d, ifft frames %0d, saturated bins %0d, size changes %0d",
                 size_seen[1], size_seen[2], size_seen[3], size_seen[4], size_seen[5],
                 size_seen[6], size_seen[7], size_seen[8], n_ifft, n_sat, n_change);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (32 * NFRAMES + LATENCY + 200) @(posedge clk);
    failures++;
    $display("watchdog: only %0d frames completed", frames_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
