// tb_s1_path: drives first-stage data path P = 3 with three back-to-back
// 32-beat frames (beat t carries sample 8t + 3) and checks, for each frame,
// that exactly 8 result beats appear, two register stages after input
// beats 24..31,
// carrying z[k1] = W_256^((8m+3) k1) * sum_n1 x(64 n1 + 8m + 3) (-j)^(n1 k1)
// (floating-point reference, 1 LSB plus 1/1024 of the magnitude).
module tb_s1_path;
  import smss_pkg::*;
  localparam int P = 3;
  logic  clk = 1'b0, rst = 1'b1;
  cplx_t d;
  tag_t  ti, to;
  cplx_t z [4];
  int checks = 0, failures = 0;
  int xr [3][NPT], xi [3][NPT];
  int beat = 0;      // input beat counter (0 .. 95)
  int outs = 0;

  s1_path #(.P(P)) dut (.clk(clk), .rst(rst), .d(d), .tag_in(ti), .z(z), .tag_out(to));
  always #5 clk = ~clk;

  initial begin
    for (int f = 0; f < 3; f++)
      for (int n = 0; n < NPT; n++) begin
        xr[f][n] = $signed($urandom_range(4095)) - 2048;
        xi[f][n] = $signed($urandom_range(4095)) - 2048;
      end
    ti = '0; d = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (beat = 0; beat < 100; beat++) begin
      int f, t;
      f = beat / 32; t = beat % 32;
      if (f < 3) begin
        d = '{re: word_t'(xr[f][8*t+P]), im: word_t'(xi[f][8*t+P])};
        ti = '{valid: 1'b1, last: 1'(t == 31), cnt: 5'(t), cfg: '{log2n: 4'(f + 1), ifft: 1'b0}};
      end else ti = '0;
      @(negedge clk);
    end
    checks++;
    if (outs != 24) begin failures++; $display("%0d result beats, expected 24", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results: input beat b is sampled by the edge at which the driver's beat
  // counter still reads b; after two register stages the result shows just
  // after the following edge, when the counter reads b + 1
  always @(posedge clk) begin
    #1;
    if (!rst && to.valid) begin
      int f, m, src;
      real pi;
      pi = 3.14159265358979;
      src = beat - 1;  // input beat of this result
      f = src / 32; m = to.cnt;
      outs++;
      checks++;
      if (src % 32 != 24 + m || to.last != (m == 7) || to.cfg.log2n != 4'(f + 1)) begin
        failures++;
        $display("timing: result m=%0d at input beat %0d", m, src);
      end
      for (int k = 0; k < 4; k++) begin
        real sr, si, rr, ri, ang, er, ei, tol;
        int n2;
        n2 = 8 * m + P;
        sr = 0.0; si = 0.0;
        for (int n1 = 0; n1 < 4; n1++) begin
          ang = 2.0 * pi * real'((n1 * k) % 4) / 4.0;
          sr += real'(xr[f][64*n1+n2]) * $cos(ang) + real'(xi[f][64*n1+n2]) * $sin(ang);
          si += real'(xi[f][64*n1+n2]) * $cos(ang) - real'(xr[f][64*n1+n2]) * $sin(ang);
        end
        ang = 2.0 * pi * real'((n2 * k) % 256) / 256.0;
        rr = sr * $cos(ang) + si * $sin(ang);
        ri = si * $cos(ang) - sr * $sin(ang);
        er = real'(z[k].re) - rr; ei = real'(z[k].im) - ri;
        tol = 1.0 + ((rr < 0.0 ? -rr : rr) + (ri < 0.0 ? -ri : ri)) / 1024.0;
        checks++;
        if (er > tol || er < -tol || ei > tol || ei < -tol) begin
          failures++;
          if (failures < 10) $display("f=%0d m=%0d k=%0d got (%0d,%0d) expected (%.1f,%.1f)", f, m, k, z[k].re, z[k].im, rr, ri);
        end
      end
    end
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
