// tb_shared_mult: checks the shared multipliers of data path P = 5: output
// k1 must be input k1 rotated by W_256^((8m + 5) k1) (floating-point
// reference, 1 LSB tolerance plus 1/1024 of the magnitude), output 0
// unrotated, all one clock later.
module tb_shared_mult;
  import smss_pkg::*;
  localparam int P = 5;
  logic       clk = 1'b0;
  cplx_t      y [4];
  cplx_t      z [4];
  logic [2:0] m;
  int checks = 0, failures = 0;

  shared_mult #(.P(P)) dut (.clk(clk), .y(y), .m(m), .z(z));
  always #5 clk = ~clk;

  initial begin
    real pi;
    pi = 3.14159265358979;
    for (int i = 0; i < 400; i++) begin
      real rr [4], ri [4];
      @(negedge clk);
      m = 3'(i);
      for (int k = 0; k < 4; k++) begin
        real ang;
        y[k].re = word_t'($signed($urandom_range(2**19)) - 2**18);
        y[k].im = word_t'($signed($urandom_range(2**19)) - 2**18);
        ang = 2.0 * pi * real'(((8 * (i % 8) + P) * k) % 256) / 256.0;
        rr[k] = real'(y[k].re) * $cos(ang) + real'(y[k].im) * $sin(ang);
        ri[k] = real'(y[k].im) * $cos(ang) - real'(y[k].re) * $sin(ang);
      end
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        real er, ei, tol;
        er = real'(z[k].re) - rr[k];
        ei = real'(z[k].im) - ri[k];
        tol = (k == 0) ? 0.0 : 1.0 + ((rr[k] < 0.0 ? -rr[k] : rr[k]) + (ri[k] < 0.0 ? -ri[k] : ri[k])) / 1024.0;
        checks++;
        if (er > tol || er < -tol || ei > tol || ei < -tol) begin
          failures++;
          if (failures < 10) $display("m=%0d k=%0d got (%0d,%0d) expected (%.1f,%.1f)", i % 8, k, z[k].re, z[k].im, rr[k], ri[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
