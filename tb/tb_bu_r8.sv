// tb_bu_r8: checks the multiplier-free radix-8 butterfly against a
// floating-point 8-point DFT on random rows (tolerance 2 + 2e-6 of the
// magnitude, for the shift-add 1/sqrt2), and checks that results and tag
// leave one clock after the inputs.
module tb_bu_r8;
  import smss_pkg::*;
  logic  clk = 1'b0, rst = 1'b1;
  cplx_t x [8];
  cplx_t y [8];
  tag_t  ti, to;
  int checks = 0, failures = 0;

  bu_r8 dut (.clk(clk), .rst(rst), .x(x), .tag_in(ti), .y(y), .tag_out(to));
  always #5 clk = ~clk;

  initial begin
    real pi;
    pi = 3.14159265358979;
    ti = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      real rr [8], ri [8];
      @(negedge clk);
      for (int n = 0; n < 8; n++) begin
        x[n].re = word_t'($signed($urandom_range(2**18)) - 2**17);
        x[n].im = word_t'($signed($urandom_range(2**18)) - 2**17);
      end
      ti = '{valid: 1'b1, last: 1'(i % 32 == 31), cnt: 5'(i), cfg: '{log2n: 4'(i % 9), ifft: 1'(i % 2)}};
      for (int k = 0; k < 8; k++) begin
        rr[k] = 0.0; ri[k] = 0.0;
        for (int n = 0; n < 8; n++) begin
          real ang;
          ang = 2.0 * pi * real'((n * k) % 8) / 8.0;
          rr[k] += real'(x[n].re) * $cos(ang) + real'(x[n].im) * $sin(ang);
          ri[k] += real'(x[n].im) * $cos(ang) - real'(x[n].re) * $sin(ang);
        end
      end
      @(negedge clk);
      checks++;
      if (to != ti) begin failures++; $display("tag mismatch at %0d", i); end
      for (int k = 0; k < 8; k++) begin
        real er, ei, tol;
        er = real'(y[k].re) - rr[k];
        ei = real'(y[k].im) - ri[k];
        tol = 2.0 + 2.0e-6 * ((rr[k] < 0.0 ? -rr[k] : rr[k]) + (ri[k] < 0.0 ? -ri[k] : ri[k]));
        checks++;
        if (er > tol || er < -tol || ei > tol || ei < -tol) begin
          failures++;
          if (failures < 10) $display("k=%0d got (%0d,%0d) expected (%.1f,%.1f)", k, y[k].re, y[k].im, rr[k], ri[k]);
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
