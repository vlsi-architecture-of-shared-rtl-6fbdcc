// tb_tw64_mult: checks that line r of a row with p = tag.cnt[2:0] is rotated
// by W_64^(p r) (floating-point reference, 1 LSB plus 1/1024 of the
// magnitude) and that results and tag leave one clock later.
module tb_tw64_mult;
  import smss_pkg::*;
  logic  clk = 1'b0, rst = 1'b1;
  cplx_t x [PATHS];
  cplx_t y [PATHS];
  tag_t  ti, to;
  int checks = 0, failures = 0;

  tw64_mult dut (.clk(clk), .rst(rst), .x(x), .tag_in(ti), .y(y), .tag_out(to));
  always #5 clk = ~clk;

  initial begin
    real pi;
    pi = 3.14159265358979;
    ti = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      real rr [PATHS], ri [PATHS];
      @(negedge clk);
      ti = '{valid: 1'b1, last: 1'(i % 32 == 31), cnt: 5'(i), cfg: '{log2n: 4'd8, ifft: 1'b0}};
      for (int r = 0; r < PATHS; r++) begin
        real ang;
        x[r].re = word_t'($signed($urandom_range(2**19)) - 2**18);
        x[r].im = word_t'($signed($urandom_range(2**19)) - 2**18);
        ang = 2.0 * pi * real'(((i % 8) * r) % 64) / 64.0;
        rr[r] = real'(x[r].re) * $cos(ang) + real'(x[r].im) * $sin(ang);
        ri[r] = real'(x[r].im) * $cos(ang) - real'(x[r].re) * $sin(ang);
      end
      @(negedge clk);
      checks++;
      if (to != ti) begin failures++; $display("tag mismatch at %0d", i); end
      for (int r = 0; r < PATHS; r++) begin
        real er, ei, tol;
        er = real'(y[r].re) - rr[r];
        ei = real'(y[r].im) - ri[r];
        tol = 1.0 + ((rr[r] < 0.0 ? -rr[r] : rr[r]) + (ri[r] < 0.0 ? -ri[r] : ri[r])) / 1024.0;
        checks++;
        if (er > tol || er < -tol || ei > tol || ei < -tol) begin
          failures++;
          if (failures < 10) $display("p=%0d r=%0d got (%0d,%0d) expected (%.1f,%.1f)", i % 8, r, y[r].re, y[r].im, rr[r], ri[r]);
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
