// tb_cmul_vedic: checks the complex Vedic multiplier against an integer
// reference, y = round((x * w) / 2^TW_FRAC), for random data and twiddles,
// including the largest negative data words, and checks its one-clock
// latency.
module tb_cmul_vedic;
  import smss_pkg::*;
  logic  clk = 1'b0;
  cplx_t x;
  twid_t w;
  cplx_t y;
  int checks = 0, failures = 0;

  cmul_vedic dut (.clk(clk), .x(x), .w(w), .y(y));
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 1000; i++) begin
      longint xr, xi, wr, wi, er, ei;
      @(negedge clk);
      x.re = word_t'($signed($urandom_range(2**20)) - 2**19);
      x.im = word_t'($signed($urandom_range(2**20)) - 2**19);
      if (i == 0) begin x.re = word_t'(-(2**20)); x.im = word_t'(-(2**20)); end
      w.re = coef_t'($signed($urandom_range(2048)) - 1024);
      w.im = coef_t'($signed($urandom_range(2048)) - 1024);
      xr = longint'(x.re); xi = longint'(x.im); wr = longint'(w.re); wi = longint'(w.im);
      er = (xr * wr - xi * wi + 512) >>> 10;
      ei = (xr * wi + xi * wr + 512) >>> 10;
      @(negedge clk);  // result registered on the edge between
      checks++;
      if (longint'(y.re) != er || longint'(y.im) != ei) begin
        failures++;
        if (failures < 10) $display("x=(%0d,%0d) w=(%0d,%0d): got (%0d,%0d) expected (%0d,%0d)",
                                    xr, xi, wr, wi, y.re, y.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
