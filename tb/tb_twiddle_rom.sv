// tb_twiddle_rom: checks the twiddle generator against round(1024 cos),
// round(-1024 sin) of 2*pi*e/256 for every exponent e = 0..255 (1 LSB
// tolerance for the table's rounding).
module tb_twiddle_rom;
  import smss_pkg::*;
  logic [7:0] e;
  twid_t      w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.e(e), .w(w));

  initial begin
    real pi;
    pi = 3.14159265358979;
    for (int k = 0; k < 256; k++) begin
      int er, ei;
      e = 8'(k);
      #1;
      er = $rtoi(1024.0 * $cos(2.0 * pi * k / 256.0) + 1024.5) - 1024;
      ei = $rtoi(-1024.0 * $sin(2.0 * pi * k / 256.0) + 1024.5) - 1024;
      checks++;
      if (int'(w.re) - er > 1 || er - int'(w.re) > 1 || int'(w.im) - ei > 1 || ei - int'(w.im) > 1) begin
        failures++;
        if (failures < 10) $display("W^%0d: got (%0d,%0d) expected (%0d,%0d)", k, w.re, w.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
