// tb_bu_r4: checks the radix-4 butterfly against a direct 4-point DFT,
// Y(k) = sum_n x(n) (-j)^(nk), on random integer inputs (exact arithmetic).
module tb_bu_r4;
  import smss_pkg::*;
  cplx_t a, b, c, d;
  cplx_t y [4];
  int checks = 0, failures = 0;

  bu_r4 dut (.a(a), .b(b), .c(c), .d(d), .y(y));

  initial begin
    for (int i = 0; i < 500; i++) begin
      int xr [4], xi [4];
      for (int n = 0; n < 4; n++) begin
        xr[n] = $signed($urandom_range(2**18)) - 2**17;
        xi[n] = $signed($urandom_range(2**18)) - 2**17;
      end
      a = '{re: word_t'(xr[0]), im: word_t'(xi[0])};
      b = '{re: word_t'(xr[1]), im: word_t'(xi[1])};
      c = '{re: word_t'(xr[2]), im: word_t'(xi[2])};
      d = '{re: word_t'(xr[3]), im: word_t'(xi[3])};
      #1;
      for (int k = 0; k < 4; k++) begin
        int er, ei;
        er = 0; ei = 0;
        for (int n = 0; n < 4; n++) begin
          // (-j)^e : 0 -> 1, 1 -> -j, 2 -> -1, 3 -> j
          case ((n * k) % 4)
            0: begin er += xr[n]; ei += xi[n]; end
            1: begin er += xi[n]; ei -= xr[n]; end
            2: begin er -= xr[n]; ei -= xi[n]; end
            default: begin er -= xi[n]; ei += xr[n]; end
          endcase
        end
        checks++;
        if (int'(y[k].re) != er || int'(y[k].im) != ei) begin
          failures++;
          if (failures < 10) $display("k=%0d got (%0d,%0d) expected (%0d,%0d)", k, y[k].re, y[k].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
