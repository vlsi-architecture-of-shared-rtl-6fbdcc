// tb_size_mux: for every size code and both directions, checks that the
// 256-sample core frame holds input n/S at positions n divisible by
// S = 256/N (scaled by 2^FRAC, imaginary part negated for IFFT) and zero
// elsewhere, and that the decoded configuration is right (codes 1xxx: 256).
module tb_size_mux;
  import smss_pkg::*;
  logic [3:0] sel;
  logic       ifft;
  sample_t    in_re [NPT];
  sample_t    in_im [NPT];
  cplx_t      x [NPT];
  cfg_t       cfg;
  int checks = 0, failures = 0;

  size_mux dut (.sel(sel), .ifft(ifft), .in_re(in_re), .in_im(in_im), .x(x), .cfg(cfg));

  initial begin
    for (int k = 0; k < NPT; k++) begin
      in_re[k] = sample_t'($urandom);
      in_im[k] = sample_t'($urandom);
    end
    in_im[0] = -128;
    for (int s = 0; s < 16; s++) begin
      for (int inv = 0; inv < 2; inv++) begin
        int l, st;
        sel = 4'(s); ifft = 1'(inv);
        #1;
        l = (s >= 8) ? 8 : 8 - s;
        st = 256 >> l;
        checks++;
        if (cfg.log2n != 4'(l) || cfg.ifft != 1'(inv)) begin
          failures++; $display("sel %0d: cfg log2n=%0d ifft=%0d", s, cfg.log2n, cfg.ifft);
        end
        for (int n = 0; n < NPT; n++) begin
          int er, ei;
          if (n % st == 0) begin
            er = int'(in_re[n / st]) * 16;
            ei = (inv ? -int'(in_im[n / st]) : int'(in_im[n / st])) * 16;
          end else begin
            er = 0; ei = 0;
          end
          checks++;
          if (int'(x[n].re) != er || int'(x[n].im) != ei) begin
            failures++;
            if (failures < 10) $display("sel %0d ifft %0d n %0d: got (%0d,%0d) expected (%0d,%0d)", s, inv, n, x[n].re, x[n].im, er, ei);
          end
        end
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
