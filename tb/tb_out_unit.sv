// tb_out_unit: feeds frames of 32 third-stage rows (row {k1, r}, line q =
// bin k1 + 4r + 32q) with known values and checks the released ports: bin
// order, zero bins k >= N, rounding off the FRAC fraction bits, conjugate
// and divide by N for IFFT, saturation to 8 bits, and the out_valid pulse
// two clocks after the last row.
module tb_out_unit;
  import smss_pkg::*;
  logic    clk = 1'b0, rst = 1'b1;
  cplx_t   y [PATHS];
  tag_t    ti;
  sample_t out_re [NPT];
  sample_t out_im [NPT];
  logic    out_valid;
  int checks = 0, failures = 0;
  int vals_re [NPT], vals_im [NPT];
  int n_sat = 0;

  out_unit dut (.clk(clk), .rst(rst), .y(y), .tag_in(ti), .out_re(out_re), .out_im(out_im),
                .out_valid(out_valid));
  always #5 clk = ~clk;

  function automatic int rsh(input int v, input int s);
    // round to nearest, ties toward +infinity, as an arithmetic shift
    return (v + (1 <<< (s - 1))) >>> s;
  endfunction

  function automatic int sat8(input int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  task automatic run_frame(input int l, input bit inv);
    int sh;
    for (int k = 0; k < NPT; k++) begin
      // mostly in range, some far out of range to force saturation
      vals_re[k] = $signed($urandom_range(8191)) - 4096;
      vals_im[k] = (k % 17 == 0) ? 40000 : $signed($urandom_range(8191)) - 4096;
    end
    for (int c = 0; c < 32; c++) begin
      @(negedge clk);
      ti = '{valid: 1'b1, last: 1'(c == 31), cnt: 5'(c), cfg: '{log2n: 4'(l), ifft: inv}};
      for (int q = 0; q < PATHS; q++) begin
        int k;
        k = c / 8 + 4 * (c % 8) + 32 * q;
        y[q] = '{re: word_t'(vals_re[k]), im: word_t'(vals_im[k])};
      end
    end
    @(negedge clk);
    ti = '0;
    checks++;
    if (out_valid) begin failures++; $display("out_valid one clock early"); end
    @(negedge clk);
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing"); end
    sh = inv ? 4 + l : 4;
    for (int k = 0; k < NPT; k++) begin
      int er, ei;
      if (k < (1 << l)) begin
        er = sat8(rsh(vals_re[k], sh));
        ei = sat8(rsh(inv ? -vals_im[k] : vals_im[k], sh));
        if (ei != rsh(inv ? -vals_im[k] : vals_im[k], sh)) n_sat++;
      end else begin
        er = 0; ei = 0;
      end
      checks++;
      if (int'(out_re[k]) != er || int'(out_im[k]) != ei) begin
        failures++;
        if (failures < 10) $display("N=%0d ifft=%0d bin %0d: got (%0d,%0d) expected (%0d,%0d)", 1 << l, inv, k, out_re[k], out_im[k], er, ei);
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid longer than one clock"); end
  endtask

  initial begin
    ti = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_frame(8, 1'b0);
    run_frame(5, 1'b0);
    run_frame(8, 1'b1);
    run_frame(3, 1'b1);
    run_frame(1, 1'b0);
    checks++;
    if (n_sat == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
