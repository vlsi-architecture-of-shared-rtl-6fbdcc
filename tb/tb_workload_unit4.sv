// tb_workload_unit4: the 256-point stimulus of the processor's published
// simulation: size lines s5..s8 = 0000, inputs in1_re .. in4_re = 1
// (ports in_re[0..3]), every other input 0. The expected result is the exact
// DFT X(k) = sum_{n=0..3} W_256^(nk), rounded to integers, so X(0) = 4 and
// the bins fall off towards k = 64. All 256 bins of the third result frame
// are compared (tolerance 1 LSB), and the cycle count from reset release to
// the first out_valid is checked against the processor latency.
module tb_workload_unit4;
  import smss_pkg::*;
  localparam int LATENCY = 105;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  sample_t in_re  [NPT];
  sample_t in_im  [NPT];
  sample_t out_re [NPT];
  sample_t out_im [NPT];
  logic    out_valid;
  int checks = 0, failures = 0;
  int cyc = 0, frames = 0;

  smss_fft_top dut (.clk(clk), .rst(rst), .s5(1'b0), .s6(1'b0), .s7(1'b0), .s8(1'b0),
                    .ifft(1'b0), .in_re(in_re), .in_im(in_im), .out_re(out_re),
                    .out_im(out_im), .out_valid(out_valid));
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < NPT; n++) begin
      in_re[n] = (n < 4) ? 8'sd1 : 8'sd0;
      in_im[n] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
  end

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      frames++;
      if (frames == 1) begin
        checks++;
        if (cyc - 1 != LATENCY) begin
          failures++; $display("first result after %0d clocks, expected %0d", cyc - 1, LATENCY);
        end
      end
      if (frames == 3) begin
        real pi;
        pi = 3.14159265358979;
        for (int k = 0; k < NPT; k++) begin
          real sr, si;
          int er, ei;
          sr = 0.0; si = 0.0;
          for (int n = 0; n < 4; n++) begin
            sr += $cos(2.0 * pi * real'(n * k) / 256.0);
            si -= $sin(2.0 * pi * real'(n * k) / 256.0);
          end
          er = $rtoi(sr + 10.5) - 10;
          ei = $rtoi(si + 10.5) - 10;
          checks++;
          if (int'(out_re[k]) - er > 1 || er - int'(out_re[k]) > 1 ||
              int'(out_im[k]) - ei > 1 || ei - int'(out_im[k]) > 1) begin
            failures++;
            if (failures < 10) $display("bin %0d: got (%0d,%0d) expected (%.2f,%.2f)", k, out_re[k], out_im[k], sr, si);
          end
        end
        $display("out1 = (%0d,%0d)  out2 = (%0d,%0d)  out65 = (%0d,%0d)", out_re[0], out_im[0],
                 out_re[1], out_im[1], out_re[64], out_im[64]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (LATENCY + 32 * 4) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
