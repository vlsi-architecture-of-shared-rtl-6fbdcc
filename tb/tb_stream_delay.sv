// tb_stream_delay: feeds a numbered sample stream and checks that the four
// taps present the samples of 3L, 2L, L and 0 clocks earlier, i.e. that in
// the last L beats of each 4L-beat frame the four streams A..D line up.
module tb_stream_delay;
  import smss_pkg::*;
  localparam int L = STREAM;
  logic  clk = 1'b0;
  cplx_t d, a, b, c, dd;
  int checks = 0, failures = 0;

  stream_delay dut (.clk(clk), .d(d), .a(a), .b(b), .c(c), .dd(dd));
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      d = '{re: word_t'(t), im: word_t'(-t)};
      #1;
      if (t >= 3 * L) begin
        checks++;
        if (a.re != word_t'(t - 3 * L) || b.re != word_t'(t - 2 * L) || c.re != word_t'(t - L)
            || dd.re != word_t'(t) || a.im != word_t'(-(t - 3 * L))) begin
          failures++;
          if (failures < 10) $display("t=%0d taps %0d %0d %0d %0d", t, a.re, b.re, c.re, dd.re);
        end
      end
    end
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
