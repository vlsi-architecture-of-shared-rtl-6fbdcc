// tb_frame_feeder: presents a new numbered frame every 32 clocks and checks
// that the feeder samples it in the frame's capture clock (the first edge
// after reset and every 32nd one after), then puts sample 8t + p on path p
// at beats t = 0..31 of the following 32 clocks, with tag.cnt = t,
// tag.last at t = 31 and the frame's configuration, back to back.
module tb_frame_feeder;
  import smss_pkg::*;
  logic  clk = 1'b0, rst = 1'b1;
  cplx_t x [NPT];
  cfg_t  cfg;
  cplx_t lane [PATHS];
  tag_t  tag;
  int checks = 0, failures = 0;
  int cyc = 0;  // edges since reset release; edge 32j samples frame j

  frame_feeder dut (.clk(clk), .rst(rst), .x(x), .cfg(cfg), .lane(lane), .tag(tag));
  always #5 clk = ~clk;

  task automatic present(input int f);
    for (int n = 0; n < NPT; n++) x[n] = '{re: word_t'(f * 1000 + n), im: word_t'(-n)};
    cfg = '{log2n: 4'(f % 8 + 1), ifft: 1'(f % 2)};
  endtask

  initial begin
    present(0);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (32 * 4 + 10) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (cyc % 32 == 0) #1 present(cyc / 32 + 1);
    end
  end

  // after edge e (e >= 1) beat t = (e - 1) % 32 of frame (e - 1) / 32 shows
  always @(negedge clk) begin
    if (!rst && cyc >= 2 && cyc <= 32 * 4) begin
      int e, f, t;
      e = cyc - 1;  // cyc has already counted edge e
      f = (e - 1) / 32; t = (e - 1) % 32;
      checks++;
      if (!tag.valid || int'(tag.cnt) != t || tag.last != (t == 31)
          || tag.cfg.log2n != 4'(f % 8 + 1) || tag.cfg.ifft != 1'(f % 2)) begin
        failures++;
        $display("edge %0d: tag valid=%0d cnt=%0d last=%0d", e, tag.valid, tag.cnt, tag.last);
      end
      for (int p = 0; p < PATHS; p++) begin
        checks++;
        if (int'(lane[p].re) != f * 1000 + 8 * t + p || int'(lane[p].im) != -(8 * t + p)) begin
          failures++;
          if (failures < 10) $display("edge %0d path %0d: got %0d expected %0d", e, p, lane[p].re, f * 1000 + 8 * t + p);
        end
      end
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
