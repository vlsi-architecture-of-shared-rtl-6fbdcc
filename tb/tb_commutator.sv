// tb_commutator: writes three frames back to back into a one-row-per-clock
// commutator (as behind the second stage) and three frames, four rows per
// clock in the last 8 beats, into a four-row commutator (as behind the first
// stage). Checks that each frame is read out in the clock after its last
// write, one row per clock for 32 clocks, with line a of read row {k1, b}
// equal to word b of written row {k1, a}, and that the configuration of
// the frame travels with it.
module tb_commutator;
  import smss_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  tag_t       wt1, wt4, rt1, rt4;
  logic [4:0] row1 [1];
  logic [4:0] row4 [4];
  cplx_t      din1 [1][PATHS];
  cplx_t      din4 [4][PATHS];
  cplx_t      do1 [PATHS];
  cplx_t      do4 [PATHS];
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_wr1 = -100, last_wr4 = -100;
  int f_rd1 = 0, f_rd4 = 0;

  commutator #(.WG(1)) dut1 (.clk(clk), .rst(rst), .wr_tag(wt1), .wr_row(row1), .din(din1), .dout(do1), .rd_tag(rt1));
  commutator #(.WG(4)) dut4 (.clk(clk), .rst(rst), .wr_tag(wt4), .wr_row(row4), .din(din4), .dout(do4), .rd_tag(rt4));
  always #5 clk = ~clk;

  // word value: frame f, row r, line b
  function automatic cplx_t val(input int f, input int r, input int b);
    return '{re: word_t'(f * 1000 + r * 8 + b), im: word_t'(-(f * 1000 + r * 8 + b))};
  endfunction

  task automatic check_row(input cplx_t dout [PATHS], input tag_t rt, input int f, input string nm);
    int k1, bb;
    k1 = int'(rt.cnt[4:3]); bb = int'(rt.cnt[2:0]);
    checks++;
    if (rt.cfg.log2n != 4'(f + 2)) begin failures++; $display("%s cfg of frame %0d wrong", nm, f); end
    for (int a = 0; a < PATHS; a++) begin
      checks++;
      if (dout[a] != val(f, k1 * 8 + a, bb)) begin
        failures++;
        if (failures < 10) $display("%s frame %0d row %0d line %0d: got %0d", nm, f, rt.cnt, a, dout[a].re);
      end
    end
  endtask

  initial begin
    wt1 = '0; wt4 = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 32 * 3 + 60; t++) begin
      int f, c;
      f = t / 32; c = t % 32;
      wt1 = '0; wt4 = '0;
      if (f < 3) begin
        wt1 = '{valid: 1'b1, last: 1'(c == 31), cnt: 5'(c), cfg: '{log2n: 4'(f + 2), ifft: 1'b0}};
        row1[0] = 5'(c);
        for (int b = 0; b < PATHS; b++) din1[0][b] = val(f, c, b);
        if (c >= 24) begin
          wt4 = '{valid: 1'b1, last: 1'(c == 31), cnt: 5'(c - 24), cfg: '{log2n: 4'(f + 2), ifft: 1'b0}};
          for (int g = 0; g < 4; g++) begin
            row4[g] = 5'(g * 8 + c - 24);
            for (int b = 0; b < PATHS; b++) din4[g][b] = val(f, g * 8 + c - 24, b);
          end
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (f_rd1 != 3) begin failures++; $display("one-row commutator read %0d frames", f_rd1); end
    if (f_rd4 != 3) begin failures++; $display("four-row commutator read %0d frames", f_rd4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (wt1.valid && wt1.last) last_wr1 <= cyc;
      if (wt4.valid && wt4.last) last_wr4 <= cyc;
      cyc <= cyc + 1;
    end
  end

  // outputs after edge e: row r of a frame whose last write was sampled at edge
  // L leaves after edge L + 1 + r + 1
  always @(negedge clk) begin
    if (!rst && rt1.valid) begin
      checks++;
      if (int'(rt1.cnt) != cyc - last_wr1 - 2 + (cyc - last_wr1 - 2 < 0 ? 32 : 0)) begin
        failures++; $display("one-row read timing: row %0d at %0d after last write", rt1.cnt, cyc - last_wr1);
      end
      check_row(do1, rt1, f_rd1, "WG1");
      if (rt1.last) f_rd1++;
    end
    if (!rst && rt4.valid) begin
      checks++;
      if (int'(rt4.cnt) != cyc - last_wr4 - 2 + (cyc - last_wr4 - 2 < 0 ? 32 : 0)) begin
        failures++; $display("four-row read timing: row %0d at %0d after last write", rt4.cnt, cyc - last_wr4);
      end
      check_row(do4, rt4, f_rd4, "WG4");
      if (rt4.last) f_rd4++;
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
