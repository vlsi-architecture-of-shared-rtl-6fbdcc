// commutator: the data reordering between two butterfly stages of the
// eight-path core. A delay commutator in a multipath pipeline exchanges data
// between paths and time slots; here it is built as a ping-pong transposition
// buffer, the simplest structure with the same effect on a whole frame.
//
// A frame is 32 rows of 8 words, row = {k1, a} (k1 = 0..3, a = 0..7), word
// b of a row arriving on line b. It is read back as 32 rows {k1, b} whose
// line a holds word b of written row {k1, a}: an 8 x 8 transposition inside
// each of the four k1 blocks. WG rows can be written per clock (4 behind the
// first stage, whose butterfly delivers all four k1 outputs together; 1
// behind the second stage). While one bank is read the other is written.
// Reading of a bank starts in the clock after the write carrying tag.last
// and takes 32 clocks, one row per clock, in row order.
//
// Interface: wr_tag.valid writes din[g] to row wr_row[g] (g < WG) of the
// write bank; dout/rd_tag are registered, rd_tag.cnt = row number read.
// Synchronous active-high reset.
module commutator
  import smss_pkg::*;
#(
  parameter int unsigned WG = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  tag_t       wr_tag,
  input  logic [4:0] wr_row [WG],
  input  cplx_t      din    [WG][PATHS],
  output cplx_t      dout   [PATHS],
  output tag_t       rd_tag
);
  cplx_t      mem [2][32][PATHS];
  logic       wb;       // bank being written
  logic       rb;       // bank being read
  logic       rd_act;
  logic [4:0] rd_cnt;
  cfg_t       rd_cfg;
  logic       start;

  assign start = wr_tag.valid && wr_tag.last;

  always_ff @(posedge clk) begin
    if (wr_tag.valid)
      for (int g = 0; g < WG; g++)
        for (int b = 0; b < PATHS; b++) mem[wb][wr_row[g]][b] <= din[g][b];
    for (int a = 0; a < PATHS; a++) dout[a] <= mem[rb][{rd_cnt[4:3], 3'(a)}][rd_cnt[2:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wb     <= 1'b0;
      rb     <= 1'b0;
      rd_act <= 1'b0;
      rd_cnt <= '0;
      rd_cfg <= '0;
      rd_tag <= '0;
    end else begin
      rd_tag.valid <= rd_act;
      rd_tag.last  <= rd_act && (rd_cnt == 5'd31);
      rd_tag.cnt   <= rd_cnt;
      rd_tag.cfg   <= rd_cfg;
      if (start) begin
        wb     <= ~wb;
        rb     <= wb;
        rd_act <= 1'b1;
        rd_cnt <= '0;
        rd_cfg <= wr_tag.cfg;
      end else if (rd_act) begin
        rd_cnt <= rd_cnt + 5'd1;
        if (rd_cnt == 5'd31) rd_act <= 1'b0;
      end
    end
  end

  // A new frame may only complete once the previous one has been read out
  // far enough that the bank it frees is not still in use.
  property p_no_overrun;
    @(posedge clk) disable iff (rst) start |-> (!rd_act || rd_cnt == 5'd31);
  endproperty
  a_no_overrun: assert property (p_no_overrun);
endmodule
