// vedic_mult: unsigned A x B multiplier built on the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule, the multiplier the published description puts in
// place of the ordinary multipliers of the SMSS processor.
//
// How it works: for every column k of the result, all crosswise bit products
// a[i] & b[k-i] are formed at once and counted (the "vertical and crosswise"
// step); the column counts, each weighted by 2^k, are then added together,
// which resolves the carries that the sutra passes from column to column.
// The published description names the sutra but shows no gate-level structure; the column
// counting form used here is this design's own reading of it.
//
// Interface: purely combinational, p = a * b, unsigned, AW + BW result bits.
module vedic_mult #(
  parameter int unsigned AW = 22,
  parameter int unsigned BW = 12
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);
  localparam int unsigned PW = AW + BW;
  localparam int unsigned CW = $clog2(BW + 1);  // width of one column count

  logic [CW-1:0] col [PW-1];

  // crosswise products of each column
  always_comb begin
    for (int k = 0; k < PW - 1; k++) begin
      col[k] = '0;
      for (int i = 0; i < AW; i++) begin
        if (k - i >= 0 && k - i < BW) col[k] = col[k] + CW'(a[i] & b[k-i]);
      end
    end
  end

  // carry resolution: weighted sum of the column counts
  always_comb begin
    p = '0;
    for (int k = 0; k < PW - 1; k++) p = p + (PW'(col[k]) << k);
  end
endmodule
