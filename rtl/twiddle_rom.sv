// twiddle_rom: twiddle-factor generator, W_256^e for an 8-bit exponent e.
//
// W_256^e = cos(2*pi*e/256) - j*sin(2*pi*e/256), as a TW-bit signed pair
// scaled by 2^TW_FRAC = 1024. Only a quarter wave of the cosine is stored
// (65 entries); the quadrant e[7:6] selects which entry and which signs give
// the cosine and the sine:
//   q0: cos = C[i],     sin = C[64-i]      q1: cos = -C[64-i], sin = C[i]
//   q2: cos = -C[i],    sin = -C[64-i]     q3: cos = C[64-i],  sin = -C[i]
// with i = e[5:0]. The twiddle definition is the standard one; the table
// size and format are this design's choice.
//
// Interface: combinational, e in, w out.
module twiddle_rom
  import smss_pkg::*;
(
  input  logic [7:0] e,
  output twid_t      w
);
  // COS_Q[i] = round(1024 * cos(2*pi*i/256)), i = 0 .. 64 (one quarter wave).
  localparam int COS_Q [65] = '{
    1024, 1024, 1023, 1021, 1019, 1016, 1013, 1009, 1004,  999,  993,  987,  980,
     972,  964,  955,  946,  936,  926,  915,  903,  891,  878,  865,  851,  837,
     822,  807,  792,  775,  759,  742,  724,  706,  688,  669,  650,  630,  610,
     590,  569,  548,  526,  505,  483,  460,  438,  415,  392,  369,  345,  321,
     297,  273,  249,  224,  200,  175,  150,  125,  100,   75,   50,   25,    0};

  int i, c, s;

  always_comb begin
    i = int'(e[5:0]);
    unique case (e[7:6])
      2'd0:    begin c =  COS_Q[i];    s =  COS_Q[64-i]; end
      2'd1:    begin c = -COS_Q[64-i]; s =  COS_Q[i];    end
      2'd2:    begin c = -COS_Q[i];    s = -COS_Q[64-i]; end
      default: begin c =  COS_Q[64-i]; s = -COS_Q[i];    end
    endcase
    w.re = coef_t'(c);
    w.im = coef_t'(-s);
  end
endmodule
