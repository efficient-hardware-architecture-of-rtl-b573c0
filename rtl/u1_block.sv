// u1_block: 4-point core of the unified forward transform (block U1).
//
// From the four outputs of the 4-point butterfly it forms
//   y0 = 64*x0                      (to Dst0)
//   y2 = 64*x1                      (to Dst8)
//   y1 = 83*x2 + 36*x3              (to Dst4)
//   y3 = 36*x2 - 83*x3              (to Dst12)
// with 83 = (x<<6)+(x<<4)+(x<<1)+x and 36 = (x<<5)+(x<<2), the shift
// pattern of the published block diagram; no multipliers. That is
// 10 adders and 12 shifts, the count given for this block. The six low
// bits of y0 and y2 are always zero (they are products by 64).
// Purely combinational; the enclosing 1-D unit registers the result.
module u1_block
  import dct_pkg::*;
(
  input  vec4_t x,
  output vec4_t y
);

  word_t x2_83, x2_36, x3_83, x3_36;

  always_comb begin
    x2_83 = (x[2] <<< 6) + (x[2] <<< 4) + (x[2] <<< 1) + x[2];
    x2_36 = (x[2] <<< 5) + (x[2] <<< 2);
    x3_83 = (x[3] <<< 6) + (x[3] <<< 4) + (x[3] <<< 1) + x[3];
    x3_36 = (x[3] <<< 5) + (x[3] <<< 2);
    y[0]  = x[0] <<< 6;
    y[2]  = x[1] <<< 6;
    y[1]  = x2_83 + x3_36;
    y[3]  = x2_36 - x3_83;
  end

endmodule
