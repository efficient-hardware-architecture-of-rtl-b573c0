// m_block: odd part of the 16-point forward transform.
//
// Input o[j] = s(j) - s(15-j), j = 0..7, the differences of the 16-point
// butterfly. Output y[m] is coefficient 2m+1 (Dst1, Dst3, ..., Dst15):
//   y[m] = sum_j C16[2m+1][j] * o[j]
// using the HEVC 16-point odd rows (magnitudes 90, 87, 80, 70, 57, 43, 25,
// 9). Products are built from shifted copies of the inputs and combined
// with signed adds, so no multiplier is used. The original architecture
// splits this work over three sub-blocks and a final shift by 3 that
// belong to its own modified coefficients; those are not reproduced here,
// and with the standard coefficients no final shift is needed.
module m_block
  import dct_pkg::*;
(
  input  vec8_t o,
  output vec8_t y
);

  localparam logic [7:0] MAG [8][8] = '{'{90, 87, 80, 70, 57, 43, 25,  9},
                                         '{87, 57,  9, 43, 80, 90, 70, 25},
                                         '{80,  9, 70, 87, 25, 57, 90, 43},
                                         '{70, 43, 87,  9, 90, 25, 80, 57},
                                         '{57, 80, 25, 90,  9, 87, 43, 70},
                                         '{43, 90, 57, 25, 87, 70,  9, 80},
                                         '{25, 70, 90, 80, 43,  9, 57, 87},
                                         '{ 9, 25, 43, 57, 70, 80, 87, 90}};
  localparam bit NEG [8][8] = '{'{0, 0, 0, 0, 0, 0, 0, 0},
                                '{0, 0, 0, 1, 1, 1, 1, 1},
                                '{0, 0, 1, 1, 1, 0, 0, 0},
                                '{0, 1, 1, 0, 0, 0, 1, 1},
                                '{0, 1, 1, 0, 1, 1, 0, 0},
                                '{0, 1, 0, 0, 1, 0, 0, 1},
                                '{0, 1, 0, 1, 0, 0, 1, 0},
                                '{0, 1, 0, 1, 0, 1, 0, 1}};

  always_comb begin
    for (int m = 0; m < 8; m++) begin
      y[m] = '0;
      for (int j = 0; j < 8; j++) begin
        if (NEG[m][j]) y[m] = y[m] - shift_add_mul(o[j], MAG[m][j]);
        else           y[m] = y[m] + shift_add_mul(o[j], MAG[m][j]);
      end
    end
  end

endmodule
