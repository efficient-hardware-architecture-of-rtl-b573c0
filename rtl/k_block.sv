// k_block: odd part of the 8-point forward transform.
//
// Input eo[j] = e(j) - e(7-j), j = 0..3, the differences of the 8-point
// butterfly. Output y[m] is 8-point coefficient 2m+1, which the unified
// 1-D unit places on Dst(4m+2) (Dst2, Dst6, Dst10, Dst14):
//   y[m] = sum_j C8[2m+1][j] * eo[j]
// with the HEVC 8-point odd rows {89,75,50,18}, {75,-18,-89,-50},
// {50,-89,18,75}, {18,-50,75,-89}. Every product is formed from shifted
// copies of the input and the signs are applied in the final adds, so the
// block uses adders and shifts only. The split of this work into three
// sub-blocks in the original architecture is not reproduced: one
// combinational block computes what they produce together.
module k_block
  import dct_pkg::*;
(
  input  vec4_t eo,
  output vec4_t y
);

  // Magnitudes and signs of the odd rows (1 = subtract).
  localparam logic [7:0] MAG [4][4] = '{'{89, 75, 50, 18},
                                         '{75, 18, 89, 50},
                                         '{50, 89, 18, 75},
                                         '{18, 50, 75, 89}};
  localparam bit NEG [4][4] = '{'{0, 0, 0, 0},
                                '{0, 1, 1, 1},
                                '{0, 1, 0, 0},
                                '{0, 1, 0, 1}};

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      y[m] = '0;
      for (int j = 0; j < 4; j++) begin
        if (NEG[m][j]) y[m] = y[m] - shift_add_mul(eo[j], MAG[m][j]);
        else           y[m] = y[m] + shift_add_mul(eo[j], MAG[m][j]);
      end
    end
  end

endmodule
