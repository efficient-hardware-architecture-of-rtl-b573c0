// dct_pkg: types, size encoding and shared functions of the unified
// 4/8/16-point forward HEVC transform.
//
// Samples and coefficients are 32-bit two's complement words everywhere
// (the width printed on the external buses). A 1-D vector is 16 words,
// Src0..Src15 / Dst0..Dst15, element 0 in the lowest slot.
//
// Constant multiplication is written as a sum of shifted copies of the
// operand (shift_add_mul); with a constant coefficient this elaborates to
// shifts and adders only, which is what the architecture is built from.
package dct_pkg;

  localparam int unsigned W  = 32;   // word width
  localparam int unsigned NV = 16;   // vector length of the unified 1-D unit

  typedef logic signed [W-1:0] word_t;
  typedef word_t [NV-1:0]      vec16_t;
  typedef word_t [3:0]         vec4_t;
  typedef word_t [7:0]         vec8_t;

  // Transform size as carried on Sel (2 bits; code 3 is treated as 16).
  typedef enum logic [1:0] {
    SZ4  = 2'd0,
    SZ8  = 2'd1,
    SZ16 = 2'd2
  } size_e;

  // Number of points N for a size code.
  function automatic int unsigned size_points(logic [1:0] s);
    case (s)
      2'd0:    return 4;
      2'd1:    return 8;
      default: return 16;
    endcase
  endfunction

  // Cycles per row/column on the 4-wide ports: N/4.
  function automatic int unsigned size_groups(logic [1:0] s);
    return size_points(s) / 4;
  endfunction

  // Multiply by a non-negative constant using only shifts and adds.
  function automatic word_t shift_add_mul(word_t x, logic [7:0] c);
    return (c[0] ? x         : word_t'(0)) + (c[1] ? x <<< 1 : word_t'(0))
         + (c[2] ? x <<< 2   : word_t'(0)) + (c[3] ? x <<< 3 : word_t'(0))
         + (c[4] ? x <<< 4   : word_t'(0)) + (c[5] ? x <<< 5 : word_t'(0))
         + (c[6] ? x <<< 6   : word_t'(0)) + (c[7] ? x <<< 7 : word_t'(0));
  endfunction

  // Pick the N-point result out of the unified 16-output vector:
  // element k of the N-point transform sits on Dst(k*16/N).
  // Slots N..15 of the result are zero.
  function automatic vec16_t gather(vec16_t dst, logic [1:0] s);
    vec16_t r;
    r = '0;
    for (int k = 0; k < NV; k++) begin
      case (s)
        2'd0:    if (k < 4) r[k] = dst[4*k];
        2'd1:    if (k < 8) r[k] = dst[2*k];
        default: r[k] = dst[k];
      endcase
    end
    return r;
  endfunction

endpackage
