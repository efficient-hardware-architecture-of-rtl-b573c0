// tb_u1_block: checks the 4-point core against the 4-point HEVC matrix.
// The 4-point butterfly is applied here in the testbench; y0..y3 must equal
// coefficients 0..3 of the 4-point transform of the sample vector (y1 and
// y3 from the odd differences, y0 and y2 from the sums).
// Random and extreme sample vectors are used.
module tb_u1_block;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  vec4_t x, y;
  int checks = 0, failures = 0;

  u1_block dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s [16], r [16];
    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < 16; n++) s[n] = 0;
      for (int n = 0; n < 4; n++)
        case (t % 4)
          0: s[n] = 32767;
          1: s[n] = (n % 2) ? -32768 : 32767;
          default: s[n] = int'($urandom_range(65535)) - 32768;
        endcase
      x[0] = (s[0] + s[3]) + (s[1] + s[2]);
      x[1] = (s[0] + s[3]) - (s[1] + s[2]);
      x[2] = s[0] - s[3];
      x[3] = s[1] - s[2];
      #1;
      dct1d(4, s, r);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (y[k] != r[k]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y%0d=%0d exp %0d", t, k, y[k], r[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
