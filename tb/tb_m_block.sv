// tb_m_block: checks the 16-point odd part. Sample vectors of 16 points are
// folded by the 16-point butterfly in the testbench; y[m] must equal the odd
// coefficient 2m+1 of the 16-point HEVC transform from the reference model.
module tb_m_block;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  vec8_t o, y;
  int checks = 0, failures = 0;

  m_block dut (.o, .y);

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
      for (int n = 0; n < 16; n++)
        case (t % 4)
          0: s[n] = (n < 8) ? 32767 : -32768;
          1: s[n] = (n % 2) ? -32768 : 32767;
          default: s[n] = int'($urandom_range(65535)) - 32768;
        endcase
      for (int j = 0; j < 8; j++) o[j] = s[j] - s[15-j];
      #1;
      dct1d(16, s, r);
      for (int m = 0; m < 8; m++) begin
        checks++;
        if (y[m] != r[2*m+1]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y%0d=%0d exp %0d", t, m, y[m], r[2*m+1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
