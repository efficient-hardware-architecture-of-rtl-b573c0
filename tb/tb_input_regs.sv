// tb_input_regs: checks that groups of four samples land in registers
// 4*grp..4*grp+3, that clear zeroes everything not written in the same
// cycle, and that registers not written keep their value.
module tb_input_regs;
  import dct_pkg::*;

  logic       clk = 0, rst = 1, clear = 0, wr_en = 0;
  logic [1:0] grp = 0;
  vec4_t      in_data = '0;
  vec16_t     src;
  int checks = 0, failures = 0;
  int model [16];

  input_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      clear = ($urandom_range(9) == 0);
      wr_en = ($urandom_range(3) != 0);
      grp   = 2'($urandom_range(3));
      for (int c = 0; c < 4; c++) in_data[c] = word_t'($urandom);
      @(negedge clk);
      for (int r = 0; r < 16; r++) begin
        if (wr_en && r / 4 == int'(grp)) model[r] = in_data[r % 4];
        else if (clear) model[r] = 0;
      end
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (src[r] != model[r]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d reg %0d got %h exp %h", t, r, src[r], model[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
