// tb_output_mux: sends column results of every size, spaced N/4 cycles
// apart or further, and checks that coefficient k = Dst(k*16/N) comes out
// in group k/4, slot k%4, starting the cycle after in_valid, with
// out_valid high for exactly N/4 cycles per column.
module tb_output_mux;
  import dct_pkg::*;

  logic       clk = 0, rst = 1, in_valid = 0;
  logic [1:0] size = 0;
  vec16_t     dst = '0;
  vec4_t      out_data;
  logic       out_valid;
  int checks = 0, failures = 0;

  output_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    vec16_t d;
    int n, p, gap;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(!out_valid, "out_valid after reset");
    for (int t = 0; t < 600; t++) begin
      size = 2'($urandom_range(2));
      n = 4 << size;
      p = n / 4;
      for (int i = 0; i < 16; i++) d[i] = word_t'($urandom);
      dst = d;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      dst = '0;
      for (int g = 0; g < p; g++) begin
        chk(out_valid, $sformatf("N=%0d group %0d missing", n, g));
        for (int c = 0; c < 4; c++)
          chk(out_data[c] == d[(4 * g + c) * (16 / n)],
              $sformatf("N=%0d group %0d slot %0d", n, g, c));
        if (g < p - 1) @(negedge clk);
      end
      gap = (t % 2) ? 0 : int'($urandom_range(3));
      if (gap > 0) begin
        @(negedge clk);
        chk(!out_valid, "out_valid after the last group");
        repeat (gap - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
