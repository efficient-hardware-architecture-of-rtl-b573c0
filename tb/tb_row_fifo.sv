// tb_row_fifo: loads rows of 4, 8 and 16 words and pops them back with
// random gaps; checks the element order, that the head holds while no pop
// is given, the empty flag, and that an empty FIFO reads as zero.
module tb_row_fifo;
  import dct_pkg::*;

  logic          clk = 0, rst = 1, load = 0, pop = 0;
  logic [4:0]    load_len = 0;
  word_t [15:0]  load_data = '0;
  word_t         dout;
  logic          empty;
  int checks = 0, failures = 0;

  row_fifo #(.DEPTH(16)) dut (.*);

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
    word_t row [16];
    int n;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(empty && dout == 0, "not empty after reset");
    for (int t = 0; t < 300; t++) begin
      n = 4 << (t % 3);
      for (int i = 0; i < 16; i++) begin
        row[i] = word_t'($urandom);
        load_data[i] = row[i];
      end
      load = 1;
      load_len = 5'(n);
      @(negedge clk);
      load = 0;
      load_data = '0;
      for (int i = 0; i < n; i++) begin
        while ($urandom_range(2) == 0) begin
          chk(!empty && dout == row[i], $sformatf("hold: element %0d", i));
          @(negedge clk);
        end
        chk(!empty, $sformatf("empty with %0d of %0d left", n - i, n));
        chk(dout == row[i], $sformatf("row len %0d element %0d: got %h exp %h", n, i, dout, row[i]));
        pop = 1;
        @(negedge clk);
        pop = 0;
      end
      chk(empty, "not empty after the row was read");
      chk(dout == 0, "empty FIFO does not read as zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
