// tb_control_unit: runs the control unit for every size against a model of
// its surroundings: the row transform is a LAT-cycle delay of row_valid,
// the column transform a LAT-cycle delay of col_pop, and the output
// multiplexer turns each column result into N/4 cycles of out_valid one
// cycle later. Checked: the input write strobes and group numbers, one
// row_valid per row right after its last group, FIFOs selected in row
// order, N column pops spaced N/4 cycles apart starting the cycle after the
// last row result, done once with the last output group, busy, a start
// while busy being ignored, and the total cycle count 2*N*N/4 + 2*LAT + 2.
module tb_control_unit;
  import dct_pkg::*;

  localparam int LAT = 12;

  logic       clk = 0, rst = 1, start = 0;
  logic [1:0] sel = 0;
  logic       row_out_valid, out_valid;
  logic [1:0] size, in_grp;
  logic       busy, in_clear, in_wr, row_valid, col_pop, done;
  logic [3:0] fifo_sel;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // environment model
  logic [LAT-1:0] rowd = '0, cold = '0;
  int burst = 0;
  logic [1:0] size_env = 0;
  always_ff @(posedge clk) begin
    rowd <= {rowd[LAT-2:0], row_valid};
    cold <= {cold[LAT-2:0], col_pop};
    if (cold[LAT-1]) burst <= (4 << size_env) / 4;
    else if (burst > 0) burst <= burst - 1;
  end
  assign row_out_valid = rowd[LAT-1];
  assign out_valid     = burst > 0;

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

  task automatic run(int s, bit poke);
    int n, p, cyc, nwr, nrow, nfifo, npop, nout, ndone, last_rov, last_pop, done_cyc;
    n = 4 << s;
    p = n / 4;
    size_env = 2'(s);
    nwr = 0; nrow = 0; nfifo = 0; npop = 0; nout = 0; ndone = 0;
    last_rov = -1; last_pop = -1; done_cyc = -1;
    sel = 2'(s);
    start = 1;
    #1;
    chk(in_wr && in_clear && in_grp == 0, "first group not taken with start");
    nwr = 1;
    for (cyc = 0; cyc < 1000 && done_cyc < 0; cyc++) begin
      @(negedge clk);   // signals of cycle `cyc` were sampled at the previous edge; look now
      // (values seen here belong to cycle cyc+1)
      start = 0;
      if (poke && cyc == 5) begin start = 1; sel = 2'((s + 1) % 3); end
      if (poke && cyc == 6) begin start = 0; sel = 2'(s); end
      if (row_valid) begin
        chk(nwr == (nrow + 1) * p, $sformatf("N=%0d row_valid %0d after %0d writes", n, nrow, nwr));
        nrow++;
      end
      if (in_wr) begin
        chk(in_grp == 2'(nwr % p), $sformatf("N=%0d write %0d group %0d", n, nwr, in_grp));
        chk(!in_clear, "clear after the first group");
        nwr++;
      end
      if (row_out_valid) begin
        chk(int'(fifo_sel) == nfifo, $sformatf("N=%0d fifo_sel %0d exp %0d", n, fifo_sel, nfifo));
        nfifo++;
        last_rov = cyc;
      end
      if (col_pop) begin
        if (npop == 0) chk(cyc == last_rov + 1 && nfifo == n, $sformatf("N=%0d first pop at %0d", n, cyc));
        else           chk(cyc == last_pop + p, $sformatf("N=%0d pop spacing", n));
        last_pop = cyc;
        npop++;
      end
      if (out_valid) nout++;
      if (done) begin
        ndone++;
        chk(out_valid && nout == n * p, $sformatf("N=%0d done with %0d groups", n, nout));
        done_cyc = cyc;
      end
      chk(busy || done_cyc >= 0, "busy dropped early");
    end
    chk(nwr == n * p && nrow == n && nfifo == n && npop == n && ndone == 1,
        $sformatf("N=%0d counts wr %0d rows %0d fifo %0d pops %0d done %0d", n, nwr, nrow, nfifo, npop, ndone));
    chk(size == 2'(s), "size not latched");
    // cycle 0 is the start cycle; done seen in cycle done_cyc+1
    chk(done_cyc + 2 == 2 * n * n / 4 + 2 * LAT + 2,
        $sformatf("N=%0d total %0d cycles, exp %0d", n, done_cyc + 2, 2 * n * n / 4 + 2 * LAT + 2));
    @(negedge clk);
    chk(!busy && !done, "busy or done after the block");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(!busy && !in_wr && !done, "idle after reset");
    for (int t = 0; t < 30; t++) run(t % 3, t % 4 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
