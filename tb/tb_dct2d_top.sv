// tb_dct2d_top: end-to-end test of the 2-D transform at default parameters.
//
// Runs blocks of every size (4x4, 8x8, 16x16) with random 9-bit residuals
// and with extreme blocks (all +255, all -256, alternating signs), in an
// order that switches the size between consecutive blocks and repeats a
// size back to back. Every output coefficient is compared with C*X*C^T
// computed by the reference model; the output order (column by column,
// four rows per group), the number of output groups, done and busy are
// checked, and so is the latency from start to done against
// 2*N*N/4 + 2*LAT + 2. A start given while busy must be ignored.
// Mechanisms counted (each must happen at least once): each size, a size
// switch, an ignored start. Every size fills and empties its N FIFOs, so
// the 16x16 blocks exercise all 16.
module tb_dct2d_top;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 12;   // default of the top

  logic        clk = 0, rst = 1, start = 0;
  logic [1:0]  sel = 0;
  word_t [3:0] in_data = '0;
  logic        busy, out_valid, done;
  word_t [3:0] out_data;

  int checks = 0, failures = 0;
  int n_size [3] = '{0, 0, 0};
  int n_switch = 0, n_ignored = 0;

  dct2d_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // kind: 0 random, 1 all +255, 2 all -256, 3 checkerboard +-255/-256
  task automatic run_block(int s, int kind, bit poke_start);
    int n_pts, p;
    int x [16][16];
    int y [16][16];    // row pass: y[i][k]
    int z [16][16];    // result z[k][j]
    int v [16], r [16];
    int t0, t_done, groups;
    bit seen_done;
    n_pts = size_points(s);
    p = n_pts / 4;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        case (kind)
          0: x[i][j] = int'($urandom_range(511)) - 256;
          1: x[i][j] = 255;
          2: x[i][j] = -256;
          default: x[i][j] = ((i + j) % 2) ? 255 : -256;
        endcase
      end
    // reference
    for (int i = 0; i < n_pts; i++) begin
      for (int n = 0; n < 16; n++) v[n] = (n < n_pts) ? x[i][n] : 0;
      dct1d(n_pts, v, r);
      for (int k = 0; k < 16; k++) y[i][k] = r[k];
    end
    for (int j = 0; j < n_pts; j++) begin
      for (int n = 0; n < 16; n++) v[n] = (n < n_pts) ? y[n][j] : 0;
      dct1d(n_pts, v, r);
      for (int k = 0; k < 16; k++) z[k][j] = r[k];
    end

    // drive: start with group 0, then the rest on consecutive cycles
    t0 = $time / 10 + 1;   // the edge that samples start
    for (int i = 0; i < n_pts; i++)
      for (int g = 0; g < p; g++) begin
        start <= (i == 0 && g == 0);
        sel   <= 2'(s);
        for (int c = 0; c < 4; c++) in_data[c] <= 32'(x[i][4*g+c]);
        @(posedge clk);
      end
    start   <= 1'b0;
    in_data <= '0;

    // collect
    groups = 0;
    seen_done = 0;
    while (!seen_done) begin
      @(posedge clk);
      if (poke_start && groups == 0) begin
        // a start while busy must change nothing
        if (busy) begin
          start <= 1'b1;
          sel   <= 2'((s + 1) % 3);
          n_ignored++;
          poke_start = 0;
          @(posedge clk);
          start <= 1'b0;
          sel   <= 2'(s);
        end
      end
      if (out_valid) begin
        int col, row0;
        col  = groups / p;
        row0 = 4 * (groups % p);
        for (int c = 0; c < 4; c++)
          check(out_data[c] == 32'(z[row0 + c][col]),
                $sformatf("N=%0d col %0d row %0d: got %0d exp %0d", n_pts, col, row0 + c,
                          out_data[c], z[row0 + c][col]));
        groups++;
        if (done) begin
          seen_done = 1;
          t_done = $time / 10;
        end
      end else begin
        check(!done, "done without out_valid");
      end
    end
    check(groups == n_pts * p, $sformatf("N=%0d: %0d output groups", n_pts, groups));
    // start cycle t0 .. done cycle: inclusive count
    check((t_done - t0) == 2 * n_pts * n_pts / 4 + 2 * LAT + 2 - 1,
          $sformatf("N=%0d: latency %0d cycles, expected %0d", n_pts, t_done - t0 + 1,
                    2 * n_pts * n_pts / 4 + 2 * LAT + 2));
    $display("N=%0d kind=%0d: %0d cycles from start to done (inclusive)", n_pts, kind, t_done - t0 + 1);
    @(posedge clk);
    check(!busy, "busy after done");
    check(!out_valid, "out_valid after done");
    n_size[s]++;
  endtask

  initial begin
    int order [];
    int last;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(!busy && !out_valid && !done, "idle after reset");

    order = '{0, 1, 2, 2, 1, 0, 0, 2, 1, 0, 1, 2};
    last = -1;
    foreach (order[b]) begin
      if (last >= 0 && last != order[b]) n_switch++;
      run_block(order[b], 0, b == 3);
      last = order[b];
    end
    for (int s = 0; s < 3; s++)
      for (int kind = 1; kind <= 3; kind++) begin
        if (last != s) n_switch++;
        run_block(s, kind, 0);
        last = s;
      end

    $display("blocks: 4x4 %0d, 8x8 %0d, 16x16 %0d; size switches %0d; ignored starts %0d",
             n_size[0], n_size[1], n_size[2], n_switch, n_ignored);
    for (int s = 0; s < 3; s++) check(n_size[s] > 0, "a size never ran");
    check(n_switch > 0, "no size switch");
    check(n_ignored > 0, "no ignored start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
