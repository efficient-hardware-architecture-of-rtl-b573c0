// tb_frame_fullhd: streams one 1920x1080 4:2:0 frame through the 2-D
// transform at default parameters, as 16x16 blocks sent back to back
// (each start the cycle after the previous done). The luma plane is padded
// to 1088 rows and each chroma plane (960x540) to 544 rows, giving
// 120*68 + 2*60*34 = 12,240 blocks. Residuals are pseudo-random 9-bit
// values. Every coefficient is checked against the reference model, the
// block period is checked to be 2*64 + 2*LAT + 2 = 154 cycles, and the
// cycles per frame are turned into the clock rate needed for 30 frames/s
// (93.312 Msamples/s for the unpadded frame).
// FRAME_BLOCKS can be lowered to shorten the run; the rate is scaled up.
module tb_frame_fullhd;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT          = 12;
  localparam int N            = 16;
  localparam int FRAME_BLOCKS = 120 * 68 + 2 * 60 * 34;

  logic        clk = 0, rst = 1, start = 0;
  logic [1:0]  sel = 2'd2;
  word_t [3:0] in_data = '0;
  logic        busy, out_valid, done;
  word_t [3:0] out_data;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dct2d_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int x [16][16];
  int z [16][16];

  task automatic make_block();
    int v [16], r [16], y [16][16];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) x[i][j] = int'($urandom_range(511)) - 256;
    for (int i = 0; i < N; i++) begin
      for (int n = 0; n < 16; n++) v[n] = x[i][n];
      dct1d(N, v, r);
      for (int k = 0; k < 16; k++) y[i][k] = r[k];
    end
    for (int j = 0; j < N; j++) begin
      for (int n = 0; n < 16; n++) v[n] = y[n][j];
      dct1d(N, v, r);
      for (int k = 0; k < 16; k++) z[k][j] = r[k];
    end
  endtask

  // Everything is driven and observed at the falling edge: what is seen
  // there is the state of the cycle that the next rising edge closes.
  initial begin
    longint t_first, t_start, t_prev;
    int groups;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    make_block();
    t_prev = -1;
    t_first = cyc;
    for (int b = 0; b < FRAME_BLOCKS; b++) begin
      t_start = cyc;
      if (t_prev >= 0)
        chk(t_start - t_prev == 2 * N * N / 4 + 2 * LAT + 2,
            $sformatf("block %0d period %0d", b, t_start - t_prev));
      t_prev = t_start;
      chk(!busy, "busy at block start");
      for (int i = 0; i < N; i++)
        for (int g = 0; g < N / 4; g++) begin
          start = (i == 0 && g == 0);
          for (int c = 0; c < 4; c++) in_data[c] = 32'(x[i][4 * g + c]);
          @(negedge clk);
        end
      start = 0;
      in_data = '0;
      groups = 0;
      while (1) begin
        if (out_valid) begin
          for (int c = 0; c < 4; c++)
            chk(out_data[c] == 32'(z[4 * (groups % 4) + c][groups / 4]),
                $sformatf("block %0d group %0d slot %0d", b, groups, c));
          groups++;
          if (done) break;
        end
        @(negedge clk);
      end
      chk(groups == N * N / 4, "group count");
      // next block's data while the last group is on the outputs
      make_block();
      @(negedge clk);
    end
    begin
      real cycles, mhz;
      cycles = real'(cyc - t_first) * real'(120 * 68 + 2 * 60 * 34) / real'(FRAME_BLOCKS);
      mhz = cycles * 30.0 / 1.0e6;
      $display("%0d blocks, %0.0f cycles per frame, %0.2f samples/cycle; 30 frames/s needs %0.1f MHz",
               FRAME_BLOCKS, cycles, 1920.0 * 1080.0 * 1.5 / cycles, mhz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
