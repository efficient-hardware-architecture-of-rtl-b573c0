// tb_transform_1d: checks the unified 1-D unit for all three sizes.
// Vectors enter back to back and with random gaps; each result must appear
// exactly LAT cycles after its input, on the outputs the size uses
// (4-point: Dst0/4/8/12, 8-point: even Dst, 16-point: all), and equal the
// N-point HEVC transform of the reference model. out_valid must be low
// when no result is due. Unused inputs are held at zero, as the design
// around the unit does.
module tb_transform_1d;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 12;

  logic   clk = 0, rst = 1, in_valid = 0;
  vec16_t src = '0;
  logic   out_valid;
  vec16_t dst;
  int checks = 0, failures = 0;
  int cyc = 0;

  transform_1d #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; int n; int r [16]; } exp_t;
  exp_t q [$];

  // drive on negedge, sample on negedge
  initial begin
    int s [16], r [16];
    exp_t e;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare what is due now
      if (q.size() > 0 && q[0].due == cyc) begin
        e = q.pop_front();
        checks++;
        if (!out_valid) begin failures++; $display("FAIL: missing out_valid at %0d", cyc); end
        for (int k = 0; k < e.n; k++) begin
          checks++;
          if (dst[k * (16 / e.n)] != e.r[k]) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d k=%0d got %0d exp %0d", e.n, k, dst[k * (16 / e.n)], e.r[k]);
          end
        end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL: spurious out_valid at %0d", cyc); end
      end
      // next input
      if (t < 2900 && $urandom_range(3) != 0) begin
        int n;
        n = size_points(int'($urandom_range(2)));
        for (int i = 0; i < 16; i++)
          s[i] = (i < n) ? ((t % 7 == 0) ? ((i % 2) ? -32768 : 32767) : int'($urandom_range(65535)) - 32768) : 0;
        for (int i = 0; i < 16; i++) src[i] = s[i];
        in_valid = 1;
        dct1d(n, s, r);
        e.due = cyc + LAT;
        e.n = n;
        e.r = r;
        q.push_back(e);
      end else begin
        in_valid = 0;
        src = '0;
      end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results never came", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
