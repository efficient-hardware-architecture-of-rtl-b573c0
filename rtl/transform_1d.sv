// transform_1d: unified 1-D forward HEVC transform, 16 inputs, 16 outputs.
//
// One datapath serves the 4-, 8- and 16-point transforms. For the 16-point
// transform all of Src0..Src15 are used; for 8 points only Src0..Src7 and
// for 4 points only Src0..Src3, the other inputs being held at zero by the
// caller. With zero upper inputs each butterfly stage simply passes the
// lower half through, so the result lands on:
//   4-point : Dst0, Dst4, Dst8, Dst12
//   8-point : Dst0, Dst2, ..., Dst14
//   16-point: Dst0 .. Dst15
// and the remaining outputs carry don't-care values.
//
// Datapath (after the published block diagram):
//   stage 1  16-point butterfly  e = s(i)+s(15-i), o = s(i)-s(15-i)
//   stage 2  8-point butterfly on e; m_block (16-point odd part) on o
//   stage 3  4-point butterfly on the 8-point sums; k_block (8-point odd
//            part) on the 8-point differences
//   stage 4  u1_block (4-point core)
// Each stage ends in a register. LAT-4 further register stages follow, so
// the result appears exactly LAT cycles after in_valid whatever the size
// (LAT = 12 in the original design, for every size). Where those extra
// registers sit is this design's choice; a synthesis tool may retime them
// into the adders. A new vector may enter every cycle.
module transform_1d
  import dct_pkg::*;
#(
  parameter int unsigned LAT = 12
)(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  vec16_t src,
  output logic   out_valid,
  output vec16_t dst
);

  initial assert (LAT >= 4) else $error("transform_1d: LAT must be at least 4");

  // ---- stage 1: 16-point butterfly ---------------------------------------
  vec8_t e1, o1;
  logic  v1;
  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++) begin
      e1[i] <= src[i] + src[15-i];
      o1[i] <= src[i] - src[15-i];
    end
  end

  // ---- stage 2: 8-point butterfly, 16-point odd part ----------------------
  vec4_t  ee2, eo2;
  vec8_t  odd16_c, odd16_2;
  logic   v2;
  m_block u_m (.o(o1), .y(odd16_c));
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      ee2[i] <= e1[i] + e1[7-i];
      eo2[i] <= e1[i] - e1[7-i];
    end
    odd16_2 <= odd16_c;
  end

  // ---- stage 3: 4-point butterfly, 8-point odd part -----------------------
  vec4_t x3, odd8_c, odd8_3;
  vec8_t odd16_3;
  logic  v3;
  k_block u_k (.eo(eo2), .y(odd8_c));
  always_ff @(posedge clk) begin
    x3[0]   <= (ee2[0] + ee2[3]) + (ee2[1] + ee2[2]);
    x3[1]   <= (ee2[0] + ee2[3]) - (ee2[1] + ee2[2]);
    x3[2]   <= ee2[0] - ee2[3];
    x3[3]   <= ee2[1] - ee2[2];
    odd8_3  <= odd8_c;
    odd16_3 <= odd16_2;
  end

  // ---- stage 4: 4-point core and output assembly ---------------------------
  vec4_t  u1_y;
  vec16_t d4;
  logic   v4;
  u1_block u_u1 (.x(x3), .y(u1_y));
  always_ff @(posedge clk) begin
    d4[0]  <= u1_y[0];
    d4[4]  <= u1_y[1];
    d4[8]  <= u1_y[2];
    d4[12] <= u1_y[3];
    for (int m = 0; m < 4; m++) d4[4*m+2] <= odd8_3[m];
    for (int m = 0; m < 8; m++) d4[2*m+1] <= odd16_3[m];
  end

  // valid pipeline for the four compute stages
  always_ff @(posedge clk) begin
    if (rst) {v1, v2, v3, v4} <= '0;
    else     {v1, v2, v3, v4} <= {in_valid, v1, v2, v3};
  end

  // ---- balancing delay up to LAT cycles -----------------------------------
  localparam int unsigned NDLY = LAT - 4;
  generate
    if (NDLY == 0) begin : g_nodly
      assign dst       = d4;
      assign out_valid = v4;
    end else begin : g_dly
      vec16_t dly_d [NDLY];
      logic   dly_v [NDLY];
      always_ff @(posedge clk) begin
        dly_d[0] <= d4;
        for (int i = 1; i < NDLY; i++) dly_d[i] <= dly_d[i-1];
      end
      always_ff @(posedge clk) begin
        if (rst) for (int i = 0; i < NDLY; i++) dly_v[i] <= 1'b0;
        else begin
          dly_v[0] <= v4;
          for (int i = 1; i < NDLY; i++) dly_v[i] <= dly_v[i-1];
        end
      end
      assign dst       = dly_d[NDLY-1];
      assign out_valid = dly_v[NDLY-1];
    end
  endgenerate

endmodule
