// input_regs: input multiplexer and source registers of the row transform.
//
// The design reads four samples per cycle (In0..In3). This block steers
// them into the 16 source registers Src0..Src15: group g lands in
// registers 4g..4g+3. A row of an N-point block takes N/4 groups, so the
// 4-point transform fills Src0..Src3, the 8-point Src0..Src7 and the
// 16-point all 16. `clear` (given with the first group of a block) zeroes
// every register not written in that cycle; since only registers 0..N-1
// are written afterwards, the unused inputs of the smaller transforms stay
// null, which the unified 1-D unit relies on.
// Timing: a group written in cycle t is visible on src from cycle t+1.
module input_regs
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       wr_en,
  input  logic [1:0] grp,
  input  vec4_t      in_data,
  output vec16_t     src
);

  always_ff @(posedge clk) begin
    if (rst) begin
      src <= '0;
    end else begin
      for (int r = 0; r < 16; r++) begin
        if (wr_en && (r / 4 == int'(grp))) src[r] <= in_data[r % 4];
        else if (clear)                    src[r] <= '0;
      end
    end
  end

endmodule
