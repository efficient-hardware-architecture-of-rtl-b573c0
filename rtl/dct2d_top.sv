// dct2d_top: unified 4x4 / 8x8 / 16x16 forward 2-D HEVC core transform.
//
// A residual block enters four samples per cycle, row by row, and the
// coefficient block leaves four coefficients per cycle, column by column.
// The 2-D transform is computed in three steps:
//   I   each row goes through the input multiplexer into the 16 source
//       registers and through the first unified 1-D unit (horizontal pass);
//   II  each transformed row is loaded into its own FIFO (row i -> FIFO i);
//   III popping all FIFOs together yields one column of the intermediate
//       matrix, which goes through the second 1-D unit (vertical pass);
//       its N coefficients are written four per cycle.
// The result is C * X * C^T with C the N-point HEVC integer DCT matrix,
// without intermediate scaling: 32-bit words hold it exactly for 9-bit
// residuals. Column j of the result leaves as N/4 groups, rows 4c..4c+3
// in group c.
//
// Interface: sel picks the size (0: 4x4, 1: 8x8, 2: 16x16) and is sampled
// with start. start comes with the first input group; the remaining
// N*N/4-1 groups must follow on consecutive cycles. out_valid marks output
// groups; done is high with the last one; busy is high in between and a
// start while busy is ignored.
// Timing: from the start cycle to the done cycle, inclusive, a block takes
// 2*N*N/4 + 2*LAT + 2 cycles (34, 58 and 154 with LAT = 12).
// The structure (MUX, registers, two 1-D units, 16 FIFOs, control unit)
// follows the original architecture; the handshake signals, the FIFO
// write-a-row scheme and the column schedule are this design's choices.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int unsigned LAT = 12
)(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  sel,
  input  logic        start,
  input  word_t [3:0] in_data,
  output logic        busy,
  output word_t [3:0] out_data,
  output logic        out_valid,
  output logic        done
);

  logic [1:0] size;
  logic       in_clear, in_wr, row_valid, col_pop;
  logic [1:0] in_grp;
  logic [3:0] fifo_sel;
  logic       row_out_valid, col_out_valid;
  vec16_t     src, row_dst, row_res, col_src, col_dst;
  logic [NV-1:0] fifo_empty;

  control_unit u_ctrl (
    .clk, .rst, .start, .sel,
    .row_out_valid, .out_valid,
    .size, .busy, .in_clear, .in_wr, .in_grp, .row_valid,
    .fifo_sel, .col_pop, .done
  );

  input_regs u_in (
    .clk, .rst, .clear(in_clear), .wr_en(in_wr), .grp(in_grp),
    .in_data, .src
  );

  // step I: horizontal pass
  transform_1d #(.LAT(LAT)) u_row (
    .clk, .rst, .in_valid(row_valid), .src,
    .out_valid(row_out_valid), .dst(row_dst)
  );

  assign row_res = gather(row_dst, size);

  // step II: one FIFO per row
  generate
    for (genvar i = 0; i < NV; i++) begin : g_fifo
      row_fifo #(.DEPTH(NV)) u_fifo (
        .clk, .rst,
        .load     (row_out_valid && (32'(fifo_sel) == i)),
        .load_len (5'(size_points(size))),
        .load_data(row_res),
        .pop      (col_pop && (i < size_points(size))),
        .dout     (col_src[i]),
        .empty    (fifo_empty[i])
      );
    end
  endgenerate

  // step III: vertical pass and four-by-four output
  transform_1d #(.LAT(LAT)) u_col (
    .clk, .rst, .in_valid(col_pop), .src(col_src),
    .out_valid(col_out_valid), .dst(col_dst)
  );

  output_mux u_out (
    .clk, .rst, .size, .in_valid(col_out_valid), .dst(col_dst),
    .out_data, .out_valid
  );

  // When a block is finished every FIFO has been emptied.
  always_ff @(posedge clk)
    if (!rst && done) assert (&fifo_empty) else $error("dct2d_top: FIFOs not empty at done");

endmodule
