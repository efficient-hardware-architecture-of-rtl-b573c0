// control_unit: sequences one 2-D transform block.
//
// For an N-point block (N = 4, 8 or 16, P = N/4 groups per row) it runs
// the three steps of the architecture:
//   READ   N rows, each read as P groups of four samples into the source
//          registers; when a row is complete (row_valid) it enters the row
//          transform. The cycle `start` is seen counts as the first read.
//   DRAIN  wait for the row transform to deliver the last row; every row
//          result is loaded into FIFO number `fifo_sel` (row i -> FIFO i).
//   COLS   pop FIFOs 0..N-1 together (one column) every P cycles, N
//          times, into the column transform.
//   FLUSH  wait until the output multiplexer has written the last of the
//          N*P output groups; `done` is high with that group.
// A column is popped only every P cycles so that each column result is
// fully written (P cycles on four outputs) before the next one arrives.
// busy is high from the cycle after start until done; start is ignored
// while busy. The state names and this exact scheduling are this design's
// own; the loops they implement follow the control flow of the original.
module control_unit
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [1:0] sel,
  input  logic       row_out_valid,
  input  logic       out_valid,
  output logic [1:0] size,
  output logic       busy,
  output logic       in_clear,
  output logic       in_wr,
  output logic [1:0] in_grp,
  output logic       row_valid,
  output logic [3:0] fifo_sel,
  output logic       col_pop,
  output logic       done
);

  typedef enum logic [2:0] {IDLE, READ, DRAIN, COLS, FLUSH} state_e;

  state_e     state_q;
  logic [1:0] size_q;
  logic [1:0] grp_q;      // next input group within the row
  logic [4:0] row_q;      // rows read so far
  logic [3:0] wcnt_q;     // row results loaded into FIFOs
  logic [1:0] ph_q;       // phase within the P-cycle column slot
  logic [4:0] ccnt_q;     // columns popped
  logic [6:0] ocnt_q;     // output groups written
  logic       rowv_q;

  logic [1:0]  size_c;
  logic [4:0]  npts, row_c;
  logic [1:0]  pm1, grp_c;
  logic        take;

  always_comb begin
    size_c   = (state_q == IDLE) ? sel : size_q;
    npts     = 5'(size_points(size_c));
    pm1      = 2'(size_groups(size_c) - 1);
    take     = (state_q == IDLE && start) || state_q == READ;
    grp_c    = (state_q == IDLE) ? 2'd0 : grp_q;
    row_c    = (state_q == IDLE) ? 5'd0 : row_q;
    in_wr    = take;
    in_clear = (state_q == IDLE) && start;
    in_grp   = grp_c;
    col_pop  = (state_q == COLS) && (ph_q == 2'd0);
  end

  assign size      = size_q;
  assign busy      = (state_q != IDLE);
  assign row_valid = rowv_q;
  assign fifo_sel  = wcnt_q;
  assign done      = out_valid && (32'(ocnt_q) == size_points(size_c) * size_groups(size_c) - 1) && state_q != IDLE;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= IDLE;
      size_q  <= SZ4;
      grp_q   <= '0;
      row_q   <= '0;
      wcnt_q  <= '0;
      ph_q    <= '0;
      ccnt_q  <= '0;
      ocnt_q  <= '0;
      rowv_q  <= 1'b0;
    end else begin
      rowv_q <= 1'b0;

      if (state_q == IDLE && start) begin
        size_q <= sel;
        wcnt_q <= '0;
        ph_q   <= '0;
        ccnt_q <= '0;
        ocnt_q <= '0;
      end

      // reading rows, P groups each
      if (take) begin
        if (grp_c == pm1) begin
          grp_q  <= '0;
          row_q  <= row_c + 1'b1;
          rowv_q <= 1'b1;
          state_q <= (row_c == npts - 1) ? DRAIN : READ;
        end else begin
          grp_q   <= grp_c + 1'b1;
          row_q   <= row_c;
          state_q <= READ;
        end
      end

      // row results into FIFOs; the last one opens the column pass
      if (row_out_valid && state_q != IDLE) begin
        wcnt_q <= wcnt_q + 1'b1;
        if (5'(wcnt_q) == npts - 1) state_q <= COLS;
      end

      // one column every P cycles
      if (state_q == COLS) begin
        ph_q <= (ph_q == pm1) ? 2'd0 : ph_q + 1'b1;
        if (col_pop) begin
          ccnt_q <= ccnt_q + 1'b1;
          if (ccnt_q == npts - 1) state_q <= FLUSH;
        end
      end

      // output groups
      if (out_valid && state_q != IDLE) begin
        ocnt_q <= ocnt_q + 1'b1;
        if (done) state_q <= IDLE;
      end
    end
  end

endmodule
