// row_fifo: one transposition FIFO.
//
// The row transform produces a whole row of coefficients in one cycle;
// `load` stores that row (its first load_len words, element 0 at the head)
// in one write. The column side then takes the row back one element per
// `pop`. With one FIFO per row and all FIFOs popped together, each pop
// across the FIFO bank yields one column of the intermediate matrix: this
// is how the design transposes between the two passes.
// Storage is DEPTH words of W bits (16 x 32 bits; 16 such FIFOs make 8,192
// bits). A FIFO holds at most one row: loading a FIFO that is not empty,
// or popping an empty one, is a protocol error and is flagged by an
// assertion. An empty FIFO reads as zero, which supplies the null inputs
// of the smaller transforms.
// Timing: a load in cycle t is readable from cycle t+1; dout always shows
// the head element combinationally and a pop moves to the next one.
module row_fifo
  import dct_pkg::*;
#(
  parameter int unsigned DEPTH = 16
)(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load,
  input  logic [$clog2(DEPTH):0]   load_len,
  input  word_t [DEPTH-1:0]        load_data,
  input  logic                     pop,
  output word_t                    dout,
  output logic                     empty
);

  localparam int unsigned PW = $clog2(DEPTH);

  word_t          mem [DEPTH];
  logic [PW-1:0]  rd_ptr;
  logic [PW:0]    count;

  always_ff @(posedge clk) begin
    if (load)
      for (int i = 0; i < DEPTH; i++) mem[i] <= load_data[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      count  <= '0;
    end else if (load) begin
      rd_ptr <= '0;
      count  <= load_len;
    end else if (pop && count != 0) begin
      rd_ptr <= rd_ptr + 1'b1;
      count  <= count - 1'b1;
    end
  end

  assign empty = (count == 0);
  assign dout  = empty ? word_t'(0) : mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(load && !empty)) else $error("row_fifo: load while not empty");
      assert (!(pop && empty))   else $error("row_fifo: pop while empty");
      assert (!(load && (load_len == 0 || 32'(load_len) > DEPTH)))
        else $error("row_fifo: bad load length");
    end
  end

endmodule
