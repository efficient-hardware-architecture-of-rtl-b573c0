// output_mux: writes a column result four coefficients per cycle.
//
// When in_valid is high, the 16 outputs of the column transform are
// reduced to the N coefficients of the selected size (coefficient k is
// Dst(k*16/N)) and sent on Out0..Out3 over the next N/4 cycles: cycle c
// carries coefficients 4c..4c+3. Outputs are registered, so the first
// group appears the cycle after in_valid. A new column must not arrive
// while one is still being sent (asserted).
module output_mux
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] size,
  input  logic       in_valid,
  input  vec16_t     dst,
  output vec4_t      out_data,
  output logic       out_valid
);

  vec16_t     buf_q;     // coefficients still to send, next group in slots 0..3
  logic [1:0] left_q;    // groups still to send after the current one

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      left_q    <= '0;
      out_data  <= '0;
      buf_q     <= '0;
    end else if (in_valid) begin
      vec16_t g;
      g = gather(dst, size);
      out_data  <= g[3:0];
      buf_q     <= vec16_t'(g >> (4 * W));
      left_q    <= 2'(size_groups(size) - 1);
      out_valid <= 1'b1;
    end else if (out_valid && left_q != 0) begin
      out_data  <= buf_q[3:0];
      buf_q     <= vec16_t'(buf_q >> (4 * W));
      left_q    <= left_q - 1'b1;
    end else begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (!rst) assert (!(in_valid && out_valid && left_q != 0))
      else $error("output_mux: new column while one is being sent");

endmodule
