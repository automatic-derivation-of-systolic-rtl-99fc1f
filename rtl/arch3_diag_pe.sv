// arch3_diag_pe: diagonal processor (i,i) of the triangular LU array (allocation [i,k]).
//
// It sits at the top of column i. The value arriving from below is f(i,j,i-1): for j >= i
// that is u_ij, for j < i it is l_ij, which the interior processors below have passed on
// unchanged. The processor copies the value both upward (vert_out, the column's result
// stream: row i of L and U together) and to the right (horiz_out, the u_ij operand for the
// interior processors (i',i), i' > i). This is the diagonal-processor program of the
// architecture; the valid flag that travels with the data is this design's addition.
//
// Timing: both outputs are registered, one clock after the input.
module arch3_diag_pe
  import lu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t vert_in,
  input  logic  valid_in,
  output data_t vert_out,
  output logic  valid_out,
  output data_t horiz_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vert_out  <= '0;
      horiz_out <= '0;
      valid_out <= 1'b0;
    end else begin
      vert_out  <= vert_in;
      horiz_out <= vert_in;
      valid_out <= valid_in;
    end
  end

endmodule
