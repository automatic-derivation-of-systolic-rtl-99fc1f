// lu_top: the two LU-decomposition arrays side by side.
//
// Both arrays compute A = L * U (L unit lower triangular, U upper triangular) for an N x N
// matrix, from the same recurrence but with different allocation functions:
//   a2_* : the hexagonal N x N array (allocation [i,j], arch2_array). Each processor keeps one
//          element; the matrix is loaded and the results unloaded along the array's vertical
//          columns, and the steps are steered by the C2/C3 control streams.
//   a3_* : the triangular N(N+1)/2 array (allocation [i,k], arch3_array). Row i of A streams
//          into column i; row i of L and U together streams out of its top.
// The two arrays share only clock and reset; each has its own ports, with the timing given in
// its module. Numbers are lu_pkg::data_t fixed-point values.
module lu_top
  import lu_pkg::*;
#(
  parameter int N = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // hexagonal array
  input  logic  a2_c2_in [N],
  input  logic  a2_c3_in [N],
  input  data_t a2_d1_in [2*N-1],
  input  logic  a2_c1_in [2*N-1],
  input  logic  a2_o_in  [2*N-1],
  output data_t a2_d1_out[2*N-1],
  // triangular array
  input  data_t a3_col_in       [N],
  input  logic  a3_col_in_valid [N],
  input  logic  a3_c_in         [N],
  output data_t a3_col_out      [N],
  output logic  a3_col_out_valid[N]
);

  arch2_array #(.N(N)) u_arch2 (
    .clk   (clk),
    .rst_n (rst_n),
    .c2_in (a2_c2_in),
    .c3_in (a2_c3_in),
    .d1_in (a2_d1_in),
    .c1_in (a2_c1_in),
    .o_in  (a2_o_in),
    .d1_out(a2_d1_out)
  );

  arch3_array #(.N(N)) u_arch3 (
    .clk          (clk),
    .rst_n        (rst_n),
    .col_in       (a3_col_in),
    .col_in_valid (a3_col_in_valid),
    .c_in         (a3_c_in),
    .col_out      (a3_col_out),
    .col_out_valid(a3_col_out_valid)
  );

endmodule
