// arch2_array: hexagonal systolic array for LU decomposition, allocation a(i,j,k) = [i,j].
//
// Processor (i,j) owns matrix element a_ij and performs every step k of the recurrence for it,
// keeping f(i,j,k) in its accumulator, so the array has N x N processors: central processors
// on the diagonal i = j, left-half processors below it (i > j, they produce L) and right-half
// processors above it (i < j, they produce U). After the run, acc of (i,j) holds l_ij or u_ij.
//
// Links (one register each, the processor's output register):
//   D2 runs along row i (j rising) and carries l_ik; it enters row i as 0 at (i,1).
//   D3 runs down column j (i rising) and carries u_kj; it enters column j as 0 at (1,j).
//   C2 (step j = k) enters row i at (i,1) and runs along the left half to the central
//      processor (i,i); C3 (step i = k) enters column j at (1,j) and runs down the right half
//      to (j-1,j). Both have a second register per hop, so they advance one processor per two
//      clocks.
//   D1 (up) and C1, O (down) run along the array's vertical columns, the diagonals
//      d = j - i, and serve to load the accumulators and unload the results (arch2_col_cell).
// Ports indexed by column use index d + N - 1 (0 = the column holding only (N,1),
// 2N-2 = the column holding only (1,N)). The top of column d is (1,1+d) or (1-d,1), the bottom
// (N-d,N) or (N,N+d). c3_in[0] is not used: column 1 of the matrix has no right-half processor.
//
// Schedule (1-based i,j,k; the testbench follows it): step k of (i,j) takes place at clock
// T + i + j + k. So C2 must be present on c2_in[i] at clock T + i + 2 and C3 on c3_in[j] at
// clock T + j + 2, each for one clock. Loading: in a column with m processors, the element of
// the processor q places below the top (q = 0 .. m-1) is put on d1_in at clock T0 + 2q and
// C1 on c1_in at clock T0 + m - 1; all loads end by T0 + 2N - 2 and must end before T + 3.
// Unloading: O on o_in at clock T2 (T2 > T + 3N) makes the result of processor q appear on
// d1_out at clock T2 + 2q + 1. This timing function, the loading and the unloading schedules
// are this design's; the processor programs and the array's links follow the architecture.
module arch2_array
  import lu_pkg::*;
#(
  parameter int N = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  c2_in [N],
  input  logic  c3_in [N],
  input  data_t d1_in [2*N-1],
  input  logic  c1_in [2*N-1],
  input  logic  o_in  [2*N-1],
  output data_t d1_out[2*N-1]
);

  // Outputs of processor [i][j], 0-based.
  data_t d2o [N][N];
  data_t d3o [N][N];
  logic  c2o [N][N];
  logic  c3o [N][N];
  logic  c2d [N][N];   // C2/C3 after the second register of the hop
  logic  c3d [N][N];
  data_t d1o [N][N];
  logic  c1o [N][N];
  logic  oo  [N][N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      localparam int D = j - i + N - 1;
      data_t d2_here, d3_here, d1_here;
      logic  c1_here, o_here;

      if (j == 0) begin : g_d2b
        assign d2_here = '0;
      end else begin : g_d2
        assign d2_here = d2o[i][j-1];
      end
      if (i == 0) begin : g_d3b
        assign d3_here = '0;
      end else begin : g_d3
        assign d3_here = d3o[i-1][j];
      end
      if (i == N-1 || j == N-1) begin : g_d1b
        assign d1_here = d1_in[D];
      end else begin : g_d1
        assign d1_here = d1o[i+1][j+1];
      end
      if (i == 0 || j == 0) begin : g_top
        assign c1_here  = c1_in[D];
        assign o_here   = o_in[D];
        assign d1_out[D] = d1o[i][j];
      end else begin : g_down
        assign c1_here = c1o[i-1][j-1];
        assign o_here  = oo[i-1][j-1];
      end

      if (i > j) begin : g_left
        logic c2_here;
        if (j == 0) begin : g_c2b
          assign c2_here = c2_in[i];
        end else begin : g_c2
          assign c2_here = c2d[i][j-1];
        end
        arch2_left_pe u_pe (
          .clk   (clk),
          .rst_n (rst_n),
          .d2_in (d2_here),
          .d3_in (d3_here),
          .c2_in (c2_here),
          .d1_in (d1_here),
          .c1_in (c1_here),
          .o_in  (o_here),
          .d2_out(d2o[i][j]),
          .d3_out(d3o[i][j]),
          .c2_out(c2o[i][j]),
          .d1_out(d1o[i][j]),
          .c1_out(c1o[i][j]),
          .o_out (oo[i][j])
        );
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) c2d[i][j] <= 1'b0;
          else        c2d[i][j] <= c2o[i][j];
        end
        assign c3o[i][j] = 1'b0;
        assign c3d[i][j] = 1'b0;
      end else if (i == j) begin : g_central
        logic c2_here;
        if (j == 0) begin : g_c2b
          assign c2_here = c2_in[i];
        end else begin : g_c2
          assign c2_here = c2d[i][j-1];
        end
        arch2_central_pe u_pe (
          .clk   (clk),
          .rst_n (rst_n),
          .d2_in (d2_here),
          .d3_in (d3_here),
          .c2_in (c2_here),
          .d1_in (d1_here),
          .c1_in (c1_here),
          .o_in  (o_here),
          .d2_out(d2o[i][j]),
          .d3_out(d3o[i][j]),
          .d1_out(d1o[i][j]),
          .c1_out(c1o[i][j]),
          .o_out (oo[i][j])
        );
        assign c2o[i][j] = 1'b0;
        assign c2d[i][j] = 1'b0;
        assign c3o[i][j] = 1'b0;
        assign c3d[i][j] = 1'b0;
      end else begin : g_right
        logic c3_here;
        if (i == 0) begin : g_c3b
          assign c3_here = c3_in[j];
        end else begin : g_c3
          assign c3_here = c3d[i-1][j];
        end
        arch2_right_pe u_pe (
          .clk   (clk),
          .rst_n (rst_n),
          .d2_in (d2_here),
          .d3_in (d3_here),
          .c3_in (c3_here),
          .d1_in (d1_here),
          .c1_in (c1_here),
          .o_in  (o_here),
          .d2_out(d2o[i][j]),
          .d3_out(d3o[i][j]),
          .c3_out(c3o[i][j]),
          .d1_out(d1o[i][j]),
          .c1_out(c1o[i][j]),
          .o_out (oo[i][j])
        );
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) c3d[i][j] <= 1'b0;
          else        c3d[i][j] <= c3o[i][j];
        end
        assign c2o[i][j] = 1'b0;
        assign c2d[i][j] = 1'b0;
      end
    end
  end

endmodule
