// arch3_array: triangular systolic array for LU decomposition, allocation a(i,j,k) = [i,k].
//
// Processor (i,k) performs every step k of the recurrence for matrix row i, so the array has
// N columns of heights 1..N: column i holds interior processors (i,1)..(i,i-1) from the bottom
// up and the diagonal processor (i,i) on top, N(N+1)/2 processors in all. Row k of the array
// is a horizontal pipeline that starts at diagonal processor (k,k) and carries u_kj to the
// right into columns k+1..N.
//
// Input: column i receives row i of A, a_i1 .. a_iN, one element per clock, starting i-1
// clocks after column 1 (the skew shown in the array's I/O figure). The first element a_i1
// carries c = 1, every other element c = 0. valid marks the slots that hold data.
// Output: the top of column i delivers l_i1 .. l_i,i-1, u_ii .. u_iN in the same order, one per
// clock, with col_out_valid high. Element a_ij enters at clock t and its result leaves col_out
// at clock t + i (registered output of the i-th processor of the column).
// Between two matrices each column needs one empty slot (valid = 0), which clears the
// processors' accumulators; this rule is this design's choice.
// Every vertical and horizontal link has one register (the processor output); the control c
// has one extra register per level (the delay on the control line), so it advances two clocks
// per level and meets slot j = k at level k. c_in[0] is not used: column 1 has no interior
// processor.
module arch3_array
  import lu_pkg::*;
#(
  parameter int N = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t col_in       [N],
  input  logic  col_in_valid [N],
  input  logic  c_in         [N],
  output data_t col_out      [N],
  output logic  col_out_valid[N]
);

  // [column][level], 0-based; level == column is the diagonal processor.
  data_t vo [N][N];
  logic  vv [N][N];
  data_t ho [N][N];
  logic  co [N][N];
  logic  cd [N][N];   // c_out after the extra per-level delay

  for (genvar c = 0; c < N; c++) begin : g_col
    for (genvar l = 0; l <= c; l++) begin : g_lvl
      data_t v_in;
      logic  v_valid;
      if (l == 0) begin : g_bottom
        assign v_in    = col_in[c];
        assign v_valid = col_in_valid[c];
      end else begin : g_above
        assign v_in    = vo[c][l-1];
        assign v_valid = vv[c][l-1];
      end

      if (l == c) begin : g_diag
        arch3_diag_pe u_pe (
          .clk      (clk),
          .rst_n    (rst_n),
          .vert_in  (v_in),
          .valid_in (v_valid),
          .vert_out (vo[c][l]),
          .valid_out(vv[c][l]),
          .horiz_out(ho[c][l])
        );
        assign co[c][l] = 1'b0;
        assign cd[c][l] = 1'b0;
      end else begin : g_int
        logic c_here;
        if (l == 0) begin : g_cin
          assign c_here = c_in[c];
        end else begin : g_cchain
          assign c_here = cd[c][l-1];
        end
        arch3_int_pe u_pe (
          .clk      (clk),
          .rst_n    (rst_n),
          .vert_in  (v_in),
          .valid_in (v_valid),
          .c_in     (c_here),
          .horiz_in (ho[c-1][l]),
          .vert_out (vo[c][l]),
          .valid_out(vv[c][l]),
          .c_out    (co[c][l]),
          .horiz_out(ho[c][l])
        );
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) cd[c][l] <= 1'b0;
          else        cd[c][l] <= co[c][l];
        end
      end
    end

    // Positions above the diagonal hold no processor.
    for (genvar l = c + 1; l < N; l++) begin : g_none
      assign vo[c][l] = '0;
      assign vv[c][l] = 1'b0;
      assign ho[c][l] = '0;
      assign co[c][l] = 1'b0;
      assign cd[c][l] = 1'b0;
    end

    assign col_out[c]       = vo[c][c];
    assign col_out_valid[c] = vv[c][c];
  end

endmodule
