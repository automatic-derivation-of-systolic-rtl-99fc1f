// arch2_left_pe: left-half processor (i,j), i > j, of the hexagonal LU array
// (allocation a(i,j,k) = [i,j]).
//
// The processor holds f(i,j,k-1) in acc and runs one step k per clock. D2 brings l_ik along
// row i from the left, D3 brings u_kj down column j, and C2 marks the step j = k. Following the
// left-half program of the architecture:
//   C2 = 1 : acc := acc / D3, D2_out := acc   (l_ij = f(i,j,j-1) / u_jj, sent along row i)
//   C2 = 0 : acc := acc - D2 * D3,  D2_out := D2
// and D3_out := D3, C2_out := C2, O passed on, in every clock. In clocks that belong to no step
// of this processor D2 or D3 is 0, so the update leaves acc unchanged.
// acc is loaded with a_ij through the column path (arch2_col_cell) when C1 is present, and
// put on the column's upward path when O is present.
//
// Timing: all outputs are registered, one clock after the inputs. The array adds a second
// register on the C2 path, so C2 advances one processor per two clocks.
// An assertion flags a C2 step with a zero pivot: the architecture does no pivoting.
module arch2_left_pe
  import lu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t d2_in,
  input  data_t d3_in,
  input  logic  c2_in,
  input  data_t d1_in,
  input  logic  c1_in,
  input  logic  o_in,
  output data_t d2_out,
  output data_t d3_out,
  output logic  c2_out,
  output data_t d1_out,
  output logic  c1_out,
  output logic  o_out
);

  data_t acc;
  data_t quot;
  logic  load_acc;

  always_comb quot = fx_div(acc, d3_in);

  arch2_col_cell u_col (
    .clk     (clk),
    .rst_n   (rst_n),
    .d1_in   (d1_in),
    .c1_in   (c1_in),
    .o_in    (o_in),
    .acc     (acc),
    .load_acc(load_acc),
    .d1_out  (d1_out),
    .c1_out  (c1_out),
    .o_out   (o_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      d2_out <= '0;
      d3_out <= '0;
      c2_out <= 1'b0;
    end else begin
      d3_out <= d3_in;
      c2_out <= c2_in;
      if (c2_in) begin
        acc    <= quot;
        d2_out <= quot;
      end else begin
        acc    <= acc - fx_mul(d2_in, d3_in);
        d2_out <= d2_in;
      end
      if (load_acc) acc <= d1_in;
    end
  end

  // A C2 step divides by the pivot u_jj, which must not be zero (no pivoting is done).
  a_pivot_nonzero: assert property (@(posedge clk) disable iff (!rst_n) c2_in |-> d3_in != '0)
    else $error("arch2_left_pe: C2 step with zero pivot");

endmodule
