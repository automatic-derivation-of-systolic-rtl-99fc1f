// arch2_right_pe: right-half processor (i,j), i < j, of the hexagonal LU array
// (allocation a(i,j,k) = [i,j]).
//
// The processor holds f(i,j,k-1) in acc. D2 brings l_ik along row i, D3 brings u_kj down
// column j, and C3 marks the step k = i, when acc has become u_ij. Following the right-half
// program of the architecture:
//   C3 = 1 : D3_out := acc   (u_ij, sent down column j)
//   C3 = 0 : acc := acc - D2 * D3, D3_out := D3
// and D2_out := D2, C3_out := C3, O passed on, in every clock.
// acc is loaded with a_ij when C1 is present and put on the column's upward path when O is
// present (arch2_col_cell).
//
// Timing: all outputs are registered, one clock after the inputs. The array adds a second
// register on the C3 path, so C3 advances one processor per two clocks.
module arch2_right_pe
  import lu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t d2_in,
  input  data_t d3_in,
  input  logic  c3_in,
  input  data_t d1_in,
  input  logic  c1_in,
  input  logic  o_in,
  output data_t d2_out,
  output data_t d3_out,
  output logic  c3_out,
  output data_t d1_out,
  output logic  c1_out,
  output logic  o_out
);

  data_t acc;
  logic  load_acc;

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
      c3_out <= 1'b0;
    end else begin
      d2_out <= d2_in;
      c3_out <= c3_in;
      if (c3_in) begin
        d3_out <= acc;
      end else begin
        acc    <= acc - fx_mul(d2_in, d3_in);
        d3_out <= d3_in;
      end
      if (load_acc) acc <= d1_in;
    end
  end

endmodule
