// arch2_central_pe: central processor (i,i) of the hexagonal LU array
// (allocation a(i,j,k) = [i,j]).
//
// The processor holds f(i,i,k-1) in acc. D2 brings l_ik from the left, D3 brings u_ki from
// above, and C2 marks the step k = i, when acc has become u_ii. Following the central-processor
// program of the architecture:
//   C2 = 1 : D3_out := acc (u_ii, sent down column i to the divisions of the left half)
//            D2_out := 1   (l_ii, the unit diagonal of L, sent along row i)
//   C2 = 0 : acc := acc - D2 * D3, D3_out := D3, D2_out := D2
// and O is passed on in every clock. C2 is not passed on: row i's C2 chain ends here.
// acc is loaded with a_ii when C1 is present and put on the column's upward path when O is
// present (arch2_col_cell).
//
// Timing: all outputs are registered, one clock after the inputs.
module arch2_central_pe
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
    end else begin
      if (c2_in) begin
        d3_out <= acc;
        d2_out <= ONE;
      end else begin
        acc    <= acc - fx_mul(d2_in, d3_in);
        d3_out <= d3_in;
        d2_out <= d2_in;
      end
      if (load_acc) acc <= d1_in;
    end
  end

endmodule
