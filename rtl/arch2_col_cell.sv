// arch2_col_cell: initialisation and output path of one processor of the hexagonal LU array.
//
// Each vertical column of the hexagonal array is a pair of opposite pipelines: D1 (matrix
// elements, and later results) moves up, the control tokens C1 (initialisation) and O
// (output) move down, one register per processor. When C1 is present in a processor, the
// D1 value present at the same clock is the processor's own matrix element: load_acc tells
// the processor to take it into acc. When O is present, the processor puts its acc on the
// upward path in place of the D1 value, and the result then moves up to leave the column at
// its top. Because the two streams move in opposite directions, a single C1 token meets
// every second D1 slot, so the elements of a column are sent with one empty slot between
// them. The three pipelines and their roles follow the array figure; the meeting rule and
// the replacement of D1 by acc under O are this design's reading of it.
//
// Timing: d1_out, c1_out and o_out are registered, one clock after the inputs.
module arch2_col_cell
  import lu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t d1_in,
  input  logic  c1_in,
  input  logic  o_in,
  input  data_t acc,
  output logic  load_acc,
  output data_t d1_out,
  output logic  c1_out,
  output logic  o_out
);

  assign load_acc = c1_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_out <= '0;
      c1_out <= 1'b0;
      o_out  <= 1'b0;
    end else begin
      d1_out <= o_in ? acc : d1_in;
      c1_out <= c1_in;
      o_out  <= o_in;
    end
  end

endmodule
