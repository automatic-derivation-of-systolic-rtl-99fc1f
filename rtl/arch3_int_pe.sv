// arch3_int_pe: interior processor (i,k), k < i, of the triangular LU array (allocation [i,k]).
//
// Column i carries row i of the matrix upward, one element f(i,j,k-1) per clock (j rising);
// the horizontal input carries f(k,j,k-1), which is u_kj for j >= k. The control bit c marks
// the slot j = k. Following the interior-processor program of the architecture:
//   c = 1 : acc := vert_in / horiz_in  (this is l_ik), vert_out := acc
//   c = 0 : vert_out := vert_in - horiz_in * acc   (f(i,j,k) for j > k)
// and horiz_out := horiz_in, c_out := c in every slot.
// Slots j < k arrive before the c = 1 slot; they hold finished l_ij values and must pass
// unchanged, which they do because acc is still 0 then. acc is cleared by reset and by every
// empty (valid_in = 0) slot, so consecutive matrices need one empty slot between them in each
// column. That clearing rule and the valid flag are choices of this design.
//
// Timing: all outputs are registered, one clock after the inputs. The array adds one more
// register on the c path between levels so that c meets slot j = k at level k.
// Assertions flag a division by a zero pivot (there is no pivoting) and a c bit on an empty slot.
module arch3_int_pe
  import lu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t vert_in,
  input  logic  valid_in,
  input  logic  c_in,
  input  data_t horiz_in,
  output data_t vert_out,
  output logic  valid_out,
  output logic  c_out,
  output data_t horiz_out
);

  data_t acc;
  data_t quot;

  always_comb quot = fx_div(vert_in, horiz_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      vert_out  <= '0;
      valid_out <= 1'b0;
      c_out     <= 1'b0;
      horiz_out <= '0;
    end else begin
      valid_out <= valid_in;
      c_out     <= c_in;
      horiz_out <= horiz_in;
      if (!valid_in) begin
        acc      <= '0;
        vert_out <= vert_in;
      end else if (c_in) begin
        acc      <= quot;
        vert_out <= quot;
      end else begin
        vert_out <= vert_in - fx_mul(horiz_in, acc);
      end
    end
  end

  // A c = 1 slot divides by the pivot u_kk, which must not be zero (no pivoting is done),
  // and c may only mark a slot that holds data.
  a_pivot_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                    c_in && valid_in |-> horiz_in != '0)
    else $error("arch3_int_pe: division slot with zero pivot");
  a_c_on_data: assert property (@(posedge clk) disable iff (!rst_n) c_in |-> valid_in)
    else $error("arch3_int_pe: control bit on an empty slot");

endmodule
