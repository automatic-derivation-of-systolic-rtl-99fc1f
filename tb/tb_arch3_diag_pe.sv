// tb_arch3_diag_pe: checks that the diagonal processor of the triangular array forwards each
// input value, one clock later, both upward and to the right, together with its valid flag.
module tb_arch3_diag_pe;
  import lu_pkg::*;

  logic  clk = 0;
  logic  rst_n = 0;
  data_t vert_in;
  logic  valid_in;
  data_t vert_out;
  logic  valid_out;
  data_t horiz_out;

  int checks = 0;
  int failures = 0;

  arch3_diag_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t v;
    logic  vl;
    vert_in = '0; valid_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      v = data_t'($urandom);
      vl = 1'($urandom);
      vert_in = v; valid_in = vl;
      @(posedge clk);
      #1;
      checks++;
      if (vert_out !== v || horiz_out !== v || valid_out !== vl) begin
        failures++;
        $display("t=%0d in %h/%b out %h %h %b", t, v, vl, vert_out, horiz_out, valid_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
