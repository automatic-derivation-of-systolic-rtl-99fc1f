// tb_arch2_left_pe: checks the left-half processor of the hexagonal array: multiply-subtract steps, the C2 division that sends l_ij along D2, and the pass-through of D3 and C2.
// Random clocks also carry C1 (acc := D1) and O (acc put on the upward D1 path); every output
// is compared, one clock later, with a model of the processor's program kept in the testbench.
module tb_arch2_left_pe;
  import lu_pkg::*;
  import lu_tb_pkg::*;

  logic  clk = 0;
  logic  rst_n = 0;
  data_t d2_in, d3_in, d1_in;
  logic  c2_in, c1_in, o_in;
  data_t d2_out, d3_out, d1_out;
  logic  c1_out, o_out;
  logic  c2_out;

  int checks = 0;
  int failures = 0;
  int n_step = 0, n_ctl = 0, n_load = 0, n_unload = 0;

  arch2_left_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int small_fx();
    return int'($urandom_range(8 * 65536)) - 4 * 65536;
  endfunction

  initial begin
    int acc_m, d1, d2, d3, e_d1, e_d2, e_d3, acc_n;
    logic c, c1, o;
    d2_in = '0; d3_in = '0; d1_in = '0; c2_in = 0; c1_in = 0; o_in = 0;
    acc_m = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      d1 = small_fx(); d2 = small_fx(); d3 = small_fx();
      if (d3 == 0) d3 = 65536;
      c  = ($urandom_range(4) == 0);
      c1 = ($urandom_range(7) == 0);
      o  = ($urandom_range(5) == 0);
      d1_in = d1; d2_in = d2; d3_in = d3; c2_in = c; c1_in = c1; o_in = o;
      acc_n = acc_m;
      e_d3 = d3;
      if (c) begin acc_n = rdiv(acc_m, d3); e_d2 = acc_n; n_ctl++; end
      else   begin acc_n = acc_m - rmul(d2, d3); e_d2 = d2; n_step++; end
      if (c1) begin acc_n = d1; n_load++; end
      e_d1 = o ? acc_m : d1;
      if (o) n_unload++;
      acc_m = acc_n;
      @(posedge clk);
      #1;
      checks++;
      if (d2_out !== e_d2 || d3_out !== e_d3 || d1_out !== e_d1 || c1_out !== c1 ||
          o_out !== o || c2_out !== c) begin
        failures++;
        $display("t=%0d ctl=%b c1=%b o=%b: d2 %h/%h d3 %h/%h d1 %h/%h", t, c, c1, o,
                 d2_out, e_d2, d3_out, e_d3, d1_out, e_d1);
      end
    end
    checks++;
    if (n_step == 0 || n_ctl == 0 || n_load == 0 || n_unload == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
