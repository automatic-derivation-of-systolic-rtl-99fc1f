// tb_arch3_int_pe: checks the interior processor of the triangular array against a model of
// its program. Random slot sequences mix empty slots (which clear acc), c = 1 slots (division,
// acc := vert / horiz, result sent up) and c = 0 slots (vert - horiz * acc). horiz and c must
// also come out one clock later.
module tb_arch3_int_pe;
  import lu_pkg::*;
  import lu_tb_pkg::*;

  logic  clk = 0;
  logic  rst_n = 0;
  data_t vert_in;
  logic  valid_in;
  logic  c_in;
  data_t horiz_in;
  data_t vert_out;
  logic  valid_out;
  logic  c_out;
  data_t horiz_out;

  int checks = 0;
  int failures = 0;
  int n_div = 0, n_ms = 0, n_clr = 0;

  arch3_int_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int small_fx();
    return int'($urandom_range(16 * 65536)) - 8 * 65536;
  endfunction

  initial begin
    int acc_m, v, h, expv;
    logic vl, c;
    vert_in = '0; valid_in = 0; c_in = 0; horiz_in = '0;
    acc_m = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      v  = small_fx();
      h  = small_fx();
      vl = ($urandom_range(9) != 0);
      c  = vl && ($urandom_range(4) == 0);
      if (h == 0) h = 65536;
      vert_in = v; horiz_in = h; valid_in = vl; c_in = c;
      if (!vl) begin
        acc_m = 0; expv = v; n_clr++;
      end else if (c) begin
        acc_m = rdiv(v, h); expv = acc_m; n_div++;
      end else begin
        expv = v - rmul(h, acc_m); n_ms++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (valid_out !== vl || c_out !== c || horiz_out !== h ||
          (vl && vert_out !== expv)) begin
        failures++;
        $display("t=%0d v=%h h=%h vl=%b c=%b: out %h expected %h", t, v, h, vl, c, vert_out,
                 expv);
      end
    end
    checks++;
    if (n_div == 0 || n_ms == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
