// tb_arch2_array: end-to-end test of the hexagonal LU array.
//
// For each of NM matrices the testbench runs the three phases of the array's schedule:
// load (matrix elements up the vertical columns with one empty slot between them, one C1
// token down each column), compute (one C2 token into each row, one C3 token into each column,
// skewed one clock per row/column), and unload (one O token down each column; the result of
// the processor q places below the top leaves the column at clock T2 + 2q + 1). Every result
// is compared with the expected L and U: exact factors for matrices built as L * U, the
// loop-nest reference for random diagonally dominant ones. The result must appear at exactly
// the scheduled clock; the testbench also counts the loads, C2/C3 tokens and unloads.
// It runs a 6 x 6 array, larger than the default 4 x 4 that tb_lu_top covers.
module tb_arch2_array;
  import lu_pkg::*;
  import lu_tb_pkg::*;

  localparam int N  = 6;
  localparam int NM = 4;
  localparam int NC = 2 * N - 1;
  localparam int T0 = 0;
  localparam int T  = T0 + 2 * N - 2;
  localparam int T2 = T + 3 * N + 1;
  localparam int RUN = T2 + 2 * N + 2;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  c2_in [N];
  logic  c3_in [N];
  data_t d1_in [NC];
  logic  c1_in [NC];
  logic  o_in  [NC];
  data_t d1_out[NC];

  int checks = 0;
  int failures = 0;
  int n_load = 0, n_c2 = 0, n_c3 = 0, n_unload = 0;

  mat_t a, expv;

  arch2_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    foreach (c2_in[i]) begin c2_in[i] = 0; c3_in[i] = 0; end
    foreach (d1_in[d]) begin d1_in[d] = '0; c1_in[d] = 0; o_in[d] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mi = 0; mi < NM; mi++) begin
      if (mi % 2 == 0) make_exact(N, a, expv);
      else begin
        a = make_random(N);
        expv = ref_lu(a, N);
      end
      for (int t = 0; t < RUN; t++) begin
        @(negedge clk);
        foreach (c2_in[i]) begin c2_in[i] = 0; c3_in[i] = 0; end
        foreach (d1_in[d]) begin d1_in[d] = '0; c1_in[d] = 0; o_in[d] = 0; end
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            automatic int dd = j - i + N - 1;
            automatic int m  = N - absi(j - i);
            automatic int q  = (i < j) ? i : j;
            if (t == T0 + 2 * q) d1_in[dd] = a[i][j];
            if (q == 0 && t == T0 + m - 1) begin c1_in[dd] = 1; n_load += m; end
            if (q == 0 && t == T2) begin o_in[dd] = 1; n_unload += m; end
          end
        for (int i = 0; i < N; i++) begin
          if (t == T + i + 3) begin c2_in[i] = 1; n_c2++; end
          if (i > 0 && t == T + i + 3) begin c3_in[i] = 1; n_c3++; end
        end
        @(posedge clk);
        #1;
        // values now on d1_out belong to clock t + 1
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            automatic int dd = j - i + N - 1;
            automatic int q  = (i < j) ? i : j;
            if (t + 1 == T2 + 2 * q + 1) begin
              checks++;
              if (d1_out[dd] !== expv[i][j]) begin
                failures++;
                $display("mat %0d (%0d,%0d): got %h expected %h", mi, i, j, d1_out[dd],
                         expv[i][j]);
              end
            end
          end
      end
    end
    checks++;
    if (n_load == 0 || n_c2 == 0 || n_c3 == 0 || n_unload == 0) failures++;
    $display("loads=%0d c2=%0d c3=%0d unloads=%0d", n_load, n_c2, n_c3, n_unload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
