// tb_arch3_array: end-to-end test of the triangular LU array.
//
// Streams NM matrices back to back through the array, row i of each into column i with the
// skew of one clock per column and one empty slot between matrices. Half of the matrices are
// built as L * U with known exact factors, the other half are random diagonally dominant
// matrices checked against the loop-nest reference. Each result must leave column i exactly
// i + 1 clocks after its input element entered (one register per processor of the column).
// It runs a 6 x 6 array, larger than the default 4 x 4 that tb_lu_top covers.
module tb_arch3_array;
  import lu_pkg::*;
  import lu_tb_pkg::*;

  localparam int N  = 6;
  localparam int NM = 6;
  localparam int P  = N + 1;             // clocks between matrix starts
  localparam int TEND = NM * P + 3 * N + 10;

  logic  clk = 0;
  logic  rst_n = 0;
  data_t col_in [N];
  logic  col_in_valid [N];
  logic  c_in [N];
  data_t col_out [N];
  logic  col_out_valid [N];

  int checks = 0;
  int failures = 0;

  mat_t a [NM];
  mat_t expv [NM];
  int   got_cnt [N];

  arch3_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NM; m++) begin
      if (m % 2 == 0) make_exact(N, a[m], expv[m]);
      else begin
        a[m] = make_random(N);
        expv[m] = ref_lu(a[m], N);
      end
    end
    foreach (got_cnt[i]) got_cnt[i] = 0;
    foreach (col_in[i]) begin col_in[i] = '0; col_in_valid[i] = 0; c_in[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TEND; t++) begin
      @(negedge clk);
      // drive clock t: column i carries element j of matrix m when t = m*P + i + j
      for (int i = 0; i < N; i++) begin
        automatic int r = t - i;
        automatic int m = r / P;
        automatic int j = r % P;
        col_in[i] = '0; col_in_valid[i] = 0; c_in[i] = 0;
        if (r >= 0 && m < NM && j < N) begin
          col_in[i] = a[m][i][j];
          col_in_valid[i] = 1;
          c_in[i] = (j == 0);
        end
      end
      @(posedge clk);
      #1;
      // outputs now visible are those of clock t + 1
      for (int i = 0; i < N; i++) begin
        if (col_out_valid[i]) begin
          automatic int r = t + 1 - (i + 1) - i;   // input clock of this element, minus column skew
          automatic int m = r / P;
          automatic int j = r % P;
          checks++;
          if (r < 0 || m >= NM || j >= N) begin
            failures++;
            $display("col %0d: unexpected output at clock %0d", i, t + 1);
          end else begin
            got_cnt[i]++;
            if (col_out[i] !== expv[m][i][j]) begin
              failures++;
              $display("col %0d mat %0d elem %0d: got %h expected %h", i, m, j,
                       col_out[i], expv[m][i][j]);
            end
          end
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got_cnt[i] != NM * N) begin
        failures++;
        $display("col %0d: %0d results, expected %0d", i, got_cnt[i], NM * N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
