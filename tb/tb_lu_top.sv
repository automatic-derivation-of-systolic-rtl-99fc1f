// tb_lu_top: end-to-end test of both LU arrays in lu_top at the default size (N = 4).
//
// The same NM matrices are decomposed by the two arrays at once. The hexagonal array gets the
// load / compute / unload schedule of arch2_array once per matrix; the triangular array gets
// the matrices back to back, one empty slot apart. Results are compared with known exact
// factors (matrices built as L * U) or with the loop-nest reference (random diagonally
// dominant matrices), at the exact clock each array's timing gives. The testbench counts every
// mechanism of the two arrays inside the design and fails if one of them never happened:
// C1 loads, C2 divisions (left half), C2 pivot broadcasts (central), C3 broadcasts (right half)
// and O unloads in the hexagonal array; c = 1 divisions, multiply-subtract steps, pass-through
// of finished l values and accumulator clearing on empty slots in the triangular array.
module tb_lu_top;
  import lu_pkg::*;
  import lu_tb_pkg::*;

  localparam int N  = 4;
  localparam int NC = 2 * N - 1;
  localparam int NM = 6;
  // hexagonal array schedule, per matrix
  localparam int T0  = 0;
  localparam int T   = T0 + 2 * N - 2;
  localparam int T2  = T + 3 * N + 1;
  localparam int RUN = T2 + 2 * N + 2;
  // triangular array schedule
  localparam int P    = N + 1;
  localparam int TEND = NM * P + 3 * N + 10;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  a2_c2_in [N];
  logic  a2_c3_in [N];
  data_t a2_d1_in [NC];
  logic  a2_c1_in [NC];
  logic  a2_o_in  [NC];
  data_t a2_d1_out[NC];
  data_t a3_col_in [N];
  logic  a3_col_in_valid [N];
  logic  a3_c_in [N];
  data_t a3_col_out [N];
  logic  a3_col_out_valid [N];

  int checks = 0;
  int failures = 0;

  mat_t a [NM];
  mat_t expv [NM];

  // mechanism counters
  int n_load = 0, n_div2 = 0, n_piv = 0, n_c3 = 0, n_unload = 0;
  int n_div3 = 0, n_ms3 = 0, n_pass3 = 0, n_clr3 = 0;

  lu_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the mechanisms inside the arrays.
  for (genvar i = 0; i < N; i++) begin : g_mi
    for (genvar j = 0; j < N; j++) begin : g_mj
      if (i > j) begin : g_l
        always @(posedge clk) if (rst_n) begin
          if (dut.u_arch2.g_row[i].g_col[j].g_left.u_pe.c2_in) n_div2++;
          if (dut.u_arch2.g_row[i].g_col[j].g_left.u_pe.c1_in) n_load++;
          if (dut.u_arch2.g_row[i].g_col[j].g_left.u_pe.o_in)  n_unload++;
        end
      end else if (i == j) begin : g_c
        always @(posedge clk) if (rst_n) begin
          if (dut.u_arch2.g_row[i].g_col[j].g_central.u_pe.c2_in) n_piv++;
          if (dut.u_arch2.g_row[i].g_col[j].g_central.u_pe.c1_in) n_load++;
          if (dut.u_arch2.g_row[i].g_col[j].g_central.u_pe.o_in)  n_unload++;
        end
      end else begin : g_r
        always @(posedge clk) if (rst_n) begin
          if (dut.u_arch2.g_row[i].g_col[j].g_right.u_pe.c3_in) n_c3++;
          if (dut.u_arch2.g_row[i].g_col[j].g_right.u_pe.c1_in) n_load++;
          if (dut.u_arch2.g_row[i].g_col[j].g_right.u_pe.o_in)  n_unload++;
        end
      end
    end
  end

  for (genvar c = 1; c < N; c++) begin : g_ac
    for (genvar l = 0; l < c; l++) begin : g_al
      always @(posedge clk) if (rst_n) begin
        if (!dut.u_arch3.g_col[c].g_lvl[l].g_int.u_pe.valid_in) n_clr3++;
        else if (dut.u_arch3.g_col[c].g_lvl[l].g_int.u_pe.c_in) n_div3++;
        else if (dut.u_arch3.g_col[c].g_lvl[l].g_int.u_pe.acc == '0) n_pass3++;
        else n_ms3++;
      end
    end
  end

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic run_arch2();
    for (int mi = 0; mi < NM; mi++) begin
      for (int t = 0; t < RUN; t++) begin
        @(negedge clk);
        foreach (a2_c2_in[i]) begin a2_c2_in[i] = 0; a2_c3_in[i] = 0; end
        foreach (a2_d1_in[d]) begin a2_d1_in[d] = '0; a2_c1_in[d] = 0; a2_o_in[d] = 0; end
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            automatic int dd = j - i + N - 1;
            automatic int m  = N - absi(j - i);
            automatic int q  = (i < j) ? i : j;
            if (t == T0 + 2 * q) a2_d1_in[dd] = a[mi][i][j];
            if (q == 0 && t == T0 + m - 1) a2_c1_in[dd] = 1;
            if (q == 0 && t == T2) a2_o_in[dd] = 1;
          end
        for (int i = 0; i < N; i++) begin
          if (t == T + i + 3) a2_c2_in[i] = 1;
          if (i > 0 && t == T + i + 3) a2_c3_in[i] = 1;
        end
        @(posedge clk);
        #1;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            automatic int dd = j - i + N - 1;
            automatic int q  = (i < j) ? i : j;
            if (t + 1 == T2 + 2 * q + 1) begin
              checks++;
              if (a2_d1_out[dd] !== expv[mi][i][j]) begin
                failures++;
                $display("hex mat %0d (%0d,%0d): got %h expected %h", mi, i, j,
                         a2_d1_out[dd], expv[mi][i][j]);
              end
            end
          end
      end
    end
  endtask

  task automatic run_arch3();
    int got_cnt [N];
    foreach (got_cnt[i]) got_cnt[i] = 0;
    for (int t = 0; t < TEND; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        automatic int r = t - i;
        automatic int m = r / P;
        automatic int j = r % P;
        a3_col_in[i] = '0; a3_col_in_valid[i] = 0; a3_c_in[i] = 0;
        if (r >= 0 && m < NM && j < N) begin
          a3_col_in[i] = a[m][i][j];
          a3_col_in_valid[i] = 1;
          a3_c_in[i] = (j == 0);
        end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        if (a3_col_out_valid[i]) begin
          automatic int r = t + 1 - (i + 1) - i;
          automatic int m = r / P;
          automatic int j = r % P;
          checks++;
          if (r < 0 || m >= NM || j >= N) begin
            failures++;
            $display("tri col %0d: unexpected output at clock %0d", i, t + 1);
          end else begin
            got_cnt[i]++;
            if (a3_col_out[i] !== expv[m][i][j]) begin
              failures++;
              $display("tri col %0d mat %0d elem %0d: got %h expected %h", i, m, j,
                       a3_col_out[i], expv[m][i][j]);
            end
          end
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got_cnt[i] != NM * N) begin
        failures++;
        $display("tri col %0d: %0d results, expected %0d", i, got_cnt[i], NM * N);
      end
    end
  endtask

  function automatic void need(string what, int n);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endfunction

  initial begin
    for (int m = 0; m < NM; m++) begin
      if (m % 2 == 0) make_exact(N, a[m], expv[m]);
      else begin
        a[m] = make_random(N);
        expv[m] = ref_lu(a[m], N);
      end
    end
    foreach (a2_c2_in[i]) begin a2_c2_in[i] = 0; a2_c3_in[i] = 0; end
    foreach (a2_d1_in[d]) begin a2_d1_in[d] = '0; a2_c1_in[d] = 0; a2_o_in[d] = 0; end
    foreach (a3_col_in[i]) begin a3_col_in[i] = '0; a3_col_in_valid[i] = 0; a3_c_in[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_arch2();
      run_arch3();
    join
    need("hex: C1 accumulator loads", n_load);
    need("hex: C2 divisions (left half)", n_div2);
    need("hex: C2 pivot broadcasts (central)", n_piv);
    need("hex: C3 broadcasts (right half)", n_c3);
    need("hex: O unloads", n_unload);
    need("tri: c=1 divisions", n_div3);
    need("tri: multiply-subtract steps", n_ms3);
    need("tri: pass-through with acc = 0", n_pass3);
    need("tri: accumulator clears", n_clr3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
