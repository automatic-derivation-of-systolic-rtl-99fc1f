// lu_tb_pkg: reference arithmetic and test matrices for the LU testbenches.
//
// The reference is written apart from the RTL: it evaluates the LU recurrence as a plain loop
// nest over (k, i, j) with its own 64-bit fixed-point helpers. The number format is the one
// the arrays use: 32-bit two's complement with 16 fraction bits, products truncated by an
// arithmetic shift, quotients rounded toward zero, x / 0 = 0.
// make_exact builds A = L * U from small integer L and U whose pivots are powers of two, so
// the decomposition is exact in this format and the expected L and U are known in advance.
package lu_tb_pkg;

  localparam int NMAX = 16;
  localparam int FB   = 16;

  typedef int mat_t [NMAX][NMAX];

  function automatic int rmul(int a, int b);
    longint p = longint'(a) * longint'(b);
    return int'(p >>> FB);
  endfunction

  function automatic int rdiv(int a, int b);
    longint n;
    if (b == 0) return 0;
    n = longint'(a) * 65536;
    return int'(n / longint'(b));
  endfunction

  // Packed result: lu[i][j] = l_ij for i > j, u_ij for i <= j.
  function automatic mat_t ref_lu(mat_t a, int n);
    mat_t f = a;
    for (int k = 0; k < n; k++) begin
      for (int i = k + 1; i < n; i++) f[i][k] = rdiv(f[i][k], f[k][k]);
      for (int i = k + 1; i < n; i++)
        for (int j = k + 1; j < n; j++)
          f[i][j] = f[i][j] - rmul(f[i][k], f[k][j]);
    end
    return f;
  endfunction

  function automatic int to_fx(int v);
    return v * 65536;
  endfunction

  // A = L * U with integer entries; lu returns L below and U on/above the diagonal.
  function automatic void make_exact(int n, output mat_t a, output mat_t lu);
    int piv [4] = '{1, 2, 4, -2};
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        if (i > j)       lu[i][j] = int'($urandom_range(4)) - 2;
        else if (i == j) lu[i][j] = piv[$urandom_range(3)];
        else             lu[i][j] = int'($urandom_range(6)) - 3;
      end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        int s = 0;
        for (int k = 0; k <= (i < j ? i : j); k++)
          s += ((k == i) ? 1 : lu[i][k]) * lu[k][j];
        a[i][j] = to_fx(s);
      end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) lu[i][j] = to_fx(lu[i][j]);
  endfunction

  // Random diagonally dominant matrix in fixed point (no exact decomposition).
  function automatic mat_t make_random(int n);
    mat_t a;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        a[i][j] = int'($urandom_range(8 * 65536)) - 4 * 65536;
    for (int i = 0; i < n; i++) a[i][i] = (4 * n + 1) * 65536 + int'($urandom_range(65535));
    return a;
  endfunction

endpackage
