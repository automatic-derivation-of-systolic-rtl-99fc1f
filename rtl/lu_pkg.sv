// lu_pkg: number format and arithmetic shared by every processor of both LU arrays.
//
// All matrix values are signed two's-complement fixed-point numbers of WIDTH bits with FRAC
// fraction bits (Q15.16 by default). The processors need three operations: subtraction (plain
// '-' on data_t), a multiply that keeps the format (full-width product, arithmetic shift right
// by FRAC, truncated back to WIDTH bits) and a divide that keeps the format (dividend shifted
// left by FRAC, signed integer division rounding toward zero). Division by zero returns 0.
// The number format, the rounding and the divide-by-zero result are choices of this design;
// the derivation the arrays come from is stated over exact arithmetic.
package lu_pkg;

  localparam int WIDTH = 32;
  localparam int FRAC  = 16;

  typedef logic signed [WIDTH-1:0]   data_t;
  typedef logic signed [2*WIDTH-1:0] wide_t;

  // 1.0 in the fixed-point format: the unit diagonal of L.
  localparam data_t ONE = data_t'(1) <<< FRAC;

  function automatic data_t fx_mul(data_t a, data_t b);
    wide_t p;
    p = wide_t'(a) * wide_t'(b);
    return data_t'(p >>> FRAC);
  endfunction

  function automatic data_t fx_div(data_t a, data_t b);
    if (b == '0) return '0;
    return data_t'((wide_t'(a) <<< FRAC) / wide_t'(b));
  endfunction

endpackage
