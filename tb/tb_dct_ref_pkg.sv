// tb_dct_ref_pkg: floating-point reference for the DCT testbenches.
//
// ref_coef(x, k) returns the k-th output the 5-multiplier butterfly should
// produce for the sample vector x, computed straight from the DCT sum rather
// than from the butterfly:
//   X(k) = sum_{n=0..7} x(n) cos((2n+1) k pi / 16)
//   ref  = X(0) for k = 0,  2 cos(k pi / 16) X(k) otherwise.
package tb_dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real ref_coef(input int x [8], input int k);
    real s;
    s = 0.0;
    for (int n = 0; n < 8; n++)
      s += real'(x[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
    if (k != 0)
      s *= 2.0 * $cos(real'(k) * PI / 16.0);
    return s;
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
