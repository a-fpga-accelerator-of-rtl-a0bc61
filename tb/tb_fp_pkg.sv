// tb_fp_pkg: reference helpers shared by the testbenches. Conversions between
// FP32 bit patterns and simulator reals (IEEE double), so expected results
// are computed with real arithmetic, independently of the RTL's operators.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] a);
    if (a[30:23] == 8'd0) return 0.0;
    return $bitstoreal({a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] b;
    b = $realtobits(r);
    if (r == 0.0) return 32'd0;
    return {b[63], 8'(int'(b[62:52]) - 1023 + 127), b[51:29]};
  endfunction

  function automatic real fabs(input real r);
    return r < 0.0 ? -r : r;
  endfunction

  // relative error test with an absolute floor
  function automatic logic near(input real got, input real exp, input real tol);
    return fabs(got - exp) <= tol * (fabs(exp) + 1.0);
  endfunction

  // uniform random real in [lo, hi)
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 1000000) / 1000000.0;
  endfunction
endpackage
