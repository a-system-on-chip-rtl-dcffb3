// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
// Operands are widened exactly to double precision, the operation is done in
// double precision by the simulator, and the result is rounded back to
// single precision (round to nearest even, results below the normal range
// flushed to zero). Sums whose operand exponents differ by less than 29 and
// all products are exact in double precision, so for such operands this
// gives the correctly rounded single-precision result.
package fp_ref_pkg;

  function automatic real sp2real(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 0) return $bitstoreal({x[31], 63'd0});  // flush denormals
    if (x[30:23] == 8'hFF)                                  // infinity or NaN
      return $bitstoreal({x[31], 11'h7FF, (x[22:0] != 0), 51'd0});
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real2sp(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (d[62:52] == 0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random normal single-precision number with exponent in [emin, emax].
  function automatic logic [31:0] rand_sp(input int emin, input int emax);
    logic [31:0] x;
    x[31]    = 1'($urandom);
    x[30:23] = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    x[22:0]  = 23'($urandom);
    return x;
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return real2sp(sp2real(a) + sp2real(b));
  endfunction
  function automatic logic [31:0] ref_sub(input logic [31:0] a, input logic [31:0] b);
    return real2sp(sp2real(a) - sp2real(b));
  endfunction
  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return real2sp(sp2real(a) * sp2real(b));
  endfunction

endpackage
