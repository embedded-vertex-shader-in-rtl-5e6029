// fp_ref_pkg: reference single-precision arithmetic for the testbenches,
// computed independently of the RTL through double precision: the exact or
// double-rounded value is rounded once more to binary32, nearest even. Since
// double has more than 2*24+2 significand bits, this equals a single correct
// rounding for +, -, * and /. Results below the normal range are flushed to
// zero like the RTL does; random operands are drawn from a moderate exponent
// range so that this never matters.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});   // signed zero
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [23:0] m;
    logic [28:0] rest;
    logic [24:0] mr;
    d    = $realtobits(r);
    s    = d[63];
    if (d[62:0] == 63'd0) return {s, 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b1, d[51:29]};
    rest = d[28:0];
    mr   = {1'b0, m};
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && m[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], mr[22:0]};
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fdiv(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) / f2r(b));
  endfunction
  function automatic logic [31:0] i2f(input logic [31:0] a);
    return r2f(real'($signed(a)));
  endfunction
  function automatic logic [31:0] f2i(input logic [31:0] a);
    real r;
    r = f2r(a);
    if (r >= 2147483648.0)  return 32'h7FFF_FFFF;
    if (r <= -2147483648.0) return 32'h8000_0000;
    return 32'($rtoi(r));
  endfunction

  // Random float with a biased exponent in [emin, emax] and random sign.
  function automatic logic [31:0] rand_f(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic logic [31:0] flt(input real r);
    return r2f(r);
  endfunction

endpackage
