// Reference floating-point helpers for the testbenches.
//
// Converts between IEEE754 single-precision bit patterns and the simulator's
// double-precision real. A single-precision add, subtract, multiply or divide
// computed in double precision and then rounded once to single precision
// (r2f) is correctly rounded, so these give expected values that do not
// depend on the arithmetic inside the design.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    int e;
    if (f[30:23] == 0) return f[31] ? -0.0 : 0.0;
    e = int'(f[30:23]) - 127 + 1023;
    d = {f[31], 11'(e), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Round a real to the nearest single-precision value (ties to even).
  // Values below the normal range become zero, above it infinity.
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [24:0] m;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Bit-exact equality, except that +0 and -0 count as equal.
  function automatic logic f_same(input logic [31:0] got, input logic [31:0] exp);
    if (got[30:0] == 0 && exp[30:0] == 0) return 1'b1;
    return got == exp;
  endfunction

  // Absolute difference of two floats measured in units of the last place
  // of the expected value.
  function automatic real ulp_err(input logic [31:0] got, input logic [31:0] exp);
    real ulp;
    if (exp[30:23] == 0) return (got[30:23] == 0) ? 0.0 : 1.0e9;
    ulp = f2r({1'b0, exp[30:23], 23'd0}) / 8388608.0;
    return ((f2r(got) - f2r(exp)) < 0 ? (f2r(exp) - f2r(got)) : (f2r(got) - f2r(exp))) / ulp;
  endfunction

  // Reference model of the random module: advances an 8-bit Fibonacci
  // shift register with feedback polynomial x^8 + x^6 + x^5 + x^4 + 1 by
  // eight steps and returns the eight output bits, first bit most
  // significant. Bit k-1 of sr is stage x_k; x8 is the output.
  function automatic logic [7:0] lfsr_word(ref logic [7:0] sr);
    logic [7:0] w;
    for (int k = 0; k < 8; k++) begin
      logic fb;
      w  = {w[6:0], sr[7]};
      fb = sr[7] ^ sr[5] ^ sr[4] ^ sr[3];
      sr = {sr[6:0], fb};
    end
    return w;
  endfunction

  // The random number u/256 as a float.
  function automatic logic [31:0] rnd_of(input logic [7:0] u);
    return r2f(real'(u) / 256.0);
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] fdiv(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) / f2r(b));
  endfunction

  // e^x as the fifth-order Taylor polynomial, each operation rounded to
  // single precision in the order: powers by repeated multiplication, terms
  // divided by k!, then ((((1 + x) + t2) + t3) + t4) + t5.
  function automatic logic [31:0] texp(input logic [31:0] x);
    logic [31:0] p, acc;
    logic [31:0] t [2:5];
    real fact;
    p = x;
    fact = 1.0;
    for (int k = 2; k <= 5; k++) begin
      p = fmul(p, x);
      fact = fact * k;
      t[k] = fdiv(p, r2f(fact));
    end
    acc = fadd(32'h3F800000, x);
    for (int k = 2; k <= 5; k++) acc = fadd(acc, t[k]);
    return acc;
  endfunction

  // Benchmark fitness, summed in dimension order.
  function automatic logic [31:0] fitness(input logic [31:0] x [], input int d_n);
    logic [31:0] acc, h;
    for (int d = 0; d < d_n; d++) begin
      h = fadd(x[d], 32'h3F000000);
      h = fmul(h, h);
      acc = (d == 0) ? h : fadd(acc, h);
    end
    return acc;
  endfunction

endpackage
