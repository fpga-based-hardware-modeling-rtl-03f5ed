// Shared types, constants and IEEE754 single-precision arithmetic for the
// pigeon-inspired optimisation (PIO) accelerator.
//
// Every number the accelerator handles (positions, velocities, fitness
// values, random numbers, the map-and-compass factor R) is an IEEE754
// single-precision float, as the design is specified. The functions below
// are the combinational cores of the arithmetic units; the unit modules
// (fp_addsub, fp_mul, fp_div) wrap them in fixed-latency pipelines whose
// depths are the operation latencies of the reference design (add and
// subtract 12 clocks, multiply 8, divide 28).
//
// Own choices: results are rounded to nearest, ties to even. Subnormal
// inputs are read as zero and subnormal results are flushed to zero;
// infinities propagate and an overflow gives infinity. NaN is produced only
// for 0/0 and inf-inf. None of these corner cases occurs in the
// optimisation itself, where all values stay well inside the normal range.
package pio_pkg;

  typedef logic [31:0] f32_t;

  // Problem size of the reference configuration.
  localparam int unsigned PIO_D  = 10;   // solution-space dimensions
  localparam int unsigned PIO_NP = 10;   // population size

  // Latencies of the arithmetic units, in clocks.
  localparam int unsigned LAT_ADD = 12;
  localparam int unsigned LAT_MUL = 8;
  localparam int unsigned LAT_DIV = 28;

  localparam f32_t F_ZERO = 32'h0000_0000;
  localparam f32_t F_HALF = 32'h3F00_0000;   // 0.5
  localparam f32_t F_ONE  = 32'h3F80_0000;   // 1.0
  localparam f32_t F_EIGHT = 32'h4100_0000;  // 8.0
  localparam f32_t F_INF  = 32'h7F80_0000;
  localparam f32_t F_NAN  = 32'h7FC0_0000;

  // Round a normalised 24-bit significand with guard and sticky bits and pack.
  // exp is the biased exponent before rounding, allowed out of range.
  function automatic f32_t f_pack(input logic sign, input int exp,
                                  input logic [23:0] man, input logic guard,
                                  input logic sticky);
    logic [24:0] r;
    int          e;
    e = exp;
    r = {1'b0, man};
    if (guard && (sticky || man[0])) r = r + 25'd1;
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {sign, 8'hFF, 23'd0};
    if (e <= 0)   return {sign, 31'd0};
    return {sign, e[7:0], r[22:0]};
  endfunction

  // a + b
  function automatic f32_t f_add(input f32_t a_in, input f32_t b_in);
    f32_t        a, b;
    logic [26:0] xa, xb;
    logic [27:0] s;
    int          d, e, lz;
    logic        st;
    // order by magnitude so that |a| >= |b|
    if (b_in[30:0] > a_in[30:0]) begin
      a = b_in; b = a_in;
    end else begin
      a = a_in; b = b_in;
    end
    if (a[30:23] == 8'hFF) begin
      if (b[30:23] == 8'hFF && a[31] != b[31]) return F_NAN;
      return a;
    end
    if (a[30:23] == 8'd0) return {a[31] & b[31], 31'd0};
    if (b[30:23] == 8'd0) return a;
    xa = {1'b1, a[22:0], 3'b000};
    xb = {1'b1, b[22:0], 3'b000};
    d  = int'(a[30:23]) - int'(b[30:23]);
    e  = int'(a[30:23]);
    if (d >= 27) begin
      xb = 27'd1;
    end else if (d > 0) begin
      st = |(xb & ((27'd1 << d) - 27'd1));
      xb = (xb >> d) | {26'd0, st};
    end
    if (a[31] == b[31]) begin
      s = {1'b0, xa} + {1'b0, xb};
      if (s[27]) begin
        s = {1'b0, s[27:2], s[1] | s[0]};
        e = e + 1;
      end
    end else begin
      s = {1'b0, xa} - {1'b0, xb};
      if (s == 28'd0) return F_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s = s << lz;
      e = e - lz;
    end
    return f_pack(a[31], e, s[26:3], s[2], s[1] | s[0]);
  endfunction

  // a * b
  function automatic f32_t f_mul(input f32_t a, input f32_t b);
    logic        sg;
    logic [47:0] p;
    int          e;
    sg = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return F_NAN;
      return {sg, 8'hFF, 23'd0};
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {sg, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47])
      return f_pack(sg, e + 1, p[47:24], p[23], |p[22:0]);
    return f_pack(sg, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // a / b
  function automatic f32_t f_div(input f32_t a, input f32_t b);
    logic        sg;
    logic [48:0] n;
    logic [48:0] q;
    logic [48:0] r;
    int          e;
    sg = a[31] ^ b[31];
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return F_NAN;
    if (a[30:23] == 8'hFF) return {sg, 8'hFF, 23'd0};
    if (b[30:23] == 8'd0)  return {sg, 8'hFF, 23'd0};
    if (a[30:23] == 8'd0 || b[30:23] == 8'hFF) return {sg, 31'd0};
    n = {1'b1, a[22:0], 25'd0};
    q = n / {25'd0, 1'b1, b[22:0]};
    r = n % {25'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[25])
      return f_pack(sg, e, q[25:2], q[1], q[0] | (r != 49'd0));
    return f_pack(sg, e - 1, q[24:1], q[0], r != 49'd0);
  endfunction

  // a < b (false when either is NaN; -0 equals +0)
  function automatic logic f_lt(input f32_t a, input f32_t b);
    if ((a[30:23] == 8'hFF && a[22:0] != 0) || (b[30:23] == 8'hFF && b[22:0] != 0))
      return 1'b0;
    if (a[30:0] == 0 && b[30:0] == 0) return 1'b0;
    if (a[31] != b[31]) return a[31];
    if (a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

  // Exact conversion of an unsigned integer below 2^24 to a float.
  function automatic f32_t f_from_uint(input logic [23:0] u);
    int msb;
    logic [23:0] m;
    if (u == 0) return F_ZERO;
    msb = 0;
    for (int i = 0; i < 24; i++) if (u[i]) msb = i;
    m = u << (23 - msb);
    return {1'b0, 8'(127 + msb), m[22:0]};
  endfunction

endpackage
