// fp_pkg -- IEEE-754 floating-point operators used by the force kernel.
//
// The kernel works in single precision (binary32) and accumulates its global
// sums in double precision (binary64). Every operator here is a pure
// combinational function; the modules that call them put pipeline registers
// around them, so each function is one pipeline stage of logic.
//
// Conventions (a choice of this design, in the style of FPGA floating-point
// cores): results are rounded to nearest, ties to even; subnormal inputs are
// read as zero and subnormal results flush to zero; overflow gives infinity;
// NaN is never produced (inf - inf gives inf).
//
// Besides add and multiply, the package builds the transcendental operators
// the pair kernel needs out of adds and multiplies:
//   f32_recip  1/x       bit-trick seed, three Newton-Raphson steps
//   f32_rsqrt  1/sqrt(x) bit-trick seed, three Newton-Raphson steps
//   f32_exp    e^x       Cody-Waite reduction x = n*ln2 + r, degree-7 Taylor
//                        polynomial for e^r, then 2^n added to the exponent
// Their error is a few units in the last place.
package fp_pkg;

  typedef logic [31:0] f32_t;
  typedef logic [63:0] f64_t;

  localparam f32_t F32_ZERO      = 32'h0000_0000;
  localparam f32_t F32_ONE       = 32'h3F80_0000;
  localparam f32_t F32_TWO       = 32'h4000_0000;
  localparam f32_t F32_THREE     = 32'h4040_0000;
  localparam f32_t F32_TWELVE    = 32'h4140_0000;
  localparam f32_t F32_HALF      = 32'h3F00_0000;
  localparam f32_t F32_THREEHALF = 32'h3FC0_0000;
  localparam f32_t F32_INF       = 32'h7F80_0000;

  // ---------------------------------------------------------------- binary32
  function automatic f32_t f32_neg(f32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic logic f32_is_zero(f32_t a);
    return a[30:23] == 8'd0;
  endfunction

  // a < b, with -0 == +0
  function automatic logic f32_lt(f32_t a, f32_t b);
    logic az, bz;
    az = f32_is_zero(a);
    bz = f32_is_zero(b);
    if (az && bz) return 1'b0;
    if (az) return !b[31];
    if (bz) return a[31];
    if (a[31] != b[31]) return a[31];
    if (!a[31]) return a[30:0] < b[30:0];
    return a[30:0] > b[30:0];
  endfunction

  function automatic f32_t f32_add(f32_t x, f32_t y);
    f32_t        a, b;
    logic        sa, sb;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb, mant;
    logic [24:0] mround;
    logic [26:0] xa, xb, xbs;
    logic [27:0] sum;
    logic        rnd, sticky;
    int          d, er;
    // order operands so that |a| >= |b|
    if (x[30:0] < y[30:0]) begin
      a = y; b = x;
    end else begin
      a = x; b = y;
    end
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    if (ea == 8'hFF) return {sa, 8'hFF, 23'd0};
    if (ea == 8'd0) return {sa & sb, 31'd0};
    if (eb == 8'd0) return a;
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    d  = int'(ea) - int'(eb);
    xa = {ma, 3'b000};
    xb = {mb, 3'b000};
    if (d > 26) begin
      xbs = 27'd1;
    end else begin
      xbs = xb >> d;
      sticky = |(xb & ((27'd1 << d) - 27'd1));
      xbs[0] = xbs[0] | sticky;
    end
    if (sa == sb) sum = {1'b0, xa} + {1'b0, xbs};
    else          sum = {1'b0, xa} - {1'b0, xbs};
    if (sum == 28'd0) return F32_ZERO;
    er = int'(ea);
    if (sum[27]) begin
      sum = {1'b0, sum[27:2], sum[1] | sum[0]};
      er  = er + 1;
    end else begin
      // normalize: staged leading-zero shifter (16, 8, 4, 2, 1)
      if (sum[26:11] == '0) begin sum = sum << 16; er = er - 16; end
      if (sum[26:19] == '0) begin sum = sum << 8;  er = er - 8;  end
      if (sum[26:23] == '0) begin sum = sum << 4;  er = er - 4;  end
      if (sum[26:25] == '0) begin sum = sum << 2;  er = er - 2;  end
      if (!sum[26])         begin sum = sum << 1;  er = er - 1;  end
    end
    mant   = sum[26:3];
    rnd    = sum[2];
    sticky = sum[1] | sum[0];
    mround = {1'b0, mant} + {24'd0, rnd & (sticky | mant[0])};
    if (mround[24]) begin
      mround = mround >> 1;
      er     = er + 1;
    end
    if (er >= 255) return {sa, 8'hFF, 23'd0};
    if (er <= 0)   return {sa, 31'd0};
    return {sa, er[7:0], mround[22:0]};
  endfunction

  function automatic f32_t f32_sub(f32_t a, f32_t b);
    return f32_add(a, f32_neg(b));
  endfunction

  function automatic f32_t f32_mul(f32_t a, f32_t b);
    logic        s;
    logic [47:0] p;
    logic [23:0] mant;
    logic [24:0] mround;
    logic        rnd, sticky;
    int          er;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    er = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      mant   = p[47:24];
      rnd    = p[23];
      sticky = |p[22:0];
      er     = er + 1;
    end else begin
      mant   = p[46:23];
      rnd    = p[22];
      sticky = |p[21:0];
    end
    mround = {1'b0, mant} + {24'd0, rnd & (sticky | mant[0])};
    if (mround[24]) begin
      mround = mround >> 1;
      er     = er + 1;
    end
    if (er >= 255) return {s, 8'hFF, 23'd0};
    if (er <= 0)   return {s, 31'd0};
    return {s, er[7:0], mround[22:0]};
  endfunction

  // Exact conversion of a small integer (|n| < 2^24) to binary32.
  function automatic f32_t f32_from_int(int n);
    logic        s;
    logic [31:0] m;
    int          e;
    if (n == 0) return F32_ZERO;
    s = n < 0;
    m = s ? 32'(-n) : 32'(n);
    e = 0;
    for (int k = 0; k < 32; k++) if (m[k]) e = k;   // highest set bit
    m = m << (31 - e);
    return {s, 8'(e + 127), m[30:8]};
  endfunction

  // Nearest integer (ties away from zero) of a value with |a| < 2^30.
  function automatic int f32_round_int(f32_t a);
    logic [63:0] m;
    int          e, r;
    e = int'(a[30:23]) - 127;
    if (a[30:23] == 8'd0 || e < -1) return 0;
    if (e > 29) e = 29;
    m = {40'd0, 1'b1, a[22:0]};       // value = m * 2^(e-23)
    m = m << 32;                       // value = m * 2^(e-55)
    m = m >> (23 - e);                 // value = m * 2^-32
    m = m + 64'h0000_0000_8000_0000;   // + 0.5
    r = int'(m[63:32]);
    return a[31] ? -r : r;
  endfunction

  // 1/a
  function automatic f32_t f32_recip(f32_t a);
    f32_t x, m;
    logic s;
    if (f32_is_zero(a)) return {a[31], 8'hFF, 23'd0};
    if (a[30:23] == 8'hFF) return {a[31], 31'd0};
    s = a[31];
    m = {1'b0, a[30:0]};
    x = 32'h7EF3_11C3 - m;
    for (int k = 0; k < 3; k++)
      x = f32_mul(x, f32_sub(F32_TWO, f32_mul(m, x)));
    return {s, x[30:0]};
  endfunction

  // 1/sqrt(a) for a > 0
  function automatic f32_t f32_rsqrt(f32_t a);
    f32_t y, ha;
    if (f32_is_zero(a)) return F32_INF;
    ha = f32_mul(F32_HALF, a);
    y  = 32'h5F37_59DF - {1'b0, a[31:1]};
    for (int k = 0; k < 3; k++)
      y = f32_mul(y, f32_sub(F32_THREEHALF, f32_mul(ha, f32_mul(y, y))));
    return y;
  endfunction

  // e^a
  function automatic f32_t f32_exp(f32_t a);
    localparam f32_t LOG2E  = 32'h3FB8_AA3B;
    localparam f32_t LN2_HI = 32'h3F31_7200;
    localparam f32_t LN2_LO = 32'h35BF_BE8E;
    localparam f32_t EXP_LO = 32'hC2AE_999A;  // -87.3
    localparam f32_t EXP_HI = 32'h42B1_6666;  //  88.7
    localparam f32_t C [0:7] = '{32'h3F80_0000, 32'h3F80_0000, 32'h3F00_0000,
                                 32'h3E2A_AAAB, 32'h3D2A_AAAB, 32'h3C08_8889,
                                 32'h3AB6_0B61, 32'h3950_0D01};  // 1/k!
    f32_t fn, r, p;
    int   n, e;
    if (f32_lt(a, EXP_LO)) return F32_ZERO;
    if (f32_lt(EXP_HI, a)) return F32_INF;
    n  = f32_round_int(f32_mul(a, LOG2E));
    fn = f32_from_int(n);
    r  = f32_sub(a, f32_mul(fn, LN2_HI));
    r  = f32_sub(r, f32_mul(fn, LN2_LO));
    p  = C[7];
    for (int k = 6; k >= 0; k--)
      p = f32_add(f32_mul(p, r), C[k]);
    e = int'(p[30:23]) + n;
    if (e <= 0)   return F32_ZERO;
    if (e >= 255) return F32_INF;
    return {1'b0, 8'(e), p[22:0]};
  endfunction

  // ---------------------------------------------------------------- binary64
  function automatic f64_t f32_to_f64(f32_t a);
    if (a[30:23] == 8'd0)  return {a[31], 63'd0};
    if (a[30:23] == 8'hFF) return {a[31], 11'h7FF, 52'd0};
    return {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
  endfunction

  function automatic f64_t f64_add(f64_t x, f64_t y);
    f64_t        a, b;
    logic        sa, sb;
    logic [10:0] ea, eb;
    logic [52:0] ma, mb, mant;
    logic [53:0] mround;
    logic [55:0] xa, xb, xbs;
    logic [56:0] sum;
    logic        rnd, sticky;
    int          d, er;
    if (x[62:0] < y[62:0]) begin
      a = y; b = x;
    end else begin
      a = x; b = y;
    end
    sa = a[63]; sb = b[63];
    ea = a[62:52]; eb = b[62:52];
    if (ea == 11'h7FF) return {sa, 11'h7FF, 52'd0};
    if (ea == 11'd0) return {sa & sb, 63'd0};
    if (eb == 11'd0) return a;
    ma = {1'b1, a[51:0]};
    mb = {1'b1, b[51:0]};
    d  = int'(ea) - int'(eb);
    xa = {ma, 3'b000};
    xb = {mb, 3'b000};
    if (d > 55) begin
      xbs = 56'd1;
    end else begin
      xbs = xb >> d;
      sticky = |(xb & ((56'd1 << d) - 56'd1));
      xbs[0] = xbs[0] | sticky;
    end
    if (sa == sb) sum = {1'b0, xa} + {1'b0, xbs};
    else          sum = {1'b0, xa} - {1'b0, xbs};
    if (sum == 57'd0) return 64'd0;
    er = int'(ea);
    if (sum[56]) begin
      sum = {1'b0, sum[56:2], sum[1] | sum[0]};
      er  = er + 1;
    end else begin
      if (sum[55:24] == '0) begin sum = sum << 32; er = er - 32; end
      if (sum[55:40] == '0) begin sum = sum << 16; er = er - 16; end
      if (sum[55:48] == '0) begin sum = sum << 8;  er = er - 8;  end
      if (sum[55:52] == '0) begin sum = sum << 4;  er = er - 4;  end
      if (sum[55:54] == '0) begin sum = sum << 2;  er = er - 2;  end
      if (!sum[55])         begin sum = sum << 1;  er = er - 1;  end
    end
    mant   = sum[55:3];
    rnd    = sum[2];
    sticky = sum[1] | sum[0];
    mround = {1'b0, mant} + {53'd0, rnd & (sticky | mant[0])};
    if (mround[53]) begin
      mround = mround >> 1;
      er     = er + 1;
    end
    if (er >= 2047) return {sa, 11'h7FF, 52'd0};
    if (er <= 0)    return {sa, 63'd0};
    return {sa, er[10:0], mround[51:0]};
  endfunction

endpackage
