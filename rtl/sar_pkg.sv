// sar_pkg: types and floating-point arithmetic shared by the SAR imaging datapath.
//
// Every sample is a complex number whose real and imaginary parts are 32-bit
// floating-point words (the 32-bit width per part follows the source design).
// The exact format of its custom floating-point unit is not published, so this
// package uses the IEEE-754 binary32 layout with a reduced rule set chosen here:
// subnormals are flushed to zero, results are truncated (round toward zero),
// overflow saturates to the largest finite value and NaN/Inf are not produced.
// The functions are combinational; the modules that call them put registers
// around them.
package sar_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  // Settings of one multiplier with its ACU and vector generator.
  typedef struct packed {
    logic       en;        // 0: multiplier bypassed
    logic [2:0] acu_cfg;   // ACU switch settings
    logic [1:0] vsel;      // Vec0/Vec1 = f or f^2
    logic       sgn;       // signed sample index
    fp32_t      para0;
    fp32_t      para1;
    fp32_t      f0;
    fp32_t      df;
  } mul_cfg_t;

  // Settings of one lane: multiplier, FFT/IFFT core, multiplier.
  typedef struct packed {
    logic [3:0] log2n;
    logic       inv;
    logic       dit;       // bit-reversed input, natural output
    logic [4:0] pre;
    mul_cfg_t   pre_mul;
    mul_cfg_t   post_mul;
  } lane_cfg_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;
  localparam fp32_t FP_MAX     = 32'h7F7F_FFFF;
  // 1/(2*pi), used to turn radians into fractions of a turn
  localparam fp32_t FP_INV_2PI = 32'h3E22_F983;

  function automatic fp32_t fneg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // a + b
  function automatic fp32_t fadd(input fp32_t a, input fp32_t b);
    logic [7:0]  ea, eb, ex;
    logic [26:0] ma, mb;          // 1.23 mantissa with 3 guard bits
    logic [27:0] s;
    logic        sa, sb;
    logic [7:0]  d;
    int          lz;
    fp32_t       hi, lo;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? FP_ZERO : b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin hi = a; lo = b; end
    else begin hi = b; lo = a; end
    sa = hi[31];  sb = lo[31];
    ea = hi[30:23]; eb = lo[30:23];
    ma = {1'b1, hi[22:0], 3'b000};
    mb = {1'b1, lo[22:0], 3'b000};
    d  = ea - eb;
    if (d > 8'd26) return hi;
    mb = mb >> d;
    ex = ea;
    if (sa == sb) begin
      s = {1'b0, ma} + {1'b0, mb};
      if (s[27]) begin
        s = s >> 1;
        if (ex == 8'd254) return {sa, FP_MAX[30:0]};
        ex = ex + 8'd1;
      end
    end else begin
      s = {1'b0, ma} - {1'b0, mb};
      if (s == 28'd0) return FP_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      if (lz >= int'(ex)) return FP_ZERO;
      s  = s << lz;
      ex = ex - 8'(lz);
    end
    return {sa, ex, s[25:3]};
  endfunction

  function automatic fp32_t fsub(input fp32_t a, input fp32_t b);
    return fadd(a, fneg(b));
  endfunction

  // a * b
  function automatic fp32_t fmul(input fp32_t a, input fp32_t b);
    logic [47:0] p;
    logic signed [10:0] e;
    logic        sg;
    sg = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return FP_ZERO;
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127;
    if (p[47]) begin
      e = e + 11'sd1;
      p = p >> 1;
    end
    if (e <= 0)   return FP_ZERO;
    if (e >= 255) return {sg, FP_MAX[30:0]};
    return {sg, e[7:0], p[45:23]};
  endfunction

  // a / b (b = 0 saturates)
  function automatic fp32_t fdiv(input fp32_t a, input fp32_t b);
    logic [48:0] q;
    logic signed [10:0] e;
    logic        sg;
    sg = a[31] ^ b[31];
    if (a[30:23] == 8'd0) return FP_ZERO;
    if (b[30:23] == 8'd0) return {sg, FP_MAX[30:0]};
    q = {1'b1, a[22:0], 25'd0} / {25'd0, 1'b1, b[22:0]};  // in [2^24, 2^26)
    e = 11'(a[30:23]) - 11'(b[30:23]) + 11'sd127;
    if (!q[25]) begin
      e = e - 11'sd1;
      q = q << 1;
    end
    if (e <= 0)   return FP_ZERO;
    if (e >= 255) return {sg, FP_MAX[30:0]};
    return {sg, e[7:0], q[24:2]};
  endfunction

  // Signed fixed-point value x / 2^FRAC to floating point (|x| < 2^31).
  function automatic fp32_t fix2f(input logic signed [31:0] x, input int frac);
    logic [31:0] m;
    int          msb;
    logic [31:0] nm;
    if (x == 0) return FP_ZERO;
    m = x[31] ? 32'(-x) : 32'(x);
    msb = 0;
    for (int i = 0; i < 32; i++) if (m[i]) msb = i;
    nm = m << (31 - msb);             // leading one at bit 31
    return {x[31], 8'(127 + msb - frac), nm[30:8]};
  endfunction

  // Floating-point value counted in turns to a 32-bit phase word
  // (2^32 = one turn), wrapping modulo one turn.
  function automatic logic [31:0] f2turn(input fp32_t a);
    int          k;
    logic [31:0] m;
    logic [31:0] v;
    if (a[30:23] == 8'd0) return 32'd0;
    k = int'(a[30:23]) - 118;         // value * 2^32 = mant24 * 2^(e-127-23+32)
    m = {8'd0, 1'b1, a[22:0]};
    if (k >= 32)      v = 32'd0;
    else if (k >= 0)  v = m << k;
    else if (k > -32) v = m >> (-k);
    else              v = 32'd0;
    return a[31] ? -v : v;
  endfunction

  // Keep only the top `bits` of the 23 stored mantissa bits (precision control).
  function automatic fp32_t fround(input fp32_t a, input logic [4:0] bits);
    logic [22:0] mask;
    if (bits >= 5'd23) return a;
    mask = ~(23'h7F_FFFF >> bits);
    return {a[31:23], a[22:0] & mask};
  endfunction

  // Scale by 2^-k by exponent arithmetic.
  function automatic fp32_t fscale_down(input fp32_t a, input logic [4:0] k);
    if (a[30:23] <= 8'(k)) return FP_ZERO;
    return {a[31], a[30:23] - 8'(k), a[22:0]};
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    return '{re: fadd(a.re, b.re), im: fadd(a.im, b.im)};
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    return '{re: fsub(a.re, b.re), im: fsub(a.im, b.im)};
  endfunction

  // multiply by -j: (x + jy)(-j) = y - jx
  function automatic cplx_t cmul_mj(input cplx_t a);
    return '{re: a.im, im: fneg(a.re)};
  endfunction

endpackage
