// oaa_pkg: types, constants and IEEE-754 single-precision arithmetic shared by
// the frequency-domain (overlap-and-add) convolution accelerator.
//
// All datapaths carry 32-bit floating point, as the accelerator is built for
// FP32 CNN inference. The arithmetic here is this design's own simplified
// FP32: round-to-nearest-even on normal numbers, subnormal inputs and
// results flushed to zero, overflow saturated to infinity, and no NaN
// propagation (CNN data never produces them). fp_add and fp_mul are pure
// functions; a call site becomes one combinational adder or multiplier.
//
// twiddle() returns W_64^e = exp(-2*pi*j*e/64) (or its conjugate for the
// inverse transform) from a 17-entry quarter-wave cosine table, entry k being
// the FP32 value of cos(2*pi*k/64) rounded to nearest.
package oaa_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;
  localparam cplx_t C_ZERO  = '{re: FP_ZERO, im: FP_ZERO};

  // Convolver geometry: P x P FFT tiles streamed one row of P words per beat.
  localparam int unsigned FFT_P = 16;

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic fp32_t fp_pack(logic s, int e, logic [23:0] m);
    if (e <= 0)        return {s, 31'd0};
    else if (e >= 255) return {s, 8'hff, 23'd0};
    else               return {s, e[7:0], m[22:0]};
  endfunction

  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic        s;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) return {s, 8'hff, 23'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      m = p[47:24]; g = p[23]; st = |p[22:0]; e = e + 1;
    end else begin
      m = p[46:23]; g = p[22]; st = |p[21:0];
    end
    if (g && (st || m[0])) begin
      if (m == 24'hff_ffff) begin m = 24'h80_0000; e = e + 1; end
      else m = m + 24'd1;
    end
    return fp_pack(s, e, m);
  endfunction

  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    fp32_t       x, y;
    logic [26:0] mx, my;      // 1.23 mantissa followed by guard, round, sticky
    logic [27:0] sum;
    logic [23:0] m;
    logic        g, st;
    int          e, d, lz;
    if (b[30:23] == 8'd0) return (a[30:23] == 8'd0) ? {a[31] & b[31], 31'd0} : a;
    if (a[30:23] == 8'd0) return b;
    if (a[30:23] == 8'hff) return a;
    if (b[30:23] == 8'hff) return b;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    e  = int'(x[30:23]);
    d  = e - int'(y[30:23]);
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    if (d >= 27) my = 27'd1;
    else if (d > 0) my = (my >> d) | 27'((|(my & ((27'd1 << d) - 27'd1))) ? 1 : 0);
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == 28'd0) return FP_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz = lz + 1;
      end
      sum = sum << lz;
      e = e - lz;
    end
    m  = sum[26:3];
    g  = sum[2];
    st = sum[1] | sum[0];
    if (g && (st || m[0])) begin
      if (m == 24'hff_ffff) begin m = 24'h80_0000; e = e + 1; end
      else m = m + 24'd1;
    end
    return fp_pack(x[31], e, m);
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  // Multiply by 2^-k exactly (k small), used for the 1/N scaling of the IFFT.
  function automatic fp32_t fp_scale_pow2(fp32_t a, int k);
    if (int'(a[30:23]) - k <= 0 || a[30:23] == 8'hff) return (a[30:23] == 8'hff) ? a : {a[31], 31'd0};
    return {a[31], 8'(int'(a[30:23]) - k), a[22:0]};
  endfunction

  function automatic cplx_t c_add(cplx_t a, cplx_t b);
    return '{re: fp_add(a.re, b.re), im: fp_add(a.im, b.im)};
  endfunction

  function automatic cplx_t c_sub(cplx_t a, cplx_t b);
    return '{re: fp_sub(a.re, b.re), im: fp_sub(a.im, b.im)};
  endfunction

  // a * (-j) = im - j*re ; a * (+j) = -im + j*re
  function automatic cplx_t c_mul_mj(cplx_t a);
    return '{re: a.im, im: fp_neg(a.re)};
  endfunction

  function automatic cplx_t c_mul_pj(cplx_t a);
    return '{re: fp_neg(a.im), im: a.re};
  endfunction

  function automatic cplx_t c_neg(cplx_t a);
    return '{re: fp_neg(a.re), im: fp_neg(a.im)};
  endfunction

  // Quarter-wave table: COS64[k] = cos(2*pi*k/64), k = 0..16.
  localparam fp32_t COS64 [17] = '{
    32'h3f800000, 32'h3f7ec46d, 32'h3f7b14be, 32'h3f74fa0b, 32'h3f6c835e,
    32'h3f61c598, 32'h3f54db31, 32'h3f45e403, 32'h3f3504f3, 32'h3f226799,
    32'h3f0e39da, 32'h3ef15aea, 32'h3ec3ef15, 32'h3e94a031, 32'h3e47c5c2,
    32'h3dc8bd36, 32'h00000000
  };

  // cos and sin of 2*pi*e/64 for any e, by quadrant symmetry.
  function automatic fp32_t cos64(int e);
    int q, r;
    q = (e % 64) / 16;
    r = (e % 64) % 16;
    case (q)
      0: return COS64[r];
      1: return fp_neg(COS64[16 - r]);
      2: return fp_neg(COS64[r]);
      default: return COS64[16 - r];
    endcase
  endfunction

  function automatic fp32_t sin64(int e);
    return cos64(e + 48);   // sin(x) = cos(x - pi/2)
  endfunction

  // W_64^e for the forward transform, conj(W_64^e) for the inverse.
  function automatic cplx_t twiddle(int e, logic inv);
    cplx_t w;
    w.re = cos64(e);
    w.im = inv ? sin64(e) : fp_neg(sin64(e));
    return w;
  endfunction

endpackage
