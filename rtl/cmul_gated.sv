// cmul_gated: FP32 complex multiplier with trivial-operand gating.
//
// Computes y = a * b for complex FP32 operands with four real multipliers
// and two real adders (re = ar*br - ai*bi, im = ar*bi + ai*br). When either
// operand is exactly 0, 1, j or -j the product needs no arithmetic: it is a
// copy, a swap of real and imaginary parts with a sign change, or zero. In
// that case the result is taken from a bypass path and the multiplier
// operands are held at zero (operand isolation, the combinational
// equivalent of gating the FP unit's clock), and `gated` is raised. Skipping
// the FP unit on these four operand values follows the accelerator's
// power-saving scheme; the isolation-by-zeroing is this design's choice.
//
// Purely combinational; callers register the result. With a constant `b`
// (an FFT twiddle) synthesis folds the detection away.
module cmul_gated
  import oaa_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t y,
  output logic  gated
);

  typedef enum logic [2:0] {T_NONE, T_ZERO, T_ONE, T_PJ, T_MJ} triv_e;

  function automatic triv_e classify(cplx_t v);
    if (fp_is_zero(v.re) && fp_is_zero(v.im)) return T_ZERO;
    if (fp_is_zero(v.im) && v.re == FP_ONE)   return T_ONE;
    if (fp_is_zero(v.re) && v.im == FP_ONE)   return T_PJ;
    if (fp_is_zero(v.re) && v.im == fp_neg(FP_ONE)) return T_MJ;
    return T_NONE;
  endfunction

  triv_e ta, tb;
  cplx_t ma, mb;           // isolated multiplier operands
  fp32_t p_rr, p_ii, p_ri, p_ir;
  cplx_t y_full, y_triv;

  always_comb begin
    ta    = classify(a);
    tb    = classify(b);
    gated = (ta != T_NONE) || (tb != T_NONE);
    ma    = gated ? C_ZERO : a;
    mb    = gated ? C_ZERO : b;
    p_rr  = fp_mul(ma.re, mb.re);
    p_ii  = fp_mul(ma.im, mb.im);
    p_ri  = fp_mul(ma.re, mb.im);
    p_ir  = fp_mul(ma.im, mb.re);
    y_full.re = fp_sub(p_rr, p_ii);
    y_full.im = fp_add(p_ri, p_ir);
    // Bypass: the trivial operand decides, the other one passes through.
    y_triv = C_ZERO;
    if (ta == T_ZERO || tb == T_ZERO) y_triv = C_ZERO;
    else if (tb == T_ONE)             y_triv = a;
    else if (ta == T_ONE)             y_triv = b;
    else if (tb == T_PJ)              y_triv = c_mul_pj(a);
    else if (tb == T_MJ)              y_triv = c_mul_mj(a);
    else if (ta == T_PJ)              y_triv = c_mul_pj(b);
    else if (ta == T_MJ)              y_triv = c_mul_mj(b);
    y = gated ? y_triv : y_full;
  end

endmodule
