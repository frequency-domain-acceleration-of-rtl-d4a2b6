// r4_butterfly: radix-4 decimation-in-time butterfly in FP32.
//
// Takes the k-th element of four interleaved sub-DFTs, x[0..3], multiplies
// x[i] by the constant twiddle W_64^(E*i) (conjugated when INV = 1) and
// forms the four radix-4 outputs
//   y0 = a + c,  y2 = a - c,  y1 = b -/+ j*d,  y3 = b +/- j*d
// with a = x0 + t2, b = x0 - t2, c = t1 + t3, d = t1 - t3 (t_i the
// twiddled inputs; upper sign forward, lower sign inverse). A twiddle that
// is 1, -1, j or -j is applied by swapping and negating parts, with no
// multiplier at all; the others go through cmul_gated. The radix-4 structure follows the accelerator's FFT; the
// add/subtract factorisation is the usual one. Combinational.
module r4_butterfly
  import oaa_pkg::*;
#(
  parameter int unsigned E   = 0,   // twiddle exponent step, in units of W_64
  parameter bit          INV = 1'b0
) (
  input  cplx_t x [4],
  output cplx_t y [4]
);

  cplx_t t [4];

  assign t[0] = x[0];
  for (genvar i = 1; i < 4; i++) begin : g_tw
    localparam int unsigned EI = (E * i) % 64;
    if (EI % 16 == 0) begin : g_triv
      // W64^0 = 1, W64^16 = -j, W64^32 = -1, W64^48 = +j (conjugated if INV)
      always_comb begin
        case (EI / 16)
          0:       t[i] = x[i];
          1:       t[i] = INV ? c_mul_pj(x[i]) : c_mul_mj(x[i]);
          2:       t[i] = c_neg(x[i]);
          default: t[i] = INV ? c_mul_mj(x[i]) : c_mul_pj(x[i]);
        endcase
      end
    end else begin : g_mul
      logic unused_gated;
      cmul_gated u_mul (
        .a    (x[i]),
        .b    (twiddle(int'(EI), INV)),
        .y    (t[i]),
        .gated(unused_gated)
      );
    end
  end

  cplx_t a, b, c, d, jd;
  always_comb begin
    a  = c_add(t[0], t[2]);
    b  = c_sub(t[0], t[2]);
    c  = c_add(t[1], t[3]);
    d  = c_sub(t[1], t[3]);
    jd = INV ? c_mul_pj(d) : c_mul_mj(d);   // -j*d forward, +j*d inverse
    y[0] = c_add(a, c);
    y[2] = c_sub(a, c);
    y[1] = c_add(b, jd);
    y[3] = c_sub(b, jd);
  end

endmodule
