// tb_cmul_gated: checks the FP32 complex multiplier against double-precision
// products for random operands, and checks that the operands 0, 1, j and -j
// take the gated bypass path and still give the exact product.
module tb_cmul_gated;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  cplx_t a, b, y;
  logic  gated;
  int    checks = 0, failures = 0;

  cmul_gated dut (.a(a), .b(b), .y(y), .gated(gated));

  task automatic check(real ar, real ai, real br, real bi, logic exp_gated);
    real er, ei, tol;
    a = '{re: r2f(ar), im: r2f(ai)};
    b = '{re: r2f(br), im: r2f(bi)};
    #1;
    er  = f2r(a.re) * f2r(b.re) - f2r(a.im) * f2r(b.im);
    ei  = f2r(a.re) * f2r(b.im) + f2r(a.im) * f2r(b.re);
    tol = 1e-6 * (rabs(f2r(a.re)) + rabs(f2r(a.im))) * (rabs(f2r(b.re)) + rabs(f2r(b.im))) + 1e-30;
    checks++;
    if (rabs(f2r(y.re) - er) > tol || rabs(f2r(y.im) - ei) > tol || gated !== exp_gated) begin
      failures++;
      $display("FAIL a=(%f,%f) b=(%f,%f) y=(%f,%f) exp=(%f,%f) gated=%0d", ar, ai, br, bi,
               f2r(y.re), f2r(y.im), er, ei, gated);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact small cases
    check(1.5, -2.0, 3.0, 0.25, 1'b0);
    check(0.1, 0.2, 0.3, 0.4, 1'b0);
    check(1e10, -3e-5, 7.5, 1e-12, 1'b0);
    // trivial operands take the bypass
    check(0.7, -0.3, 0.0, 0.0, 1'b1);
    check(0.7, -0.3, 1.0, 0.0, 1'b1);
    check(0.7, -0.3, 0.0, 1.0, 1'b1);
    check(0.7, -0.3, 0.0, -1.0, 1'b1);
    check(1.0, 0.0, 0.25, 8.0, 1'b1);
    check(0.0, -1.0, 0.25, 8.0, 1'b1);
    check(0.0, 1.0, -3.5, 2.0, 1'b1);
    // every trivial value, on either side, against random other operands
    for (int i = 0; i < 50; i++) begin
      real xr, xi;
      xr = rnd_unit() * 10.0;
      xi = rnd_unit() * 10.0;
      check(xr, xi, 0.0, 0.0, 1'b1);  check(0.0, 0.0, xr, xi, 1'b1);
      check(xr, xi, 1.0, 0.0, 1'b1);  check(1.0, 0.0, xr, xi, 1'b1);
      check(xr, xi, 0.0, 1.0, 1'b1);  check(0.0, 1.0, xr, xi, 1'b1);
      check(xr, xi, 0.0, -1.0, 1'b1); check(0.0, -1.0, xr, xi, 1'b1);
    end
    for (int i = 0; i < 2000; i++)
      check(rnd_unit() * 100.0, rnd_unit() * 3.0, rnd_unit(), rnd_unit() * 1000.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
