// tb_r4_butterfly: drives two radix-4 butterflies (forward with twiddle step
// 3, inverse with twiddle step 5) with random complex inputs and compares
// every output with y_q = sum_i x_i * W64^(E*i) * W4^(q*i), worked out in
// double precision (W conjugated for the inverse).
module tb_r4_butterfly;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam real PI = 3.14159265358979323846;
  cplx_t x [4];
  cplx_t yf [4];
  cplx_t yi [4];
  int    checks = 0, failures = 0;

  r4_butterfly #(.E(3), .INV(1'b0)) dut_f (.x(x), .y(yf));
  r4_butterfly #(.E(5), .INV(1'b1)) dut_i (.x(x), .y(yi));

  task automatic compare(cplx_t y [4], int e, real sgn);
    real er, ei, ang, tr, ti;
    for (int q = 0; q < 4; q++) begin
      er = 0.0; ei = 0.0;
      for (int i = 0; i < 4; i++) begin
        ang = sgn * 2.0 * PI * (real'(e * i) / 64.0 + real'(q * i) / 4.0);
        tr  = f2r(x[i].re); ti = f2r(x[i].im);
        er += tr * $cos(ang) - ti * $sin(ang);
        ei += tr * $sin(ang) + ti * $cos(ang);
      end
      checks++;
      if (rabs(f2r(y[q].re) - er) > 1e-5 || rabs(f2r(y[q].im) - ei) > 1e-5) begin
        failures++;
        $display("FAIL e=%0d q=%0d got (%f,%f) exp (%f,%f)", e, q, f2r(y[q].re), f2r(y[q].im), er, ei);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 4; i++) x[i] = '{re: r2f(rnd_unit()), im: r2f(rnd_unit())};
      #1;
      compare(yf, 3, -1.0);
      compare(yi, 5, 1.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
