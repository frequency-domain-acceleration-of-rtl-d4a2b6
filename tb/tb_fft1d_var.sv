// tb_fft1d_var: streams random vectors back to back through a forward
// 64-point fft1d_var (3 stages) and an inverse 16-point one (2 stages),
// alternating full and quarter mode (64/16 points, and 16/4 points), and
// compares every output lane with a double-precision DFT over each block
// (inverse scaled by 1/N). Also checks the latency (one cycle per stage) and
// that the last stage is reported bypassed exactly in quarter mode.
module tb_fft1d_var;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  NV = 12;
  localparam int  LANES = 64;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_mode = 0;
  cplx_t in_data [LANES];
  logic  ov_f, om_f, byp_f, ov_i, om_i, byp_i;
  cplx_t od_f [LANES];
  cplx_t od_i [16];
  cplx_t in_i [16];
  int    checks = 0, failures = 0, cycle = 0, bypass_seen = 0;

  real   xr [NV][LANES];
  real   xi [NV][LANES];
  int    sent_cycle [NV];

  fft1d_var #(.N(64), .INV(1'b0)) dut_f (.clk, .rst_n, .in_valid, .in_mode, .in_data,
    .out_valid(ov_f), .out_mode(om_f), .out_data(od_f), .last_bypassed(byp_f));
  fft1d_var #(.N(16), .INV(1'b1)) dut_i (.clk, .rst_n, .in_valid, .in_mode, .in_data(in_i),
    .out_valid(ov_i), .out_mode(om_i), .out_data(od_i), .last_bypassed(byp_i));
  for (genvar l = 0; l < 16; l++) begin : g_in_i
    assign in_i[l] = in_data[l];
  end
  int lat_f = -1, lat_i = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(int v, cplx_t od [], logic inv, logic mode, int nn);
    int  n, base;
    real er, ei, ang, sgn, tol, mag;
    n   = mode ? nn / 4 : nn;
    sgn = inv ? 1.0 : -1.0;
    for (int k = 0; k < nn; k++) begin
      base = (k / n) * n;
      er = 0.0; ei = 0.0; mag = 0.0;
      for (int t = 0; t < n; t++) begin
        ang = sgn * 2.0 * PI * real'(((k - base) * t) % n) / real'(n);
        er += xr[v][base + t] * $cos(ang) - xi[v][base + t] * $sin(ang);
        ei += xr[v][base + t] * $sin(ang) + xi[v][base + t] * $cos(ang);
        mag += rabs(xr[v][base + t]) + rabs(xi[v][base + t]);
      end
      if (inv) begin er = er / real'(n); ei = ei / real'(n); mag = mag / real'(n); end
      tol = 2e-6 * mag * 8.0 + 1e-9;
      checks++;
      if (rabs(f2r(od[k].re) - er) > tol || rabs(f2r(od[k].im) - ei) > tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL v=%0d n=%0d inv=%0d mode=%0d k=%0d got (%f,%f) exp (%f,%f)", v, nn, inv, mode, k,
                   f2r(od[k].re), f2r(od[k].im), er, ei);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    fork
      begin
        for (int v = 0; v < NV; v++) begin
          for (int l = 0; l < LANES; l++) begin
            xr[v][l] = rnd_unit();
            xi[v][l] = (v == 1) ? 0.0 : rnd_unit();
            in_data[l] = '{re: r2f(xr[v][l]), im: r2f(xi[v][l])};
          end
          in_mode    = v[0];
          in_valid   = 1;
          sent_cycle[v] = cycle;
          @(posedge clk);
          #1;
        end
        in_valid = 0;
      end
      begin
        static int got_f = 0, got_i = 0;
        cplx_t tmp_f [], tmp_i [];
        while (got_f < NV || got_i < NV) begin
          @(posedge clk);
          #2;
          if (ov_f) begin
            checks++;
            if (om_f != got_f[0] || cycle - sent_cycle[got_f] != 3 || byp_f != got_f[0]) begin
              failures++;
              $display("FAIL N=64 vector %0d: latency %0d mode %0d", got_f, cycle - sent_cycle[got_f], om_f);
            end
            if (byp_f) bypass_seen++;
            tmp_f = new[64];
            foreach (tmp_f[k]) tmp_f[k] = od_f[k];
            check_vec(got_f, tmp_f, 1'b0, got_f[0], 64);
            got_f++;
          end
          if (ov_i) begin
            checks++;
            if (om_i != got_i[0] || cycle - sent_cycle[got_i] != 2 || byp_i != got_i[0]) begin
              failures++;
              $display("FAIL N=16 vector %0d: latency %0d", got_i, cycle - sent_cycle[got_i]);
            end
            if (byp_i) bypass_seen++;
            tmp_i = new[16];
            foreach (tmp_i[k]) tmp_i[k] = od_i[k];
            check_vec(got_i, tmp_i, 1'b1, got_i[0], 16);
            got_i++;
          end
        end
      end
    join
    checks++;
    if (bypass_seen != NV) begin
      failures++;
      $display("FAIL last-stage bypass seen %0d times", bypass_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
