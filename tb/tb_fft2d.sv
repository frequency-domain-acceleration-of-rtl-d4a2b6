// tb_fft2d: streams two random 16 x 16 real tiles back to back through a
// forward fft2d, checks every output against a double-precision 2D DFT
// (output beat v = frequency column v, lane u = frequency row u), feeds the
// spectra straight into an inverse fft2d and checks that the original tiles
// come back in row order. Also checks the 21-cycle first-beat latency of
// the forward transform and that each tile leaves as 16 consecutive beats.
module tb_fft2d;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam int  P  = 16;
  localparam int  NT = 2;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 0, rst_n = 0, in_valid = 0, f_v, i_v;
  cplx_t in_data [P];
  cplx_t f_d [P];
  cplx_t i_d [P];
  int    checks = 0, failures = 0, cycle = 0, first_in = -1;
  real   x [NT][P][P];

  fft2d #(.P(P), .INV(1'b0)) dut_f (.clk, .rst_n, .in_valid, .in_data, .out_valid(f_v), .out_data(f_d));
  fft2d #(.P(P), .INV(1'b1)) dut_i (.clk, .rst_n, .in_valid(f_v), .in_data(f_d), .out_valid(i_v), .out_data(i_d));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int gf = 0, gi = 0;
    foreach (x[t, r, c]) x[t][r][c] = rnd_unit();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        for (int t = 0; t < NT; t++)
          for (int r = 0; r < P; r++) begin
            in_valid = 1;
            for (int c = 0; c < P; c++) in_data[c] = '{re: r2f(x[t][r][c]), im: FP_ZERO};
            @(posedge clk);
            if (first_in < 0) first_in = cycle;
            #1;
          end
        in_valid = 0;
      end
      begin
        while (gf < NT * P || gi < NT * P) begin
          @(posedge clk);
          #2;
          if (f_v) begin
            int t, v;
            t = gf / P; v = gf % P;
            if (gf == 0) begin
              checks++;
              if (cycle - first_in != 21) begin
                failures++;
                $display("FAIL forward latency %0d", cycle - first_in);
              end
            end
            for (int u = 0; u < P; u++) begin
              real er, ei, ang;
              er = 0.0; ei = 0.0;
              for (int r = 0; r < P; r++)
                for (int c = 0; c < P; c++) begin
                  ang = -2.0 * PI * real'((u * r + v * c) % P) / real'(P);
                  er += x[t][r][c] * $cos(ang);
                  ei += x[t][r][c] * $sin(ang);
                end
              checks++;
              if (rabs(f2r(f_d[u].re) - er) > 1e-3 || rabs(f2r(f_d[u].im) - ei) > 1e-3) begin
                failures++;
                if (failures < 10) $display("FAIL fwd tile %0d (%0d,%0d) got (%f,%f) exp (%f,%f)",
                  t, u, v, f2r(f_d[u].re), f2r(f_d[u].im), er, ei);
              end
            end
            gf++;
          end else if (gf % P != 0) begin
            failures++;
            $display("FAIL gap in forward output");
          end
          if (i_v) begin
            int t, r;
            t = gi / P; r = gi % P;
            for (int c = 0; c < P; c++) begin
              checks++;
              if (rabs(f2r(i_d[c].re) - x[t][r][c]) > 1e-5 || rabs(f2r(i_d[c].im)) > 1e-5) begin
                failures++;
                if (failures < 10) $display("FAIL inv tile %0d (%0d,%0d) got %f exp %f", t, r, c, f2r(i_d[c].re), x[t][r][c]);
              end
            end
            gi++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
