// tb_hadamard_mac: sends D = 3 input channels of a 16-beat tile (channel
// by channel, beats in order) twice in a row, with random image and kernel
// spectra and some kernel words set to 0, 1, j or -j, and checks each
// emitted beat against sum_d img*ker worked out in double precision, one
// cycle after its `last` beat. Also checks that the gated bypass was used.
module tb_hadamard_mac;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 16;
  localparam int D = 3;

  logic       clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, out_valid;
  logic [3:0] beat = 0;
  cplx_t      img [P];
  cplx_t      ker [P];
  cplx_t      out_data [P];
  logic [P-1:0] gated;
  int         checks = 0, failures = 0, gated_seen = 0, outs = 0;
  real        er [P][P];
  real        ei [P][P];

  hadamard_mac #(.P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (out_valid) outs++;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      foreach (er[b, l]) begin er[b][l] = 0.0; ei[b][l] = 0.0; end
      for (int d = 0; d < D; d++)
        for (int b = 0; b < P; b++) begin
          for (int l = 0; l < P; l++) begin
            img[l] = '{re: r2f(rnd_unit()), im: r2f(rnd_unit())};
            case ($urandom_range(0, 7))
              0: ker[l] = '{re: FP_ONE, im: FP_ZERO};
              1: ker[l] = '{re: FP_ZERO, im: FP_ONE};
              2: ker[l] = '{re: FP_ZERO, im: fp_neg(FP_ONE)};
              3: ker[l] = C_ZERO;
              default: ker[l] = '{re: r2f(rnd_unit()), im: r2f(rnd_unit())};
            endcase
            er[b][l] += f2r(img[l].re) * f2r(ker[l].re) - f2r(img[l].im) * f2r(ker[l].im);
            ei[b][l] += f2r(img[l].re) * f2r(ker[l].im) + f2r(img[l].im) * f2r(ker[l].re);
          end
          in_valid = 1; first = (d == 0); last = (d == D - 1); beat = 4'(b);
          #1;
          if (gated != '0) gated_seen++;
          @(posedge clk);
          #2;
          checks++;
          if (out_valid !== (d == D - 1)) begin failures++; $display("FAIL out_valid timing"); end
          if (out_valid)
            for (int l = 0; l < P; l++) begin
              checks++;
              if (rabs(f2r(out_data[l].re) - er[b][l]) > 1e-5 || rabs(f2r(out_data[l].im) - ei[b][l]) > 1e-5) begin
                failures++;
                if (failures < 10) $display("FAIL beat %0d lane %0d got (%f,%f) exp (%f,%f)", b, l,
                  f2r(out_data[l].re), f2r(out_data[l].im), er[b][l], ei[b][l]);
              end
            end
        end
    end
    in_valid = 0;
    @(posedge clk);
    checks++;
    if (gated_seen == 0 || outs != 2 * P) begin
      failures++;
      $display("FAIL gated_seen=%0d outs=%0d", gated_seen, outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
