// tb_cnn_layer_slices: runs slices of the CNN layers the accelerator is
// meant for, at the default parameters, one layer after the other (each
// with its own `start`, so kernel size and tile size change between
// layers):
//   AlexNet conv2 style: 27 x 27 input, 5 x 5 kernels (L = 12, 3 x 3 tiles)
//   AlexNet conv3 style: 13 x 13 input, 3 x 3 kernels (L = 14, 1 tile)
//   VGG16 conv3 style:   56 x 56 input, 3 x 3 kernels (L = 14, 4 x 4 tiles)
// each with 3 input and 2 output channels (the real layers have more
// channels; they differ from these slices only in channel count). Every
// element of the full-convolution output is read back and compared with a
// double-precision direct convolution.
module tb_cnn_layer_slices;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 16, DI = 3, DO = 2, NMAX = 56, FMAX = 5;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [6:0]   cfg_din = 7'(DI);
  logic [4:0]   cfg_dout = 5'(DO);
  logic [4:0]   cfg_f = 0;
  logic         in_valid = 0, in_ready;
  fp32_t        in_data [P];
  logic [5:0]   in_ty = 0, in_tx = 0;
  logic         busy, kernels_ready, computing, mac_gated;
  logic [15:0]  tiles_done;
  logic         rd_en = 0;
  logic [3:0]   rd_ch = 0;
  logic [5:0]   rd_row = 0, rd_col = 0;
  fp32_t        rd_data;

  int  checks = 0, failures = 0;
  real img  [DI][NMAX][NMAX];
  real kern [DO][DI][FMAX][FMAX];

  oaa_conv_accel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(fp32_t row [P]);
    in_data  = row;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic run_layer(string name, int n, int f);
    fp32_t row [P];
    int    l, nt, nout, layer_fail;
    l = P - f + 1;
    nt = (n + l - 1) / l;
    nout = n + f - 1;
    layer_fail = failures;
    foreach (img[d, y, x]) img[d][y][x] = rnd_unit();
    foreach (kern[o, i, a, b]) kern[o][i][a][b] = rnd_unit();
    @(posedge clk); #1;
    cfg_f = 5'(f);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    for (int o = 0; o < DO; o++)
      for (int i = 0; i < DI; i++)
        for (int r = 0; r < P; r++) begin
          for (int c = 0; c < P; c++) row[c] = (r < f && c < f) ? r2f(kern[o][i][r][c]) : FP_ZERO;
          send(row);
        end
    for (int ty = 0; ty < nt; ty++)
      for (int tx = 0; tx < nt; tx++) begin
        in_ty = 6'(ty); in_tx = 6'(tx);
        for (int i = 0; i < DI; i++)
          for (int r = 0; r < P; r++) begin
            for (int c = 0; c < P; c++) begin
              int y, x;
              y = ty * l + r; x = tx * l + c;
              row[c] = (r < l && c < l && y < n && x < n) ? r2f(img[i][y][x]) : FP_ZERO;
            end
            send(row);
          end
      end
    while (tiles_done != 16'(nt * nt) || busy) @(posedge clk);
    #1;
    for (int o = 0; o < DO; o++)
      for (int y = 0; y < nout; y++)
        for (int x = 0; x < nout; x++) begin
          real e;
          e = 0.0;
          for (int i = 0; i < DI; i++)
            for (int a = 0; a < f; a++)
              for (int b = 0; b < f; b++)
                if (y - a >= 0 && y - a < n && x - b >= 0 && x - b < n)
                  e += img[i][y - a][x - b] * kern[o][i][a][b];
          rd_en = 1; rd_ch = 4'(o); rd_row = 6'(y); rd_col = 6'(x);
          @(posedge clk); #1;
          rd_en = 0;
          checks++;
          if (rabs(f2r(rd_data) - e) > 2e-4 * (1.0 + rabs(e))) begin
            failures++;
            if (failures < 10) $display("FAIL %s out[%0d][%0d][%0d] got %f exp %f", name, o, y, x, f2r(rd_data), e);
          end
        end
    $display("%s: %0d x %0d input, %0d x %0d kernels, %0d tiles, %0d failures", name, n, n, f, f,
             nt * nt, failures - layer_fail);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_layer("alexnet_conv2_slice", 27, 5);
    run_layer("alexnet_conv3_slice", 13, 3);
    run_layer("vgg16_conv3_slice", 56, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
