// tb_oaa_conv_accel: end-to-end run of the accelerator at its default
// parameters. A layer with 2 input and 2 output channels, 5 x 5 kernels
// (tile L = 12 in a 16-point FFT) and a 20 x 20 input (2 x 2 tiles) is
// loaded; words outside the kernel and tile windows carry random garbage
// that the zero padding must remove, and one input tile of channel 1 is all
// zero (its spectrum is zero, so the MAC bypass must be used). After the
// four tiles, every element of the two 32 x 32 corners of the output maps
// is read back and compared with the full 2D linear convolution
// sum_din in[din] * k[dout][din] computed in double precision.
// Counted mechanisms: input stalls (both image-buffer halves taken),
// loading overlapped with computation, MAC multiplier bypass, and map
// positions where overlap-and-add combines two or more tiles.
module tb_oaa_conv_accel;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 16, DI = 2, DO = 2, F = 5, L = P - F + 1, NIN = 20, NT = 2;
  localparam int NOUT = NIN + F - 1;     // full convolution size
  localparam int RD = 32;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [6:0]   cfg_din = 7'(DI);
  logic [4:0]   cfg_dout = 5'(DO);
  logic [4:0]   cfg_f = 5'(F);
  logic         in_valid = 0, in_ready;
  fp32_t        in_data [P];
  logic [5:0]   in_ty = 0, in_tx = 0;
  logic         busy, kernels_ready, computing, mac_gated;
  logic [15:0]  tiles_done;
  logic         rd_en = 0;
  logic [3:0]   rd_ch = 0;
  logic [5:0]   rd_row = 0, rd_col = 0;
  fp32_t        rd_data;

  int  checks = 0, failures = 0, cycle = 0;
  int  n_stall = 0, n_overlap = 0, n_gated = 0, n_oaa_overlap = 0;
  real img  [DI][NIN][NIN];
  real kern [DO][DI][F][F];
  real ref_out [DO][NOUT][NOUT];
  int  covered [NOUT][NOUT];

  oaa_conv_accel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready && computing) n_overlap++;
    if (mac_gated) n_gated++;
  end

  initial begin
    repeat (30000) @(posedge clk);
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

  initial begin
    fp32_t row [P];
    foreach (img[d, y, x]) img[d][y][x] = rnd_unit();
    for (int y = 0; y < L; y++) for (int x = L; x < NIN; x++) img[1][y][x] = 0.0;   // tile (0,1) of channel 1
    foreach (kern[o, i, a, b]) kern[o][i][a][b] = rnd_unit();
    foreach (ref_out[o, y, x]) ref_out[o][y][x] = 0.0;
    foreach (covered[y, x]) covered[y][x] = 0;
    foreach (ref_out[o, y, x])
      for (int i = 0; i < DI; i++)
        for (int a = 0; a < F; a++)
          for (int b = 0; b < F; b++)
            if (y - a >= 0 && y - a < NIN && x - b >= 0 && x - b < NIN)
              ref_out[o][y][x] += img[i][y - a][x - b] * kern[o][i][a][b];
    for (int ty = 0; ty < NT; ty++)
      for (int tx = 0; tx < NT; tx++)
        for (int y = 0; y < P; y++)
          for (int x = 0; x < P; x++)
            if (ty * L + y < NOUT && tx * L + x < NOUT) covered[ty * L + y][tx * L + x]++;
    foreach (covered[y, x]) if (covered[y][x] > 1) n_oaa_overlap++;

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    // kernels, d_out-major
    for (int o = 0; o < DO; o++)
      for (int i = 0; i < DI; i++)
        for (int r = 0; r < P; r++) begin
          for (int c = 0; c < P; c++)
            row[c] = (r < F && c < F) ? r2f(kern[o][i][r][c]) : r2f(rnd_unit() * 50.0);
          send(row);
        end
    // input tiles
    for (int ty = 0; ty < NT; ty++)
      for (int tx = 0; tx < NT; tx++) begin
        in_ty = 6'(ty); in_tx = 6'(tx);
        for (int i = 0; i < DI; i++)
          for (int r = 0; r < P; r++) begin
            for (int c = 0; c < P; c++) begin
              int y, x;
              y = ty * L + r; x = tx * L + c;
              if (r < L && c < L) row[c] = (y < NIN && x < NIN) ? r2f(img[i][y][x]) : FP_ZERO;
              else                row[c] = r2f(rnd_unit() * 50.0);
            end
            send(row);
          end
      end
    while (tiles_done != 16'(NT * NT) || busy) @(posedge clk);
    #1;
    checks++;
    if (!kernels_ready) begin failures++; $display("FAIL kernels_ready low"); end
    for (int o = 0; o < DO; o++)
      for (int y = 0; y < RD; y++)
        for (int x = 0; x < RD; x++) begin
          real e, tol;
          rd_en = 1; rd_ch = 4'(o); rd_row = 6'(y); rd_col = 6'(x);
          @(posedge clk); #1;
          rd_en = 0;
          e   = (y < NOUT && x < NOUT) ? ref_out[o][y][x] : 0.0;
          tol = 2e-4 * (1.0 + rabs(e));
          checks++;
          if (rabs(f2r(rd_data) - e) > tol) begin
            failures++;
            if (failures < 10) $display("FAIL out[%0d][%0d][%0d] got %f exp %f", o, y, x, f2r(rd_data), e);
          end
        end
    $display("mechanisms: stalls=%0d load_overlapped_with_compute=%0d mac_bypass=%0d oaa_overlap_positions=%0d cycles=%0d",
             n_stall, n_overlap, n_gated, n_oaa_overlap, cycle);
    checks += 4;
    if (n_stall == 0)       begin failures++; $display("FAIL no input stall"); end
    if (n_overlap == 0)     begin failures++; $display("FAIL no load/compute overlap"); end
    if (n_gated == 0)       begin failures++; $display("FAIL no MAC bypass"); end
    if (n_oaa_overlap == 0) begin failures++; $display("FAIL no overlapping tiles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
