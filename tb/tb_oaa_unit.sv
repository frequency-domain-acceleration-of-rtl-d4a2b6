// tb_oaa_unit: clears the maps, then adds 16 x 16 blocks of random values
// at origins on a 12-pixel stride (overlapping by 4 rows and columns,
// including blocks that run past the 64 x 64 map edge) into two channels,
// and reads back every element of those channels plus one untouched
// channel, comparing with a double-precision overlap-add model.
module tb_oaa_unit;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 16, OUT_MAX = 64, L = 12;

  logic        clk = 0, rst_n = 0, clr = 0, busy, in_valid = 0, rd_en = 0;
  logic [3:0]  ch = 0, rd_ch = 0;
  logic [6:0]  row0 = 0, col0 = 0;
  logic [3:0]  row = 0;
  fp32_t       in_data [P];
  logic [5:0]  rd_row = 0, rd_col = 0;
  fp32_t       rd_data;
  int          checks = 0, failures = 0, overlaps = 0;
  real         model [3][OUT_MAX][OUT_MAX];
  int          hits  [3][OUT_MAX][OUT_MAX];

  oaa_unit #(.P(P), .OUT_MAX(OUT_MAX), .D_OUT_MAX(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[c, y, x]) begin model[c][y][x] = 0.0; hits[c][y][x] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    clr = 1;
    @(posedge clk); #1 clr = 0;
    while (busy) begin @(posedge clk); #1; end
    for (int c = 0; c < 2; c++)
      for (int ty = 0; ty < 6; ty++)
        for (int tx = 0; tx < 6; tx++) begin
          if ((ty + tx + c) % 3 == 0 && !(ty == 5 && tx == 5)) continue;   // leave some tiles out
          for (int r = 0; r < P; r++) begin
            in_valid = 1; ch = 4'(c); row0 = 7'(ty * L); col0 = 7'(tx * L); row = 4'(r);
            for (int j = 0; j < P; j++) begin
              in_data[j] = r2f(rnd_unit());
              if (ty * L + r < OUT_MAX && tx * L + j < OUT_MAX) begin
                model[c][ty * L + r][tx * L + j] += f2r(in_data[j]);
                if (hits[c][ty * L + r][tx * L + j]++ > 0) overlaps++;
              end
            end
            @(posedge clk); #1;
          end
          in_valid = 0;
          @(posedge clk); #1;
        end
    in_valid = 0;
    repeat (2) @(posedge clk);
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < OUT_MAX; y++)
        for (int x = 0; x < OUT_MAX; x++) begin
          #1;
          rd_en = 1; rd_ch = 4'(c == 2 ? 9 : c); rd_row = 6'(y); rd_col = 6'(x);
          @(posedge clk); #1;
          rd_en = 0;
          checks++;
          if (rabs(f2r(rd_data) - model[c][y][x]) > 1e-5) begin
            failures++;
            if (failures < 10) $display("FAIL ch %0d (%0d,%0d) got %f exp %f", c, y, x, f2r(rd_data), model[c][y][x]);
          end
        end
    checks++;
    if (overlaps == 0) begin failures++; $display("FAIL no overlapping additions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
