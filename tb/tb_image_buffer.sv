// tb_image_buffer: fills both halves of the image buffer with distinct
// random beats (channels 0..D_IN_MAX-1, 16 beats each), rewrites part of one
// half while reading the other, and checks every read, one cycle after
// rd_en, against a model of the contents.
module tb_image_buffer;
  import oaa_pkg::*;

  localparam int P = 16, DI = 64, N = DI * P;

  logic        clk = 0, wr_en = 0, wr_half = 0, rd_en = 0, rd_half = 0;
  logic [9:0]  wr_addr = 0, rd_addr = 0;
  cplx_t       wr_data [P];
  cplx_t       rd_data [P];
  int          checks = 0, failures = 0;
  fp32_t       model [2][N];

  image_buffer #(.P(P), .D_IN_MAX(DI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int h, int a);
    fp32_t v = $urandom;
    model[h][a] = v;
    wr_en = 1; wr_half = h[0]; wr_addr = 10'(a);
    for (int l = 0; l < P; l++) wr_data[l] = '{re: v ^ 32'(l), im: ~v};
  endtask

  task automatic check_read(int h, int a);
    for (int l = 0; l < P; l++) begin
      checks++;
      if (rd_data[l].re !== (model[h][a] ^ 32'(l)) || rd_data[l].im !== ~model[h][a]) begin
        failures++;
        if (failures < 10) $display("FAIL half %0d addr %0d lane %0d", h, a, l);
      end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int h = 0; h < 2; h++)
      for (int a = 0; a < N; a++) begin
        put(h, a);
        @(posedge clk); #1;
      end
    wr_en = 0;
    // read half 0 while half 1 is overwritten (ping-pong use)
    for (int a = 0; a < N; a++) begin
      int wa;
      rd_en = 1; rd_half = 0; rd_addr = 10'(a);
      wa = (a * 7) % N;
      put(1, wa);
      @(posedge clk); #1;
      check_read(0, a);
    end
    wr_en = 0;
    for (int a = 0; a < N; a++) begin
      rd_en = 1; rd_half = 1; rd_addr = 10'(a);
      @(posedge clk); #1;
      check_read(1, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
