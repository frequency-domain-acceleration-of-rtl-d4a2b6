// tb_kernel_buffer: writes random beats at random addresses of a kernel
// buffer (D_OUT_MAX = 4, D_IN_MAX = 8), then reads every written address
// back, checking the data one cycle after rd_en against a model.
module tb_kernel_buffer;
  import oaa_pkg::*;

  localparam int P = 16, DI = 8, DO = 4, N = DI * DO * P;

  logic        clk = 0, wr_en = 0, rd_en = 0;
  logic [8:0]  wr_addr = 0, rd_addr = 0;
  cplx_t       wr_data [P];
  cplx_t       rd_data [P];
  int          checks = 0, failures = 0;
  fp32_t       model [N];
  bit          valid [N];

  kernel_buffer #(.P(P), .D_IN_MAX(DI), .D_OUT_MAX(DO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 3 * N; i++) begin
      int a;
      fp32_t v;
      a = $urandom_range(0, N - 1);
      v = $urandom;
      model[a] = v; valid[a] = 1;
      wr_en = 1; wr_addr = 9'(a);
      for (int l = 0; l < P; l++) wr_data[l] = '{re: v + 32'(l), im: v - 32'(l)};
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int a = 0; a < N; a++) begin
      if (!valid[a]) continue;
      rd_en = 1; rd_addr = 9'(a);
      @(posedge clk); #1;
      rd_en = 0;
      for (int l = 0; l < P; l++) begin
        checks++;
        if (rd_data[l].re !== model[a] + 32'(l) || rd_data[l].im !== model[a] - 32'(l)) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d lane %0d", a, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
