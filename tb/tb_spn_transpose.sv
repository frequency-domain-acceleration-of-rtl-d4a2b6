// tb_spn_transpose: streams three random 16 x 16 tiles back to back (one row
// per cycle) and checks that each comes out transposed (output beat c, lane
// r = input row r, column c), that output beats are consecutive, and that
// the first output beat of a tile follows its last input beat by 2 cycles.
module tb_spn_transpose;
  import oaa_pkg::*;

  localparam int P  = 16;
  localparam int NT = 3;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t in_data [P];
  cplx_t out_data [P];
  int    checks = 0, failures = 0, cycle = 0;
  fp32_t tile [NT][P][P];
  int    last_in_cycle [NT];

  spn_transpose #(.P(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int got = 0;
    foreach (tile[t, r, c]) tile[t][r][c] = $urandom;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        for (int t = 0; t < NT; t++)
          for (int r = 0; r < P; r++) begin
            in_valid = 1;
            for (int c = 0; c < P; c++) in_data[c] = '{re: tile[t][r][c], im: ~tile[t][r][c]};
            @(posedge clk);
            if (r == P - 1) last_in_cycle[t] = cycle;
            #1;
          end
        in_valid = 0;
      end
      begin
        while (got < NT * P) begin
          @(posedge clk);
          #2;
          if (out_valid) begin
            int t, c;
            t = got / P; c = got % P;
            if (c == 0) begin
              checks++;
              if (cycle - last_in_cycle[t] != 2) begin
                failures++;
                $display("FAIL tile %0d latency %0d", t, cycle - last_in_cycle[t]);
              end
            end
            for (int r = 0; r < P; r++) begin
              checks++;
              if (out_data[r].re !== tile[t][r][c] || out_data[r].im !== ~tile[t][r][c]) begin
                failures++;
                if (failures < 10) $display("FAIL tile %0d col %0d row %0d", t, c, r);
              end
            end
            got++;
          end else if (got % P != 0) begin
            failures++;
            $display("FAIL gap inside an output tile");
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
