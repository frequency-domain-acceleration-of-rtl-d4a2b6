// tb_spn: streams blocks of 16 beats through a 16-bank SPN with random
// control: input beat t is rotated by a random a_t into the banks at address
// t; output beats read the block back in a random beat order pi, each
// rotated by a random s_u. The expected output lane l of output beat u is
// input beat pi(u), lane (l + s_u - a_pi(u)) mod 16. Blocks alternate between
// the two halves of the banks and writes of the next block overlap reads of
// the previous one. Checks data and the one-cycle read latency.
module tb_spn;
  import oaa_pkg::*;
  import tb_fp_pkg::*;

  localparam int S1 = 16;
  localparam int S2 = 16;
  localparam int NB = 4;          // blocks

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, rd_en = 0, out_valid;
  cplx_t       in_data  [S1];
  cplx_t       out_data [S1];
  logic [3:0]  wr_sel [S1];
  logic [4:0]  wr_addr [S1];
  logic [4:0]  rd_addr [S1];
  logic [3:0]  out_sel [S1];
  int          checks = 0, failures = 0;

  fp32_t       blk [NB][S2][S1];
  int          rot_w [NB][S2];
  int          rot_r [NB][S2];
  int          perm  [NB][S2];

  spn #(.S1(S1), .DEPTH(2 * S2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected data of the read issued in the previous cycle
  int exp_blk = -1, exp_u = 0;
  always @(posedge clk) begin
    #2;
    if (exp_blk >= 0) begin
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid low"); end
      for (int l = 0; l < S1; l++) begin
        int t, lane;
        t    = perm[exp_blk][exp_u];
        lane = (l + rot_r[exp_blk][exp_u] - rot_w[exp_blk][t] + 2 * S1) % S1;
        checks++;
        if (out_data[l].re !== blk[exp_blk][t][lane]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d beat %0d lane %0d", exp_blk, exp_u, l);
        end
      end
    end
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int t = 0; t < S2; t++) begin
        rot_w[b][t] = $urandom_range(0, S1 - 1);
        rot_r[b][t] = $urandom_range(0, S1 - 1);
        perm[b][t]  = t;
        for (int l = 0; l < S1; l++) blk[b][t][l] = $urandom;
      end
    for (int b = 0; b < NB; b++)
      for (int t = S2 - 1; t > 0; t--) begin
        int j, tmp;
        j = $urandom_range(0, t);
        tmp = perm[b][t]; perm[b][t] = perm[b][j]; perm[b][j] = tmp;
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // cycle k: write beat k of block k/S2, read beat of block k/S2 - 1
    for (int k = 0; k < (NB + 1) * S2; k++) begin
      int wb, wt, rb, ru;
      wb = k / S2; wt = k % S2;
      rb = wb - 1; ru = wt;
      in_valid = (wb < NB);
      rd_en    = (rb >= 0);
      for (int i = 0; i < S1; i++) begin
        if (wb < NB) begin
          in_data[i] = '{re: blk[wb][wt][i], im: FP_ZERO};
          wr_sel[i]  = 4'((i - rot_w[wb][wt] + S1) % S1);
          wr_addr[i] = {wb[0], 4'(wt)};
        end
        if (rb >= 0) begin
          rd_addr[i] = {rb[0], 4'(perm[rb][ru])};
          out_sel[i] = 4'((i + rot_r[rb][ru]) % S1);
        end
      end
      @(posedge clk);
      exp_blk = rb; exp_u = ru;
      #1;
    end
    in_valid = 0; rd_en = 0;
    @(posedge clk);
    exp_blk = -1;
    #3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
