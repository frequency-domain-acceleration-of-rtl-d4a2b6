// fft1d_var: variable-length radix-4 FFT / IFFT on an N-lane FP32 vector.
//
// One N-word complex vector enters per cycle and one transformed vector
// leaves per cycle, S = log4(N) cycles later (N = 64: three stages). The
// transform is a radix-4 decimation-in-time FFT with S butterfly stages,
// each followed by a pipeline register.
//   in_mode = 0: the vector is one N-point FFT.
//   in_mode = 1: the vector holds four independent N/4-point FFTs
//     (lanes (N/4)b .. (N/4)b+N/4-1 form block b). Only the first S-1
//     stages are used and the last stage is bypassed, which is how the
//     64-point machine computes a 16-point FFT.
// The input permutation (base-4 digit reversal over S digits, or over the
// low S-1 digits within each block in quarter mode) is wiring selected by
// the mode; the output is in natural order.
// With INV = 1 the twiddles and the +-j terms are conjugated and the result
// is scaled by 1/N (an exact exponent decrement), giving the inverse DFT.
//
// The radix, the stage count and the bypass of the last stage follow the
// accelerator's variable-length FFT. Computing all N lanes in parallel each
// cycle (rather than a narrower streaming FFT with vertical parallelism) is
// this design's choice. The convolver uses N = 16 (one 16-point tile row per
// cycle); N = 64, the default, is the 3-stage machine of the original design.
// Interface: in_valid/in_data/in_mode are sampled every cycle; out_valid,
// out_data and out_mode follow with a fixed latency of S cycles, no stall.
module fft1d_var
  import oaa_pkg::*;
#(
  parameter int unsigned N   = 64,    // 4, 16 or 64 (twiddle table resolution)
  parameter bit          INV = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_mode,          // 0: N-point, 1: 4 x N/4-point
  input  cplx_t in_data [N],
  output logic  out_valid,
  output logic  out_mode,
  output cplx_t out_data [N],
  output logic  last_bypassed     // high when the current output skipped the last stage
);

  localparam logic MODE_Q = 1'b1;
  localparam int   NSTAGE = (N == 64) ? 3 : (N == 16) ? 2 : 1;
  localparam int   LOG2N  = 2 * NSTAGE;

  initial assert (N == 4 || N == 16 || N == 64)
    else $error("fft1d_var: N must be 4, 16 or 64");

  // base-4 digit reversal of the low `nd` digits of p
  function automatic int unsigned rev4(int unsigned p, int nd);
    int unsigned r = 0;
    for (int d = 0; d < nd; d++) r = r | (((p >> (2 * d)) % 4) << (2 * (nd - 1 - d)));
    return (p & ~((32'd1 << (2 * nd)) - 1)) | r;
  endfunction

  cplx_t st_in  [NSTAGE][N];
  cplx_t st_out [NSTAGE][N];
  cplx_t st_reg [NSTAGE][N];
  logic  vld    [NSTAGE];
  logic  mde    [NSTAGE];

  // Input permutation
  for (genvar p = 0; p < N; p++) begin : g_perm
    assign st_in[0][p] = (in_mode == MODE_Q) ? in_data[rev4(p, NSTAGE - 1)] : in_data[rev4(p, NSTAGE)];
  end

  // Butterfly stages; stage s has span m = 4^s.
  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    localparam int unsigned M = 4 ** s;
    for (genvar gi = 0; gi < N / (4 * M); gi++) begin : g_grp
      for (genvar k = 0; k < M; k++) begin : g_bf
        cplx_t bx [4];
        cplx_t by [4];
        for (genvar i = 0; i < 4; i++) begin : g_io
          assign bx[i] = st_in[s][gi * 4 * M + k + i * M];
          assign st_out[s][gi * 4 * M + k + i * M] = by[i];
        end
        r4_butterfly #(.E(k * (16 / M)), .INV(INV)) u_bf (.x(bx), .y(by));
      end
    end
    if (s > 0) begin : g_link
      assign st_in[s] = st_reg[s-1];
    end
  end

  // Pipeline registers. In quarter mode the last stage is bypassed; IFFT
  // scaling by 1/N (or 4/N) is applied on the last register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTAGE; s++) begin
        vld[s] <= 1'b0;
        mde[s] <= 1'b0;
      end
    end else begin
      vld[0] <= in_valid;
      mde[0] <= in_mode;
      for (int s = 1; s < NSTAGE; s++) begin
        vld[s] <= vld[s-1];
        mde[s] <= mde[s-1];
      end
    end
  end

  cplx_t last_in [N];
  logic  last_q;
  for (genvar p = 0; p < N; p++) begin : g_last
    if (NSTAGE > 1) begin : g_byp
      assign last_in[p] = (mde[NSTAGE-2] == MODE_Q) ? st_reg[NSTAGE-2][p] : st_out[NSTAGE-1][p];
    end else begin : g_nobyp
      assign last_in[p] = st_out[0][p];
    end
  end
  if (NSTAGE > 1) begin : g_lq
    assign last_q = mde[NSTAGE-2] == MODE_Q;
  end else begin : g_lq1
    assign last_q = 1'b0;
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTAGE - 1; s++) st_reg[s] <= st_out[s];
    for (int p = 0; p < N; p++) begin
      st_reg[NSTAGE-1][p].re <= INV ? fp_scale_pow2(last_in[p].re, last_q ? LOG2N - 2 : LOG2N) : last_in[p].re;
      st_reg[NSTAGE-1][p].im <= INV ? fp_scale_pow2(last_in[p].im, last_q ? LOG2N - 2 : LOG2N) : last_in[p].im;
    end
  end

  assign out_valid     = vld[NSTAGE-1];
  assign out_mode      = mde[NSTAGE-1];
  assign out_data      = st_reg[NSTAGE-1];
  assign last_bypassed = vld[NSTAGE-1] && (mde[NSTAGE-1] == MODE_Q);

endmodule
